// Serial-in, parallel-out shift register behind the demodulator.
//
// It takes one demodulated bit on every falling edge of the recovered clock
// Clock_Out. The demodulator holds Clock_Out high during neutral and erroneous
// carrier cycles, so the register (and anything it drives) stands still for
// exactly those cycles. New bits enter at bit 0 and move towards the top, so
// after WIDTH clock pulses frame[WIDTH-1] holds the oldest bit of the frame.
//
// Sampling on the falling edge of the recovered clock follows the published
// design. The width (one 20-bit command frame, the frame size of the design's
// visual-prosthesis example), the shift direction, the count of received bits
// and the asynchronous active-low reset are choices of this implementation.
module fsk_shift_register #(
  parameter int unsigned WIDTH = 20
) (
  input  logic             clock_out,  // recovered clock, bits taken on its falling edge
  input  logic             rst_n,      // asynchronous reset, active low
  input  logic             data_in,    // demodulated serial data
  output logic [WIDTH-1:0] frame,      // the last WIDTH bits, newest in bit 0
  output logic [31:0]      bit_count   // bits taken since reset (wraps)
);

  timeunit 1ns; timeprecision 1ps;

  always_ff @(negedge clock_out or negedge rst_n) begin
    if (!rst_n) begin
      frame     <= '0;
      bit_count <= '0;
    end else begin
      frame     <= {frame[WIDTH-2:0], data_in};
      bit_count <= bit_count + 32'd1;
    end
  end

endmodule
