// Digital block of the tri-state FSK demodulator.
//
// At every rising edge of the squared-up carrier CKin this block samples the
// 4-bit thermometer code {C4..C1} produced by the analog timer during the low
// half-cycle that has just ended, and acts on it:
//
//   code 0111 (f1)   Data_Out <= 1, output clock enabled,  Error_n = 1
//   code 0011 (fN)   Data_Out held,  Clock_Out held high,   Error_n = 1
//   code 0001 (f0)   Data_Out <= 0, output clock enabled,  Error_n = 1
//   anything else    Data_Out held,  Clock_Out held high,   Error_n = 0
//
// "Enabled" means CKin itself is passed to Clock_Out for the cycle that
// follows, so the shift register behind the demodulator samples Data_Out on
// the falling CKin edge half a cycle after Data_Out changed. A neutral or bad
// cycle keeps Clock_Out high, which freezes everything clocked by it.
//
// Timing: data_out, error_n and the enable change only on a rising CKin edge,
// while CKin is high, so the OR-type gate clock_out = ck_in | ~enable cannot
// glitch. One symbol is decoded per carrier cycle (data rate = carrier rate).
//
// The truth table, the edge on which the code is sampled and the meaning of
// "enable" follow the published design. Holding Data_Out on error codes (the
// table leaves it as don't-care), the asynchronous active-low reset and its
// values (data 0, clock frozen, no error) are choices of this implementation.
module fsk_digital_block
  import fsk_pkg::*;
(
  input  logic   ck_in,      // squared-up carrier from the clock recovery
  input  logic   rst_n,      // asynchronous reset, active low
  input  therm_t code,       // thermometer code {C4,C3,C2,C1}
  output logic   data_out,   // demodulated serial data
  output logic   clock_out,  // recovered, gated clock
  output logic   error_n,    // low while the last cycle was not a valid symbol
  output symbol_e symbol     // decoded meaning of the last cycle (observation)
);

  timeunit 1ns; timeprecision 1ps;

  logic clk_en;
  symbol_e sym_next;

  always_comb sym_next = decode_code(code);

  always_ff @(posedge ck_in or negedge rst_n) begin
    if (!rst_n) begin
      data_out <= 1'b0;
      clk_en   <= 1'b0;
      error_n  <= 1'b1;
      symbol   <= SYM_NEUTRAL;
    end else begin
      symbol <= sym_next;
      unique case (sym_next)
        SYM_ZERO: begin data_out <= 1'b0; clk_en <= 1'b1; error_n <= 1'b1; end
        SYM_ONE:  begin data_out <= 1'b1; clk_en <= 1'b1; error_n <= 1'b1; end
        SYM_NEUTRAL: begin                clk_en <= 1'b0; error_n <= 1'b1; end
        default:  begin                   clk_en <= 1'b0; error_n <= 1'b0; end
      endcase
    end
  end

  // Glitch-free gating: clk_en only changes while ck_in is high.
  always_comb clock_out = ck_in | ~clk_en;

endmodule
