// Self-checking testbench of the serial-in shift register.
//
// The recovered clock is driven as the demodulator drives it: a train of
// pulses with random gaps in which it stays high (frozen cycles). Random data
// is presented before each falling edge and changed right after it. A
// reference queue of the bits sent gives the expected parallel word and bit
// count, which are checked after every falling edge and again at the end of
// every frozen stretch, when nothing may have moved.
module tb_fsk_shift_register;
  timeunit 1ns; timeprecision 1ps;

  localparam int W     = 20;
  localparam int NBITS = 3000;

  logic         clock_out = 1'b1;
  logic         rst_n     = 1'b1;
  logic         data_in   = 1'b0;
  logic [W-1:0] frame;
  logic [31:0]  bit_count;

  int checks = 0, failures = 0, frozen = 0;
  logic [W-1:0] exp_frame = '0;

  fsk_shift_register #(.WIDTH(W)) dut (.clock_out, .rst_n, .data_in, .frame, .bit_count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #(100 * NBITS * 4);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    #9 check(frame == '0 && bit_count == 0, "reset clears the register");
    rst_n = 1'b1;
    for (int i = 0; i < NBITS; i++) begin
      if ($urandom_range(0, 3) == 0) begin
        // Frozen stretch: clock held high for a few cycles, data wiggles.
        int n = $urandom_range(1, 5);
        frozen++;
        repeat (n) begin
          #50 data_in = 1'($urandom);
          #50;
        end
        check(frame == exp_frame && bit_count == 32'(i), "nothing moves while frozen");
      end
      #20 data_in = 1'($urandom);
      #30 clock_out = 1'b0;       // sampling edge
      exp_frame = {exp_frame[W-2:0], data_in};
      #5 data_in = ~data_in;      // data may change after the edge
      #1 check(frame == exp_frame, $sformatf("frame after bit %0d", i));
      check(bit_count == 32'(i + 1), "bit count");
      #44 clock_out = 1'b1;
    end
    check(frozen > 0, "frozen stretches happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
