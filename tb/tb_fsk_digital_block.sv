// Self-checking testbench of the demodulator's digital block.
//
// CKin runs at a fixed 100 ns period. During each low half-cycle the bench
// puts a thermometer code on the block's input: mostly the three valid codes,
// sometimes an invalid one (too short, too long or non-thermometer). After
// the rising edge it compares data_out, error_n and the decoded symbol with a
// reference model written from the truth table, and checks the gated clock
// in both halves of the following cycle: low after the falling edge only if
// the sampled code was 0 or 1, high otherwise. Outputs must change on the
// same rising edge that samples the code (one symbol per carrier cycle).
module tb_fsk_digital_block;
  import fsk_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NCYC = 2000;

  logic    ck_in = 1'b0;
  logic    rst_n = 1'b1;
  therm_t  code  = '0;
  logic    data_out, clock_out, error_n;
  symbol_e symbol;

  int checks = 0, failures = 0;
  int n_one = 0, n_zero = 0, n_neutral = 0, n_err = 0;

  fsk_digital_block dut (.ck_in, .rst_n, .code, .data_out, .clock_out, .error_n, .symbol);

  // Reference state.
  logic exp_data = 1'b0, exp_en = 1'b0, exp_err_n = 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic therm_t pick_code();
    int r = $urandom_range(0, 99);
    if (r < 30) return 4'b0111;
    if (r < 60) return 4'b0001;
    if (r < 80) return 4'b0011;
    return therm_t'($urandom_range(0, 15));
  endfunction

  initial begin : watchdog
    #(100 * (NCYC + 50));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Reset holds the outputs at data 0, clock frozen high, no error.
    #1 rst_n = 1'b0;
    #9;
    check(data_out == 1'b0 && clock_out == 1'b1 && error_n == 1'b1, "reset values");
    #40 rst_n = 1'b1;
    for (int i = 0; i < NCYC; i++) begin
      // Low half-cycle: the timer's code settles.
      #20 code = pick_code();
      #30 ck_in = 1'b1;          // rising edge samples the code
      // Reference model of the truth table.
      case (code)
        4'b0111: begin exp_data = 1'b1; exp_en = 1'b1; exp_err_n = 1'b1; n_one++; end
        4'b0001: begin exp_data = 1'b0; exp_en = 1'b1; exp_err_n = 1'b1; n_zero++; end
        4'b0011: begin                  exp_en = 1'b0; exp_err_n = 1'b1; n_neutral++; end
        default: begin                  exp_en = 1'b0; exp_err_n = 1'b0; n_err++; end
      endcase
      #1;
      check(data_out == exp_data, $sformatf("data_out for code %b", code));
      check(error_n == exp_err_n, $sformatf("error_n for code %b", code));
      check(symbol == (exp_err_n ? (exp_en ? (exp_data ? SYM_ONE : SYM_ZERO) : SYM_NEUTRAL)
                                 : SYM_ERROR), "symbol");
      check(clock_out == 1'b1, "clock_out high while CKin high");
      #4 code = '0;              // discharge after the edge
      #45 ck_in = 1'b0;          // falling edge: the shift register's sampling edge
      #1;
      check(clock_out == (exp_en ? 1'b0 : 1'b1),
            $sformatf("clock_out after falling edge, enable=%0b", exp_en));
      check(data_out == exp_data, "data_out stable through the low half");
    end
    check(n_one > 0 && n_zero > 0 && n_neutral > 0 && n_err > 0, "all code classes seen");
    $display("codes: one=%0d zero=%0d neutral=%0d error=%0d", n_one, n_zero, n_neutral, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
