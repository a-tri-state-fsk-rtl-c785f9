// Frequency-drift testbench: how far the transmitter may drift.
//
// With V2 and V3 centred in their windows, a common drift of all three
// carrier frequencies is tolerated until a half-period crosses a reference.
// For the default set (half-periods 2000/2326/2778 ns, references crossed at
// 1837.2/2162.8/2551.7/3003.9 ns) the first crossing is at about -7.5 % or
// +7.5 %. This bench applies drifts from -10 % to +10 % in 1 % steps. At each
// one it sends random 0/1/neutral cycles and predicts the decoded symbol from
// the drifted half-period and the reference crossing times alone, so it checks
// the whole chain both inside the tolerated range (everything decoded as sent)
// and outside it (the predicted wrong symbol or error). It counts drift points
// that decode cleanly and points that do not; both must occur.
module tb_fsk_freq_drift;
  import fsk_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam real F_HZ [3]  = '{250.0e3, 180.0e3, 215.0e3};  // sent as 0, 1, neutral
  localparam real TRIP [4]  = '{1837.2, 2162.8, 2551.7, 3003.9};
  localparam int  NSYM      = 60;

  real          tank_p, tank_n;
  logic         rst_n = 1'b1;
  logic         ck_in, data_out, clock_out, error_n;
  therm_t       code;
  symbol_e      symbol;
  logic [19:0]  frame;
  logic [31:0]  bit_count;

  int checks = 0, failures = 0;
  int clean_points = 0, broken_points = 0;

  fsk_carrier_source src (.v_p(tank_p), .v_n(tank_n));

  tri_state_fsk_demod dut (
    .tank_p, .tank_n, .rst_n, .ck_in, .code, .data_out, .clock_out,
    .error_n, .symbol, .frame, .bit_count
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // Symbol expected for a low half-cycle of half_ns.
  function automatic symbol_e predict(input real half_ns);
    if (half_ns < TRIP[0] || half_ns > TRIP[3]) return SYM_ERROR;
    if (half_ns < TRIP[1]) return SYM_ZERO;
    if (half_ns < TRIP[2]) return SYM_NEUTRAL;
    return SYM_ONE;
  endfunction

  initial begin : watchdog
    #(21.0 * real'(NSYM + 2) * 7000.0);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real     drift, period;
    int      kind, wrong;
    symbol_e exp_sym;
    src.idle(1000.0);
    rst_n = 1'b0;
    src.idle(1000.0);
    rst_n = 1'b1;
    for (int d = -10; d <= 10; d++) begin
      drift = real'(d) / 100.0;
      wrong = 0;
      for (int i = 0; i < NSYM; i++) begin
        kind    = $urandom_range(0, 2);
        period  = 1.0e9 / (F_HZ[kind] * (1.0 + drift));
        exp_sym = predict(period / 2.0);
        if (exp_sym != (kind == 0 ? SYM_ZERO : kind == 1 ? SYM_ONE : SYM_NEUTRAL)) wrong++;
        fork
          src.send_cycle(period);
          begin
            #(period * 0.75);
            check(symbol == exp_sym,
                  $sformatf("drift %0d%%: symbol %s, predicted %s", d, symbol.name(), exp_sym.name()));
            check(error_n == (exp_sym != SYM_ERROR), "error flag");
          end
        join
      end
      if (wrong == 0) clean_points++; else broken_points++;
      $display("drift %0d %%: %0d of %0d cycles decode differently from what was sent",
               d, wrong, NSYM);
    end
    check(clean_points >= 15, "at least -7 % .. +7 % decodes cleanly");
    check(broken_points > 0, "drift beyond the margins was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
