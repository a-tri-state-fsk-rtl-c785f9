// Pulse-timing testbench: neutral cycles move a command by whole carrier periods.
//
// The point of the tri-state protocol is that the controller can delay the
// next command, and so the next edge of a stimulation pulse, by any number n
// of neutral carrier cycles, with a resolution of one neutral period 1/fN.
// This bench sends, at the default carrier set (250/215/180 kHz), a command
// frame A, then n neutral cycles, then a command frame B, then a neutral
// cycle, for n = 0..12. It checks that:
//   * frame A stays in the shift register, frozen, through the neutral run;
//   * frame B is complete at the time predicted from the stimulus alone: the
//     end of A, plus n neutral periods, plus B's own 20 bit periods, plus the
//     1/64 of the trailing neutral cycle after which its falling edge is seen;
//   * compared with n = 0, frame B arrives exactly n * (1/fN) later (to 1 ns),
//     which is the timing resolution claimed for the scheme.
// A stimulator would switch its current when a frame completes, so these
// arrival times are the pulse edges of an asymmetric biphasic pulse.
module tb_fsk_pulse_timing;
  import fsk_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam real F0_HZ = 250.0e3;
  localparam real FN_HZ = 215.0e3;
  localparam real F1_HZ = 180.0e3;
  localparam int  STEPS = 64;      // steps per carrier cycle in the source
  localparam int  NMAX  = 12;

  real          tank_p, tank_n;
  logic         rst_n = 1'b1;
  logic         ck_in, data_out, clock_out, error_n;
  therm_t       code;
  symbol_e      symbol;
  logic [19:0]  frame;
  logic [31:0]  bit_count;

  int checks = 0, failures = 0, freezes = 0;

  fsk_carrier_source #(.STEPS(STEPS)) src (.v_p(tank_p), .v_n(tank_n));

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

  function automatic real period_of(input logic b);
    return b ? 1.0e9 / F1_HZ : 1.0e9 / F0_HZ;
  endfunction

  task automatic send_word(input logic [19:0] w);
    for (int i = 19; i >= 0; i--) src.send_cycle(period_of(w[i]));
  endtask

  // Time at which frame B became complete, taken from the register itself.
  realtime t_b_done;
  logic [19:0] word_b;
  always @(frame) if (frame == word_b) t_b_done = $realtime;

  initial begin : watchdog
    #(1.0e9 / FN_HZ * real'((NMAX + 1) * (NMAX + 60)));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [19:0] word_a;
    realtime t_a_end, t_expect;
    real     sum_b, delta, delta0;
    word_a = 20'hA5C3F;
    word_b = 20'h3C5A1;
    delta0 = 0.0;
    sum_b  = 0.0;
    for (int i = 0; i < 20; i++) sum_b += period_of(word_b[i]);
    src.idle(1000.0);
    rst_n = 1'b0;
    src.idle(1000.0);
    rst_n = 1'b1;
    src.send_cycle(1.0e9 / FN_HZ);
    for (int n = 0; n <= NMAX; n++) begin
      t_b_done = 0.0;
      send_word(word_a);
      t_a_end = $realtime;
      repeat (n) begin
        src.send_cycle(1.0e9 / FN_HZ);
        check(frame == word_a, $sformatf("frame A frozen during neutral run n=%0d", n));
        freezes++;
      end
      send_word(word_b);
      check(t_b_done == 0.0 || frame != word_b, "frame B not complete before its last bit");
      src.send_cycle(1.0e9 / FN_HZ);   // trailing neutral: B's last bit enters here
      check(frame == word_b, $sformatf("frame B received, n=%0d", n));
      t_expect = t_a_end + real'(n) * 1.0e9 / FN_HZ + sum_b + 1.0e9 / FN_HZ / real'(STEPS);
      delta = t_b_done - t_a_end;
      check(t_b_done - t_expect < 1.0 && t_expect - t_b_done < 1.0,
            $sformatf("frame B at %0.1f ns, predicted %0.1f ns (n=%0d)", t_b_done, t_expect, n));
      if (n == 0) delta0 = delta;
      check(delta - delta0 - real'(n) * 1.0e9 / FN_HZ < 1.0 &&
            delta - delta0 - real'(n) * 1.0e9 / FN_HZ > -1.0,
            $sformatf("n=%0d neutral cycles delay frame B by n/fN", n));
      $display("n=%0d neutral cycles: frame B %0.1f ns after frame A ended", n, delta);
    end
    check(freezes > 0, "neutral freezes happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
