// Self-checking testbench of the clock recovery model.
//
// A sinusoidal carrier of 1 V amplitude is applied across the tank terminals
// in 64 steps per cycle, at three frequencies, followed by a stretch of small
// noise (+/- a quarter of the hysteresis) around zero. At every step the bench
// checks the comparator rule: output high above +HYST/2, low below -HYST/2.
// It counts edges: exactly one rising and one falling edge per carrier cycle,
// and none at all during the noise, which the hysteresis must reject.
module tb_fsk_clock_recovery;
  timeunit 1ns; timeprecision 1ps;

  localparam real HYST  = 0.1;
  localparam real PI    = 3.14159265358979;
  localparam int  STEPS = 64;

  real  v_p = 0.0, v_n = 0.0;
  logic ck_in;

  int checks = 0, failures = 0;
  int rises = 0, falls = 0;

  fsk_clock_recovery #(.HYST_V(HYST)) dut (.v_p, .v_n, .ck_in);

  always @(posedge ck_in) rises++;
  always @(negedge ck_in) falls++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real period_ns [3] = '{4000.0, 4651.2, 5555.6};  // 250, 215, 180 kHz
    int  r0, f0;
    real v;
    #100 v_p = 0.5;   // idle positive, so the first cycle starts with a fall
    #100;
    check(ck_in == 1'b1, "output follows a positive input");
    for (int f = 0; f < 3; f++) begin
      for (int c = 0; c < 100; c++) begin
        r0 = rises; f0 = falls;
        for (int s = 0; s < STEPS; s++) begin
          // Cycle starts with the negative half, as the timer expects.
          v = -$sin(2.0 * PI * real'(s) / real'(STEPS));
          v_p = v / 2.0; v_n = -v / 2.0;
          #(period_ns[f] / real'(STEPS));
          if (v > HYST / 2.0)  check(ck_in == 1'b1, "high above +HYST/2");
          if (v < -HYST / 2.0) check(ck_in == 1'b0, "low below -HYST/2");
        end
        check(rises - r0 == 1 && falls - f0 == 1, $sformatf("one edge of each kind per cycle (%0d, %0d)", rises - r0, falls - f0));
      end
    end
    // Noise around zero must not toggle the output.
    r0 = rises; f0 = falls;
    for (int s = 0; s < 2000; s++) begin
      v = (real'($urandom_range(0, 1000)) / 1000.0 - 0.5) * HYST / 2.0;
      v_p = v; v_n = 0.0;
      #10;
    end
    check(rises == r0 && falls == f0, "noise within the hysteresis rejected");
    $display("edges: rises=%0d falls=%0d", rises, falls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
