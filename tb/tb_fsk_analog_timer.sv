// Self-checking testbench of the synchronous analog timer model.
//
// CKin is driven with random low and high half-cycle lengths that cover all
// five code windows. With the default component values the capacitor ramps at
// I_C/C = 10 uA / 10 pF = 1 V/us, so a reference V_k is crossed V_k
// microseconds after the falling edge. The bench checks the code half-way
// through each low half-cycle, 1 ns before the rising edge (where the digital
// block samples it), just after the rising edge (still held) and after the
// discharge (all zero). It also counts that every one of the five codes was
// produced.
module tb_fsk_analog_timer;
  import fsk_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam int NCYC = 1500;
  // Crossing times of V1..V4 in ns for a 1 V/us ramp.
  localparam real TRIP [4] = '{1837.2, 2162.8, 2551.7, 3003.9};

  logic   ck_in = 1'b1;
  therm_t code;

  int checks = 0, failures = 0;
  int seen [5] = '{0, 0, 0, 0, 0};

  fsk_analog_timer dut (.ck_in, .code);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // Thermometer code expected after t ns of charging.
  function automatic therm_t expect_code(real t);
    therm_t c = '0;
    for (int k = 0; k < 4; k++) if (t > TRIP[k]) c[k] = 1'b1;
    return c;
  endfunction

  initial begin : watchdog
    #(6000.0 * (NCYC + 10));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t_low, t_high;
    therm_t e;
    #1000;
    for (int i = 0; i < NCYC; i++) begin
      // Keep every sample at least 5 ns away from a trip point.
      do t_low = real'($urandom_range(1400, 3500));
      while (t_low - 1.0 - TRIP[0] > -6.0 && t_low - 1.0 - TRIP[0] < 6.0 ||
             t_low - 1.0 - TRIP[1] > -6.0 && t_low - 1.0 - TRIP[1] < 6.0 ||
             t_low - 1.0 - TRIP[2] > -6.0 && t_low - 1.0 - TRIP[2] < 6.0 ||
             t_low - 1.0 - TRIP[3] > -6.0 && t_low - 1.0 - TRIP[3] < 6.0);
      t_high = real'($urandom_range(1000, 2500));
      ck_in = 1'b0;
      #(t_low / 2.0);
      check(code == expect_code(t_low / 2.0) || (t_low / 2.0 > TRIP[0] - 6.0 &&
            t_low / 2.0 < TRIP[0] + 6.0), "code half-way through the low phase");
      #(t_low / 2.0 - 1.0);
      e = expect_code(t_low - 1.0);
      check(code == e, $sformatf("code %b before rising edge, low for %0.0f ns, expected %b",
                                 code, t_low, e));
      #1 ck_in = 1'b1;
      #5 check(code == e, "code held just after the rising edge");
      #30 check(code == '0, "capacitor discharged");
      case (e)
        4'b0000: seen[0]++;
        4'b0001: seen[1]++;
        4'b0011: seen[2]++;
        4'b0111: seen[3]++;
        4'b1111: seen[4]++;
        default: ;
      endcase
      #(t_high - 35.0);
    end
    foreach (seen[k]) check(seen[k] > 0, $sformatf("code class %0d produced", k));
    $display("codes seen: %0d %0d %0d %0d %0d", seen[0], seen[1], seen[2], seen[3], seen[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
