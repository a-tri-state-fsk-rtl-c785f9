// Behavioural model (not synthesizable logic) of the synchronous analog timer.
//
// The real circuit is analog: while CKin is low, switch S1 lets a constant
// current I_C charge a capacitor C; a resistor string fed by I_R sets four
// reference levels V1 < V2 < V3 < V4, and four comparators turn the capacitor
// voltage Vc = I_C * t / C into the thermometer code {C4,C3,C2,C1}. When CKin
// goes high, S1 opens and S2 discharges the capacitor for the next cycle.
//
// The model reproduces this in time: after each falling CKin edge comparator k
// trips at t_k = V_k * C / I_C if CKin is still low by then, and all outputs
// return to 0 a discharge time T_DISCHARGE_NS after CKin rises, so the code of
// the finished low half-cycle is stable across the rising edge on which the
// digital block samples it. The code is thus 0000 for a half-cycle shorter
// than t_1, 0001/0011/0111 in the three windows and 1111 beyond t_4.
//
// Structure and the threshold inequality follow the published design. The
// component values are not published; the defaults (10 uA into 10 pF, i.e.
// 1 V/us) and the references are this model's choice: V2 and V3 sit at the
// centre of their windows for f0/fN/f1 = 250/215/180 kHz, the carrier set used
// in the measurements, and V1/V4 lie the same margin outside the f0 and f1
// half-periods. The discharge time is also an assumption.
//
// The trip delays are computed from the parameters at time zero, so a lint
// tool cannot prove them non-zero; the initial assertion (V1 > 0, rising
// references) guarantees that they are.
module fsk_analog_timer
  import fsk_pkg::*;
#(
  parameter real IC_UA          = 10.0,   // charging current I_C, microamperes
  parameter real C_PF           = 10.0,   // timing capacitor C, picofarads
  parameter real V1             = 1.8372, // reference levels, volts
  parameter real V2             = 2.1628,
  parameter real V3             = 2.5517,
  parameter real V4             = 3.0039,
  parameter real T_DISCHARGE_NS = 20.0    // Vc reset after CKin rises, ns
) (
  input  logic   ck_in,   // squared-up carrier; the capacitor charges while low
  output therm_t code     // comparator outputs {C4,C3,C2,C1}
);

  timeunit 1ns; timeprecision 1ps;

  // Capacitor slope in volts per nanosecond.
  localparam real SLOPE_V_PER_NS = IC_UA / C_PF * 1.0e-3;

  real         trip_ns [4];
  int unsigned phase;   // counts CKin edges, tags each charge/discharge phase

  initial begin
    trip_ns[0] = V1 / SLOPE_V_PER_NS;
    trip_ns[1] = V2 / SLOPE_V_PER_NS;
    trip_ns[2] = V3 / SLOPE_V_PER_NS;
    trip_ns[3] = V4 / SLOPE_V_PER_NS;
    phase      = 0;
    code       = '0;
    assert (V1 > 0.0 && V1 < V2 && V2 < V3 && V3 < V4)
      else $error("fsk_analog_timer: references must rise from V1 to V4");
  end

  // One process owns the code. A falling edge starts a charging phase in
  // which each comparator trips once Vc passes its reference, unless CKin has
  // gone high (S1 open) before that; a rising edge starts a discharge phase
  // in which S2 empties the capacitor and all comparators fall back to 0.
  // Each phase is tagged, so a pending event of an earlier phase is dropped.
  always @(ck_in) begin
    phase = phase + 1;
    if (!ck_in) begin
      code = '0;  // charging starts from an empty capacitor
      for (int k = 0; k < 4; k++) begin
        fork
          automatic int unsigned id = phase;
          automatic logic [1:0]  kk = 2'(k);
          begin
            #(trip_ns[kk]);
            if (phase == id) code[kk] = 1'b1;
          end
        join_none
      end
    end else begin
      fork
        automatic int unsigned id = phase;
        begin
          #(T_DISCHARGE_NS);
          if (phase == id) code = '0;
        end
      join_none
    end
  end

endmodule
