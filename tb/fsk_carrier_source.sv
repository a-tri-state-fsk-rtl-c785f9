// Behavioural model of the external tri-state FSK transmitter, for testbenches.
//
// It drives the differential voltage across the receiver tank. Each call of
// send_cycle() emits exactly one carrier cycle of the given period as a sine of
// amplitude AMP_V in STEPS steps, starting with the negative half-cycle, so
// the back-to-back cycles form a phase-continuous FSK carrier. The caller
// picks the period per symbol: 1/f1 for a 1, 1/f0 for a 0, 1/fN for a
// neutral cycle, or anything else to provoke an error. idle() holds a small
// positive level, as before the first cycle.
module fsk_carrier_source #(
  parameter int  STEPS = 64,
  parameter real AMP_V = 1.0
) (
  output real v_p,
  output real v_n
);
  timeunit 1ns; timeprecision 1ps;

  localparam real PI = 3.14159265358979;

  initial begin
    v_p = 0.0;
    v_n = 0.0;
  end

  task automatic idle(input real duration_ns);
    v_p = AMP_V / 4.0;
    v_n = -AMP_V / 4.0;
    #(duration_ns);
  endtask

  task automatic send_cycle(input real period_ns);
    real v;
    for (int s = 0; s < STEPS; s++) begin
      v   = -AMP_V * $sin(2.0 * PI * real'(s) / real'(STEPS));
      v_p = v / 2.0;
      v_n = -v / 2.0;
      #(period_ns / real'(STEPS));
    end
  endtask
endmodule
