// Behavioural model (not synthesizable logic) of the clock recovery stage.
//
// In silicon this is a cross-coupled differential pair across the receiver LC
// tank: a comparator with hysteresis that squares the sinusoidal carrier into
// the digital clock CKin. The model compares the differential tank voltage
// v_p - v_n with +/- HYST_V/2: CKin rises when the difference climbs above
// +HYST_V/2 and falls when it drops below -HYST_V/2, and keeps its level in
// between. CKin is therefore low during the negative half of each carrier
// cycle, which is the half-cycle the analog timer measures.
//
// The function follows the published design; the hysteresis width and the
// initial output level (low) are this model's choices.
module fsk_clock_recovery #(
  parameter real HYST_V = 0.1   // total hysteresis width, volts
) (
  input  real  v_p,    // tank voltage, positive terminal
  input  real  v_n,    // tank voltage, negative terminal
  output logic ck_in   // squared-up carrier
);

  timeunit 1ns; timeprecision 1ps;

  initial ck_in = 1'b0;

  // The output only moves when the input crosses a threshold; in between it
  // keeps the level it had, which is what the hysteresis is for.
  always @(v_p or v_n) begin
    if (v_p - v_n > HYST_V / 2.0)       ck_in <= 1'b1;
    else if (v_p - v_n < -HYST_V / 2.0) ck_in <= 1'b0;
  end

endmodule
