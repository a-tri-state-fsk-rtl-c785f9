// Tri-state FSK demodulator with its output shift register.
//
// The implant receives power and data over one inductive carrier. Every
// carrier cycle is one symbol: a cycle at f1 (slowest) is a logic 1, a cycle
// at f0 (fastest) a logic 0, and a cycle at the neutral frequency
// fN = (f0 + f1) / 2 means "do nothing". Because neutral cycles produce no
// clock edge, the external controller can hold the implant in its present
// state for any whole number of carrier cycles, which sets stimulation pulse
// timing to a resolution of one carrier period instead of one data frame.
//
// Signal chain:
//   tank voltage -> fsk_clock_recovery (comparator with hysteresis) -> CKin
//   CKin -> fsk_analog_timer: measures each low half-cycle, thermometer code
//   CKin + code -> fsk_digital_block: Data_Out, gated Clock_Out, Error_n
//   Data_Out + Clock_Out -> fsk_shift_register: bits taken on falling edges
//
// The clock recovery and the analog timer are behavioural models of analog
// circuits; the digital block and the shift register are synthesizable.
//
// Timing: the code of a cycle is sampled at the rising CKin edge that ends
// its low half; Data_Out and Error_n change there, and for a 0 or 1 the
// shift register takes the bit at the next falling CKin edge, i.e. at the
// start of the following carrier cycle. One bit per carrier cycle at most.
//
// The block structure, the thermometer coding, the truth table and the
// sampling edges follow the published design. The default references suit
// f0/fN/f1 = 250/215/180 kHz (the carrier set of the reported measurements);
// component values, the reset, the 20-bit register width and the frame and
// bit-count outputs are this implementation's choices.
module tri_state_fsk_demod
  import fsk_pkg::*;
#(
  parameter real         HYST_V         = 0.1,    // clock recovery hysteresis, V
  parameter real         IC_UA          = 10.0,   // timer charging current, uA
  parameter real         C_PF           = 10.0,   // timer capacitor, pF
  parameter real         V1             = 1.8372, // timer references, V
  parameter real         V2             = 2.1628,
  parameter real         V3             = 2.5517,
  parameter real         V4             = 3.0039,
  parameter real         T_DISCHARGE_NS = 20.0,   // capacitor reset time, ns
  parameter int unsigned FRAME_BITS     = 20      // shift register length
) (
  input  real                   tank_p,     // receiver LC tank, positive node
  input  real                   tank_n,     // receiver LC tank, negative node
  input  logic                  rst_n,      // asynchronous reset, active low
  output logic                  ck_in,      // squared-up carrier
  output therm_t                code,       // timer thermometer code {C4..C1}
  output logic                  data_out,   // demodulated data
  output logic                  clock_out,  // recovered clock, frozen high on fN/errors
  output logic                  error_n,    // low after an out-of-band or invalid cycle
  output symbol_e               symbol,     // meaning of the last cycle
  output logic [FRAME_BITS-1:0] frame,      // shift register contents, newest bit in 0
  output logic [31:0]           bit_count   // bits taken by the shift register
);

  timeunit 1ns; timeprecision 1ps;

  fsk_clock_recovery #(.HYST_V(HYST_V)) u_clock_recovery (
    .v_p   (tank_p),
    .v_n   (tank_n),
    .ck_in (ck_in)
  );

  fsk_analog_timer #(
    .IC_UA(IC_UA), .C_PF(C_PF), .V1(V1), .V2(V2), .V3(V3), .V4(V4),
    .T_DISCHARGE_NS(T_DISCHARGE_NS)
  ) u_analog_timer (
    .ck_in (ck_in),
    .code  (code)
  );

  fsk_digital_block u_digital_block (
    .ck_in     (ck_in),
    .rst_n     (rst_n),
    .code      (code),
    .data_out  (data_out),
    .clock_out (clock_out),
    .error_n   (error_n),
    .symbol    (symbol)
  );

  fsk_shift_register #(.WIDTH(FRAME_BITS)) u_shift_register (
    .clock_out (clock_out),
    .rst_n     (rst_n),
    .data_in   (data_out),
    .frame     (frame),
    .bit_count (bit_count)
  );

endmodule
