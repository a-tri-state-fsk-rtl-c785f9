// End-to-end testbench of the demodulator at its default parameters.
//
// A behavioural transmitter sends random 20-bit frames as a sinusoidal
// carrier with f0/fN/f1 = 250/215/180 kHz, interleaved with neutral runs and
// out-of-band cycles at 330 kHz (too short) and 150 kHz (too long). The
// checks are in fsk_demod_e2e.svh.
module tb_tri_state_fsk_demod;
  import fsk_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam real F0_HZ     = 250.0e3;
  localparam real FN_HZ     = 215.0e3;
  localparam real F1_HZ     = 180.0e3;
  localparam real FSHORT_HZ = 330.0e3;
  localparam real FLONG_HZ  = 150.0e3;
  localparam int  NFRAMES   = 40;
  localparam int  FRAME_BITS = 20;

  real          tank_p, tank_n;
  logic         rst_n = 1'b1;
  logic         ck_in, data_out, clock_out, error_n;
  therm_t       code;
  symbol_e      symbol;
  logic [19:0]  frame;
  logic [31:0]  bit_count;

  fsk_carrier_source src (.v_p(tank_p), .v_n(tank_n));

  tri_state_fsk_demod dut (
    .tank_p, .tank_n, .rst_n, .ck_in, .code, .data_out, .clock_out,
    .error_n, .symbol, .frame, .bit_count
  );

  `include "fsk_demod_e2e.svh"

  // Watchdog: far more than the longest possible stream of the slowest cycles.
  initial begin : watchdog
    #(1.0e9 / FLONG_HZ * real'(NFRAMES * FRAME_BITS * 8 + 200));
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
