// End-to-end testbench of the demodulator at 2.5 Mb/s.
//
// Same stimulus and checks as the default-rate test (fsk_demod_e2e.svh), with
// the carrier set scaled to the highest data rate the design targets:
// f0 = 3.0 MHz, f1 = 2.1429 MHz (mean bit period 400 ns, i.e. 2.5 Mb/s for
// equally likely bits) and fN = (f0 + f1) / 2 = 2.5714 MHz. The timer is set
// for it: 100 uA into 10 pF (10 V/us), V2 and V3 at the centres of their
// windows, V1 and V4 outside the f0 and f1 half-periods by the same margins.
// Out-of-band cycles are 3.6 MHz and 1.8 MHz. Every data cycle must give
// exactly one recovered clock edge, so one bit per carrier cycle is checked.
module tb_fsk_demod_2m5;
  import fsk_pkg::*;
  timeunit 1ns; timeprecision 1ps;

  localparam real F0_HZ     = 3.0e6;
  localparam real FN_HZ     = 2.5714e6;
  localparam real F1_HZ     = 2.1429e6;
  localparam real FSHORT_HZ = 3.6e6;
  localparam real FLONG_HZ  = 1.8e6;
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

  tri_state_fsk_demod #(
    .IC_UA(100.0), .C_PF(10.0),
    .V1(1.5278), .V2(1.8056), .V3(2.1389), .V4(2.5278),
    .T_DISCHARGE_NS(5.0)
  ) dut (
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
