// Shared types and constants of the tri-state FSK demodulator.
//
// The analog timer turns the duration of each low carrier half-cycle into a
// 4-bit thermometer code {C4,C3,C2,C1}: the longer the half-cycle, the more
// comparators have tripped. Three codes carry meaning (longest valid cycle =
// logic 1 at f1, middle = neutral at fN, shortest = logic 0 at f0); every
// other code, including "too short" (0000) and "too long" (1111), is an error.
// The code values follow the level labels of the protocol's timing diagram.
package fsk_pkg;

  timeunit 1ns; timeprecision 1ps;

  // Thermometer code, bit 0 = C1 (lowest reference V1), bit 3 = C4.
  typedef logic [3:0] therm_t;

  localparam therm_t CODE_TOO_SHORT = 4'b0000; // below V1: faster than the band
  localparam therm_t CODE_F0        = 4'b0001; // between V1 and V2: f0, logic 0
  localparam therm_t CODE_FN        = 4'b0011; // between V2 and V3: neutral fN
  localparam therm_t CODE_F1        = 4'b0111; // between V3 and V4: f1, logic 1
  localparam therm_t CODE_TOO_LONG  = 4'b1111; // above V4: slower than the band

  // What one received carrier cycle means.
  typedef enum logic [1:0] {
    SYM_ZERO    = 2'd0,  // f0: data 0, output clock enabled
    SYM_ONE     = 2'd1,  // f1: data 1, output clock enabled
    SYM_NEUTRAL = 2'd2,  // fN: hold, output clock frozen high
    SYM_ERROR   = 2'd3   // any other code: hold, clock frozen, error flagged
  } symbol_e;

  // Decode of one sampled thermometer code.
  function automatic symbol_e decode_code(therm_t code);
    case (code)
      CODE_F0:        decode_code = SYM_ZERO;
      CODE_F1:        decode_code = SYM_ONE;
      CODE_FN:        decode_code = SYM_NEUTRAL;
      CODE_TOO_SHORT,
      CODE_TOO_LONG:  decode_code = SYM_ERROR;  // outside the band
      default:        decode_code = SYM_ERROR;  // not a thermometer code
    endcase
  endfunction

endpackage
