// cdr_pkg: types and constants shared by the blocks of the reference-less
// injection-locked CDR.
//
// The DCO is steered by a 10-bit coarse code (CORS<9:0>), so every code path
// (loop filter, mode and external selection, lock detector) carries code_t.
// The frequency-locked loop passes one pump decision per deserialized word:
// pump_t encodes "raise the code" (PU), "lower it" (DN) or "hold".
package cdr_pkg;
  timeunit 1ps; timeprecision 1fs;

  // Width of the DCO coarse control word (CORS<9:0>).
  localparam int unsigned CODE_W   = 10;
  localparam int unsigned CODE_MAX = (1 << CODE_W) - 1;

  typedef logic [CODE_W-1:0] code_t;

  // Decision of the majority vote, consumed by the gain controller.
  typedef enum logic [1:0] {
    PUMP_HOLD = 2'b00,
    PUMP_UP   = 2'b01,   // DCO too slow: raise the code
    PUMP_DN   = 2'b10    // DCO too fast: lower the code
  } pump_t;

endpackage
