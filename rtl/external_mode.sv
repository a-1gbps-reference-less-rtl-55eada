// external_mode: DCO code source selection for characterising the oscillator.
//
// With en_cors high the DCO is driven from the externally applied code
// (ext_code); with en_cors low it takes the loop's own code (int_code).  This
// is the "External Mode" half of the control flow chart: a pure 2:1 selection
// of 10-bit codes, combinational, no latency.  The polarity of en_cors follows
// the flow chart (en_cors = 1 -> Ext_code).
module external_mode
  import cdr_pkg::*;
(
  input  logic  en_cors,   // 1: external code, 0: internal code
  input  code_t int_code,  // code from the loop (after MODE_SEL)
  input  code_t ext_code,  // code applied from outside the chip
  output code_t code       // code to DCO and lock detector
);
  timeunit 1ps; timeprecision 1fs;

  always_comb begin
    if (en_cors) code = ext_code;
    else         code = int_code;
  end

endmodule
