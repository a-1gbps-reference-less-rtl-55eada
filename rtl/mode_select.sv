// mode_select: chooses which frequency loop drives the DCO.
//
// MODE_SEL = 1 selects the internal code, i.e. the output of the
// data-driven loop (detector, deserializer, vote, gain controller and
// filter).  MODE_SEL = 0 selects the reference code produced by the
// reference-clock FLL used as a test mode.  The selected value is Int_code,
// which then goes to the external-mode selection.  Combinational, no latency.
module mode_select
  import cdr_pkg::*;
(
  input  logic  mode_sel,   // 1: internal (data) loop, 0: reference loop
  input  code_t data_code,  // code of the data-driven loop filter
  input  code_t ref_code,   // code of the reference-clock loop filter
  output code_t int_code
);
  timeunit 1ps; timeprecision 1fs;

  always_comb begin
    if (mode_sel) int_code = data_code;
    else          int_code = ref_code;
  end

endmodule
