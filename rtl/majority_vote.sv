// majority_vote: turns four deserialized detector decisions into one pump
// command for the loop filter.
//
// Each deserialized word carries four (up, dn) pairs from the bang-bang
// frequency detector.  The block counts the up and the dn decisions of the
// word and issues PUMP_UP when ups outnumber dns, PUMP_DN when dns outnumber
// ups and PUMP_HOLD on a tie (including a word with no decision at all).  The
// design names the block and its PU/DN outputs; counting and comparing is the
// simplest majority rule and is this implementation's choice.
//
// Timing: one word per clock (the 1/4-rate word clock); the pump output is
// registered, one cycle after the word.  Reset is asynchronous, active low.
module majority_vote
  import cdr_pkg::*;
#(
  parameter int unsigned N = 4   // decisions per word (1:4 deserializer)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] up,     // per-lane "DCO too slow" decisions
  input  logic [N-1:0] dn,     // per-lane "DCO too fast" decisions
  output pump_t        pump
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] n_up, n_dn;
  pump_t         pump_n;

  always_comb begin
    n_up = '0;
    n_dn = '0;
    for (int i = 0; i < N; i++) begin
      n_up = n_up + CW'(up[i]);
      n_dn = n_dn + CW'(dn[i]);
    end
    if (n_up > n_dn)      pump_n = PUMP_UP;
    else if (n_dn > n_up) pump_n = PUMP_DN;
    else                  pump_n = PUMP_HOLD;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pump <= PUMP_HOLD;
    else        pump <= pump_n;
  end

endmodule
