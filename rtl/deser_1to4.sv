// deser_1to4: 1:4 deserializer built from clock dividers and sampling flops.
//
// The serial stream din (one symbol per clk rising edge) is first split into
// even and odd symbols by sampling it on the rising edges of two
// complementary half-rate clocks (1/2 clock P and N): this is the 1:2 step.
// Each half-rate clock is divided by two again, giving four quarter-rate
// clocks (1/4 clock PP, PN from P; NP, NN from N).  Four flops then pick the
// symbols apart:
//   D0 <- even on 1/4 clock NP,   D1 <- odd on 1/4 clock PN,
//   D2 <- even on 1/4 clock NN,   D3 <- odd on 1/4 clock PP,
// so that D0..D3 hold four consecutive symbols, D0 the oldest.  Dividers,
// flops and their connections follow the design's deserializer diagram.
//
// D0..D3 change at four different instants; they hold one coherent word in
// the quarter-period after D3 is written, i.e. at the next rising edge of
// 1/4 clock NP.  A final register samples the word there (the "dotted line"
// sampling point of the timing diagram) and wclk = 1/4 clock NP is brought
// out for the logic that follows.  Symbols are WIDTH bits wide so that
// several bits travelling together (here the up/dn decisions of the
// detector) share one deserializer.
//
// Reset (asynchronous, active low) puts all dividers into a known state; the
// word alignment above depends on it.  Timing: word = {x[4k+3] .. x[4k]} is
// valid from the wclk edge 5 clk cycles after x[4k] was sampled.
module deser_1to4 #(
  parameter int unsigned WIDTH = 1
) (
  input  logic               clk,     // symbol-rate clock
  input  logic               rst_n,
  input  logic [WIDTH-1:0]   din,     // serial symbols
  output logic               wclk,    // quarter-rate word clock (1/4 clock NP)
  output logic [WIDTH-1:0]   word [4] // word[0] oldest symbol
);
  timeunit 1ps; timeprecision 1fs;

  logic half_p, half_n;          // 1/2 clock P and N
  logic qtr_pp, qtr_pn;          // 1/4 clocks from 1/2 clock P
  logic qtr_np, qtr_nn;          // 1/4 clocks from 1/2 clock N
  logic [WIDTH-1:0] d_even, d_odd;
  logic [WIDTH-1:0] d0, d1, d2, d3;

  // 1/2 divider on the symbol clock.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) half_p <= 1'b0;
    else        half_p <= ~half_p;
  assign half_n = ~half_p;

  // 1/2 dividers on each half-rate clock.
  always_ff @(posedge half_p or negedge rst_n)
    if (!rst_n) qtr_pp <= 1'b0;
    else        qtr_pp <= ~qtr_pp;
  assign qtr_pn = ~qtr_pp;

  always_ff @(posedge half_n or negedge rst_n)
    if (!rst_n) qtr_np <= 1'b0;
    else        qtr_np <= ~qtr_np;
  assign qtr_nn = ~qtr_np;

  // 1:2 step: even and odd symbols.
  always_ff @(posedge half_p or negedge rst_n)
    if (!rst_n) d_even <= '0;
    else        d_even <= din;

  always_ff @(posedge half_n or negedge rst_n)
    if (!rst_n) d_odd <= '0;
    else        d_odd <= din;

  // 2:4 step.
  always_ff @(posedge qtr_np or negedge rst_n)
    if (!rst_n) d0 <= '0;
    else        d0 <= d_even;

  always_ff @(posedge qtr_pn or negedge rst_n)
    if (!rst_n) d1 <= '0;
    else        d1 <= d_odd;

  always_ff @(posedge qtr_nn or negedge rst_n)
    if (!rst_n) d2 <= '0;
    else        d2 <= d_even;

  always_ff @(posedge qtr_pp or negedge rst_n)
    if (!rst_n) d3 <= '0;
    else        d3 <= d_odd;

  // Coherent-word sampling point.
  always_ff @(posedge qtr_np or negedge rst_n)
    if (!rst_n) word <= '{default: '0};
    else        word <= '{d0, d1, d2, d3};

  assign wclk = qtr_np;

endmodule
