// lock_detector: decides that the frequency-locked loop has settled.
//
// Over a window of N_SAMPLES consecutive clock cycles the block keeps the
// largest (max) and smallest (min) DCO code seen.  The registers start the
// window at max = 0 and min = all-ones (1023 for 10 bits).  After the last
// sample of a window it compares max - min with LOCK_TOL: if the spread is
// within the tolerance, lock_flag goes high and stays high until reset; if not,
// max, min and the sample counter are re-initialised and a new window starts.
// This is the flow chart of the design (2048 samples, Max-Min <= 1, sticky
// Lock_flag = 1 as its end state).  One sample is taken per clock; with the
// deserialized word clock of 125 MHz a window lasts 16.4 us.
//
// Timing: lock_flag rises on the clock edge that takes the N_SAMPLES-th sample
// of a window whose spread qualifies.  Reset is asynchronous, active low.
module lock_detector
  import cdr_pkg::*;
#(
  parameter int unsigned N_SAMPLES = 2048,  // samples per window
  parameter int unsigned LOCK_TOL  = 1      // largest max-min that counts as locked
) (
  input  logic  clk,
  input  logic  rst_n,
  input  code_t code,       // DCO code being watched
  output logic  lock_flag   // frequency lock: enables injection
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned CNT_W = $clog2(N_SAMPLES + 1);

  code_t             max_q, min_q;
  code_t             max_n, min_n;
  logic [CNT_W-1:0]  cnt_q;       // samples taken in this window
  logic              last;

  always_comb begin
    max_n = (code > max_q) ? code : max_q;
    min_n = (code < min_q) ? code : min_q;
    last  = (cnt_q == CNT_W'(N_SAMPLES - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max_q     <= '0;
      min_q     <= code_t'(CODE_MAX);
      cnt_q     <= '0;
      lock_flag <= 1'b0;
    end else if (!lock_flag) begin
      if (last) begin
        if ((max_n - min_n) <= code_t'(LOCK_TOL)) lock_flag <= 1'b1;
        max_q <= '0;
        min_q <= code_t'(CODE_MAX);
        cnt_q <= '0;
      end else begin
        max_q <= max_n;
        min_q <= min_n;
        cnt_q <= cnt_q + 1'b1;
      end
    end
  end

endmodule
