// bb_pfd: bang-bang frequency detector with 8-phase sampling of the data.
//
// The DCO provides eight clock phases ph[k] at k*45 degrees.  At the 1 Gb/s
// lock point the DCO runs at half the bit rate (half-rate sampling), so one
// DCO period spans two bits and the eight phases cut every bit into four
// quarters.  Each phase samples the data in its own flop; at every rising
// edge of ph[0] the eight samples of the previous DCO period are moved into
// one register, so everything after that runs in the ph[0] domain.
//
// A data transition shows up as two neighbouring samples that differ; the
// interval between them gives the transition's quarter q (0..3) within a
// bit period of the DCO.  If the DCO and the data have the same rate, q stays
// put from transition to transition.  If the DCO is fast, each data bit is
// longer than the DCO's bit period and q steps forward (+1); if it is slow, q
// steps back (-1).  Comparing every transition's quarter with the one before
// (at most one per half period, the last one found in it) gives a bang-bang
// frequency decision: +1 gives dn, -1 gives up, 0 and +-2 give nothing.
// Per ph[0] cycle the decisions are summed; up or dn is raised when one
// direction wins.
//
// The rotation rule aliases when the DCO is off by more than about half its
// rate: a bit then moves the transition by two quarters or more, and the
// direction is lost.  A second rule covers the slow side of that range (the
// reset code sits near the bottom of the range): a run of only one or two
// equal samples between two transitions means a bit much shorter than the
// DCO's bit period, so that period reports up whatever the rotation says.
// At the lock point a bit spans four samples, so the rule stays silent.
//
// The design names only the detector type ("bang-bang phase and frequency
// detector, half-rate sampling"); both rules are this implementation's
// choice.  Phase is not tracked here: injection locking aligns the DCO phase
// once the frequency is locked.
//
// The samples taken at 135 and 315 degrees sit in the middle of the bits when
// injection has aligned the 45/225-degree crossing with the data edges; they
// are brought out as the recovered data, rdata[0] the earlier bit.
//
// Timing: up/dn/rdata are registered in the ph[0] domain and describe the
// DCO period that ended one ph[0] edge earlier.  Reset: asynchronous, active
// low.
module bb_pfd (
  input  logic       rst_n,
  input  logic [7:0] ph,      // DCO phases, ph[k] at k*45 degrees
  input  logic       data,    // serial input data
  output logic       up,      // DCO slower than the data: raise the code
  output logic       dn,      // DCO faster than the data: lower the code
  output logic [1:0] rdata    // recovered bits (135 and 315 degree samples)
);
  timeunit 1ps; timeprecision 1fs;

  logic [7:0] smp;     // per-phase samples
  logic [7:0] win_q;   // samples of the last full DCO period
  logic [2:0] prev_q;  // 225..315-degree samples of the period before it
  logic [1:0] lastq_q; // quarter of the most recent transition
  logic       seen_q;  // lastq_q is valid

  // Sampling flops, one per phase.
  for (genvar k = 0; k < 8; k++) begin : g_smp
    logic s;
    always_ff @(posedge ph[k] or negedge rst_n)
      if (!rst_n) s <= 1'b0;
      else        s <= data;
    assign smp[k] = s;
  end

  // Quarter evaluation of one DCO period.
  logic [8:0]  seq;         // prev sample followed by the 8 new ones
  logic [10:0] ext;         // three previous samples followed by the 8 new ones
  logic        short_run;   // a run of one or two samples ends in this period
  logic       t_any [2];    // transition found in half h
  logic [1:0] t_q   [2];    // quarter of the last transition in half h
  logic [1:0] q_ref;
  logic       ref_ok;
  logic signed [2:0] score;
  logic [1:0] q_new;
  logic       seen_new;

  always_comb begin
    seq = {win_q, prev_q[2]};  // seq[i] is sample i-1, seq[0] the previous 315-degree one
    ext = {win_q, prev_q};

    // Runs of at most two samples (half a bit at the lock point) mean bits
    // much shorter than the DCO's: the DCO is far too slow.
    short_run = 1'b0;
    for (int k = 0; k + 2 <= 10; k++)
      if (k + 2 >= 3 && ext[k] != ext[k+1] && ext[k+1] != ext[k+2]) short_run = 1'b1;
    for (int k = 0; k + 3 <= 10; k++)
      if (k + 3 >= 3 && ext[k] != ext[k+1] && ext[k+1] == ext[k+2] && ext[k+2] != ext[k+3])
        short_run = 1'b1;
    for (int h = 0; h < 2; h++) begin
      t_any[h] = 1'b0;
      t_q[h]   = '0;
      for (int j = 0; j < 4; j++) begin
        if (seq[4*h + j] != seq[4*h + j + 1]) begin
          t_any[h] = 1'b1;
          t_q[h]   = 2'(j);
        end
      end
    end

    score  = '0;
    q_ref  = lastq_q;
    ref_ok = seen_q;
    for (int h = 0; h < 2; h++) begin
      if (t_any[h]) begin
        if (ref_ok) begin
          if (t_q[h] == q_ref + 2'd1)      score = score - 3'sd1;  // DCO fast
          else if (t_q[h] == q_ref - 2'd1) score = score + 3'sd1;  // DCO slow
        end
        q_ref  = t_q[h];
        ref_ok = 1'b1;
      end
    end
    q_new    = q_ref;
    seen_new = ref_ok;
  end

  always_ff @(posedge ph[0] or negedge rst_n) begin
    if (!rst_n) begin
      win_q   <= '0;
      prev_q  <= '0;
      lastq_q <= '0;
      seen_q  <= 1'b0;
      up      <= 1'b0;
      dn      <= 1'b0;
      rdata   <= '0;
    end else begin
      win_q   <= smp;
      prev_q  <= win_q[7:5];
      lastq_q <= q_new;
      seen_q  <= seen_new;
      up      <= short_run || (score > 0);
      dn      <= !short_run && (score < 0);
      rdata   <= {win_q[7], win_q[3]};
    end
  end

endmodule
