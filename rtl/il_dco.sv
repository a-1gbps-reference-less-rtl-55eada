// il_dco: behavioural model of the injection-locked ring DCO (not synthesizable).
//
// The real oscillator is a ring of four differential delay cells (inverter
// plus cross-coupled latch, 4:1 size ratio) giving eight phases 45 degrees
// apart.  Its frequency is set by a 10-bit coarse word CORS<9:0> through a
// PMOS-resistor DAC, PEN biases the ring on, and a switch driven by the
// injection pulse shorts the 45- and 225-degree nodes so that their crossing
// is pulled to the injection instant.
//
// The model:
//   * frequency is linear in the code between F_MIN_MHZ (code 0) and
//     F_MAX_MHZ (code 1023), the measured end points of the oscillator;
//   * ph[k] is a square wave delayed by k/8 of a period; an internal phase
//     index advances one step every period/8;
//   * an injection pulse pulls the 45-degree phase toward an edge (rising
//     or falling, whichever is nearer) at the pulse's rising edge.  The pull
//     is applied when the pulse ends and is limited to INJ_GAIN times the
//     pulse width, so a wide pulse corrects a large phase error at once
//     while a narrow one corrects it over several data edges.  This gives
//     the behaviour the design reports: the range of frequency offsets that
//     injection can hold grows with the pulse width.  The value of INJ_GAIN
//     is this model's choice.
//   * while pen is low the ring stands still.
// The period is sampled at the start of each step, so code changes take
// effect within one eighth of a period.
module il_dco #(
  parameter real F_MIN_MHZ = 371.0,   // frequency at CORS = 0
  parameter real F_MAX_MHZ = 670.0,   // frequency at CORS = 1023
  parameter real INJ_GAIN  = 0.5      // largest phase pull per pulse, in ps per ps of pulse width
) (
  input  logic       pen,    // bias enable
  input  logic [9:0] cors,   // coarse frequency code
  input  logic       inj,    // injection pulse (PGout)
  output logic [7:0] ph      // ph[k] at k*45 degrees
);
  timeunit 1ps; timeprecision 1fs;

  int unsigned idx;          // phase index 0..7: ph[k] high when (idx-k) mod 8 < 4
  realtime     t_step;       // time of the last step (or injection)
  real         step_ps;      // current period / 8
  int unsigned n_inj;        // injections so far
  realtime     t_due;        // time the free-running loop will next wake

  function automatic logic [7:0] phases(int unsigned i);
    logic [7:0] p;
    for (int k = 0; k < 8; k++) p[k] = (((i - k) & 7) < 4);
    return p;
  endfunction

  function automatic real step_of(logic [9:0] c);
    real f;
    f = F_MIN_MHZ + (F_MAX_MHZ - F_MIN_MHZ) * real'(c) / 1023.0;
    return 1.0e6 / f / 8.0;
  endfunction

  initial begin
    idx     = 0;
    n_inj   = 0;
    step_ps = step_of(cors);
    t_step  = 0;
    ph      = phases(0);
  end

  // Free-running ring: one phase step every period/8.  An injection in the
  // middle of a step moves t_step, and the wait is then redone from there.
  always begin
    int unsigned seen;
    realtime     due;
    if (!pen) begin
      @(posedge pen);
      t_step = $realtime;
    end
    step_ps = step_of(cors);
    seen    = n_inj;
    due     = t_step + step_ps * 1ps;
    t_due   = due;
    if (due > $realtime) #(due - $realtime);
    if (seen == n_inj) begin
      idx    = (idx + 1) & 7;
      t_step = $realtime;
      ph     = phases(idx);
    end
  end

  // Injection.  At the pulse's rising edge the ring's position is compared
  // with the nearer 45-degree edge (index 1 or 5); the error, in ps, is
  // positive when the ring is ahead.  When the pulse ends, the ring is
  // pulled back (or forward) by that error, but by no more than
  // INJ_GAIN * pulse width.  A forward pull can bring the next step ahead
  // of the time the free-running loop is sleeping to; such steps are made
  // here.
  always begin
    realtime t_r, t_f;
    real     pos, err, lim, corr, frac;
    @(posedge inj);
    t_r = $realtime;
    pos = real'(idx) + (t_r - t_step) / (step_ps * 1ps);
    err = pos - 1.0;                      // distance to index 1, mod 4 steps
    while (err > 2.0)   err = err - 4.0;
    while (err <= -2.0) err = err + 4.0;
    err = err * step_ps;
    @(negedge inj);
    t_f = $realtime;
    if (pen) begin
      lim  = INJ_GAIN * ((t_f - t_r) / 1ps);
      corr = (err > lim) ? lim : (err < -lim) ? -lim : err;
      pos  = real'(idx) + (t_f - t_step) / (step_ps * 1ps) - corr / step_ps;
      while (pos < 0.0)  pos = pos + 8.0;
      while (pos >= 8.0) pos = pos - 8.0;
      idx    = int'($floor(pos)) & 7;
      frac   = pos - $floor(pos);
      t_step = t_f - frac * step_ps * 1ps;
      n_inj  = n_inj + 1;
      ph     = phases(idx);
      while (t_step + step_ps * 1ps < t_due) begin
        #(t_step + step_ps * 1ps - $realtime);
        idx    = (idx + 1) & 7;
        t_step = $realtime;
        ph     = phases(idx);
      end
    end
  end

endmodule
