// pulse_generator: behavioural model of the injection pulse generator (not
// synthesizable).
//
// In silicon the data drives a current-starved inverter whose pull-up and
// pull-down strengths are set by the differential control voltages INP and
// INN; the slowed, inverted data Dinv is combined with the data so that a
// short pulse PGout appears at every rising data edge, its width equal to the
// inverter delay.  Raising INP above 0 V or lowering INN below 1.8 V widens the
// pulse.  The model takes the resulting width directly, in picoseconds, on
// width_ps (stand-in for INP/INN and the pulse width controller), and gates
// the pulses with the frequency lock flag: before frequency lock no pulse is
// produced.
//
// Timing: pgout rises at the rising edge of din (when en is high) and falls
// width_ps later.  A rising edge during a pulse is ignored.  Being a timed
// model, pgout is held between events; a synthesis tool reading it infers a
// latch, which is expected for this file.
module pulse_generator (
  input  logic       din,       // input data
  input  logic       en,        // frequency lock flag
  input  logic [9:0] width_ps,  // pulse width in ps (from INP/INN)
  output logic       pgout      // injection pulse
);
  timeunit 1ps; timeprecision 1fs;

  initial pgout = 1'b0;

  always begin
    @(posedge din);
    if (en && width_ps != 0) begin
      pgout = 1'b1;
      #(real'(width_ps) * 1ps);
      pgout = 1'b0;
    end
  end

endmodule
