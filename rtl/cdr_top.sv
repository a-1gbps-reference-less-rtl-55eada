// cdr_top: reference-less 1 Gb/s clock and data recovery with an
// injection-locked DCO.
//
// Two mechanisms share one ring oscillator:
//   * A digital frequency-locked loop (FLL).  A bang-bang frequency detector
//     samples the data with the eight DCO phases (half-rate: the DCO runs at
//     500 MHz for 1 Gb/s) and emits up/dn decisions once per DCO period.  A
//     1:4 deserializer groups four decisions into a word at 125 MHz, a
//     majority vote turns each word into one PU/DN command, and the gain
//     controller / integral-only digital loop filter accumulates those into
//     the 10-bit DCO code.
//   * An injection phase lock.  When the lock detector sees the code stay
//     within +-1 for 2048 word clocks it raises lock_flag; from then on the
//     pulse generator fires a short pulse at every rising data edge, and the
//     pulse pulls the DCO's 45/225-degree crossing to the data edge.  No
//     phase loop filter is needed.
//
// Test features of the design: mode_sel = 0 lets a second gain controller /
// filter, fed by PU/DN decisions of a reference-clock FLL (ref_pu/ref_dn,
// clocked by ref_clk), drive the DCO instead of the data loop; en_cors = 1
// drives the DCO from ext_code directly.  The lock detector watches the
// code that actually reaches the DCO.
//
// The DCO and the pulse generator are behavioural models (delays, real
// numbers); everything else is synthesizable.  Recovered clock: ph[0] of the
// DCO (rclk); recovered data: rdata, two bits per rclk period, rdata[0] the
// earlier one.
module cdr_top
  import cdr_pkg::*;
#(
  parameter int unsigned LOCK_SAMPLES = 2048, // lock detector window
  parameter int unsigned LOCK_TOL     = 1,    // max-min spread accepted as lock
  parameter int unsigned FRAC_W       = 8,    // loop filter fraction bits
  parameter int unsigned INIT_CODE    = 128   // DCO code after reset
) (
  input  logic       rst_n,
  input  logic       data_in,     // serial data, nominally 1 Gb/s
  input  logic       pen,         // DCO bias enable
  // loop controls
  input  logic       mode_sel,    // 1: data loop, 0: reference loop
  input  logic       en_cors,     // 1: DCO code from ext_code
  input  code_t      ext_code,
  input  logic [3:0] alpha,       // proportional gain (0 = integral-only filter)
  input  logic [3:0] beta,        // integral gain exponent
  input  logic [9:0] pulse_width_ps, // injection pulse width (INP/INN setting)
  // reference-clock FLL decisions (test mode)
  input  logic       ref_clk,
  input  logic       ref_pu,
  input  logic       ref_dn,
  // outputs
  output logic [7:0] dco_ph,      // eight DCO phases
  output logic       rclk,        // recovered clock (DCO 0 degrees)
  output logic [1:0] rdata,       // recovered data, two bits per rclk period
  output logic       wclk,        // quarter-rate word clock of the FLL logic
  output code_t      code,        // code applied to the DCO
  output logic       lock_flag,   // frequency lock reached, injection on
  output logic       inj_pulse    // injection pulse
);
  timeunit 1ps; timeprecision 1fs;

  logic       fd_up, fd_dn;
  logic [1:0] des_word [4];
  logic [3:0] w_up, w_dn;
  pump_t      pump_data, pump_ref;
  code_t      data_code, ref_code, int_code;

  il_dco u_dco (
    .pen  (pen),
    .cors (code),
    .inj  (inj_pulse),
    .ph   (dco_ph)
  );

  bb_pfd u_fd (
    .rst_n (rst_n),
    .ph    (dco_ph),
    .data  (data_in),
    .up    (fd_up),
    .dn    (fd_dn),
    .rdata (rdata)
  );

  deser_1to4 #(.WIDTH(2)) u_des (
    .clk   (dco_ph[0]),
    .rst_n (rst_n),
    .din   ({fd_up, fd_dn}),
    .wclk  (wclk),
    .word  (des_word)
  );

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      w_up[i] = des_word[i][1];
      w_dn[i] = des_word[i][0];
    end
  end

  majority_vote #(.N(4)) u_vote (
    .clk   (wclk),
    .rst_n (rst_n),
    .up    (w_up),
    .dn    (w_dn),
    .pump  (pump_data)
  );

  gain_ctrl_dlf #(.FRAC_W(FRAC_W), .INIT_CODE(INIT_CODE)) u_dlf (
    .clk   (wclk),
    .rst_n (rst_n),
    .pump  (pump_data),
    .alpha (alpha),
    .beta  (beta),
    .code  (data_code)
  );

  // Reference-clock loop of the test mode: same gain controller and filter.
  always_comb begin
    if (ref_pu && !ref_dn)      pump_ref = PUMP_UP;
    else if (ref_dn && !ref_pu) pump_ref = PUMP_DN;
    else                        pump_ref = PUMP_HOLD;
  end

  gain_ctrl_dlf #(.FRAC_W(FRAC_W), .INIT_CODE(INIT_CODE)) u_dlf_ref (
    .clk   (ref_clk),
    .rst_n (rst_n),
    .pump  (pump_ref),
    .alpha (alpha),
    .beta  (beta),
    .code  (ref_code)
  );

  mode_select u_mode (
    .mode_sel  (mode_sel),
    .data_code (data_code),
    .ref_code  (ref_code),
    .int_code  (int_code)
  );

  external_mode u_ext (
    .en_cors  (en_cors),
    .int_code (int_code),
    .ext_code (ext_code),
    .code     (code)
  );

  lock_detector #(.N_SAMPLES(LOCK_SAMPLES), .LOCK_TOL(LOCK_TOL)) u_lock (
    .clk       (wclk),
    .rst_n     (rst_n),
    .code      (code),
    .lock_flag (lock_flag)
  );

  pulse_generator u_pg (
    .din      (data_in),
    .en       (lock_flag),
    .width_ps (pulse_width_ps),
    .pgout    (inj_pulse)
  );

  assign rclk = dco_ph[0];

endmodule
