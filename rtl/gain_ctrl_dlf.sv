// gain_ctrl_dlf: gain controller and digital loop filter of the frequency loop.
//
// The analog R + 1/sC filter of a charge-pump loop, mapped by the bilinear
// transform, becomes H(z) = Kp + Ki/(1 - z^-1).  Because injection locking
// takes care of the phase, the design keeps only the integral path: an
// accumulator that adds +Ki on PU and -Ki on DN.  The integral gain is set by
// beta as a power of two, Ki = 2^beta / 2^FRAC_W codes per decision, so the
// accumulator carries FRAC_W fraction bits below the 10-bit DCO code.  The
// proportional path of the general filter is kept as an option: alpha is Kp
// in whole codes and alpha = 0 (the intended setting) removes it.
//
// The accumulator saturates at 0 and at the top code instead of wrapping, and
// starts from INIT_CODE after reset (128, the initial code of the design).
// Power-of-two gains, the fraction width and saturation are this
// implementation's choices.
//
// Timing: one decision per clock; code is registered and reflects a pump
// input one clock later.  Reset is asynchronous, active low.
module gain_ctrl_dlf
  import cdr_pkg::*;
#(
  parameter int unsigned FRAC_W    = 8,    // fraction bits below the code
  parameter int unsigned GAIN_W    = 4,    // width of alpha and beta
  parameter int unsigned INIT_CODE = 128   // code after reset
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pump_t             pump,
  input  logic [GAIN_W-1:0] alpha,  // proportional gain Kp, whole codes (0 = off)
  input  logic [GAIN_W-1:0] beta,   // integral gain: Ki = 2^beta LSBs of the accumulator
  output code_t             code
);
  timeunit 1ps; timeprecision 1fs;

  localparam int unsigned ACC_W = CODE_W + FRAC_W;
  // One bit of headroom above and below for saturation arithmetic.
  localparam int unsigned EXT_W = ACC_W + 2 + (1 << GAIN_W);

  typedef logic signed [EXT_W-1:0] ext_t;

  localparam ext_t ACC_MAX  = ext_t'((1 << ACC_W) - 1);
  localparam ext_t CODE_TOP = ext_t'(CODE_MAX);

  logic [ACC_W-1:0] acc_q;
  ext_t             ki, acc_n, prop, code_n;

  always_comb begin
    ki = ext_t'(1) <<< beta;
    unique case (pump)
      PUMP_UP: acc_n = ext_t'(acc_q) + ki;
      PUMP_DN: acc_n = ext_t'(acc_q) - ki;
      default: acc_n = ext_t'(acc_q);
    endcase
    if (acc_n < 0)            acc_n = '0;
    else if (acc_n > ACC_MAX) acc_n = ACC_MAX;

    unique case (pump)
      PUMP_UP: prop =  ext_t'(alpha);
      PUMP_DN: prop = -ext_t'(alpha);
      default: prop = '0;
    endcase
    code_n = (acc_n >>> FRAC_W) + prop;
    if (code_n < 0)             code_n = '0;
    else if (code_n > CODE_TOP) code_n = CODE_TOP;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= ACC_W'(INIT_CODE) << FRAC_W;
      code  <= code_t'(INIT_CODE);
    end else begin
      acc_q <= acc_n[ACC_W-1:0];
      code  <= code_n[CODE_W-1:0];
    end
  end

endmodule
