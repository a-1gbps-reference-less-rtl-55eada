// gain_ctrl_dlf_tb: the accumulator is modelled here with plain integers
// (Ki = 2^beta / 2^8 codes, Kp = alpha codes, saturation at 0 and 1023) and
// compared with the block's code after every decision.  Covers the reset
// value (code 128), both saturation limits, hold, and random gains.
module gain_ctrl_dlf_tb;
  timeunit 1ps; timeprecision 1fs;
  import cdr_pkg::*;

  localparam int FRAC = 8;

  logic       clk = 1'b0, rst_n = 1'b1;
  pump_t      pump = PUMP_HOLD;
  logic [3:0] alpha = '0, beta = '0;
  code_t      code;
  int checks = 0, failures = 0;
  longint acc;
  int hit_top = 0, hit_bottom = 0;

  gain_ctrl_dlf dut (.*);

  // async reset acts on its falling edge: pulse it low at the start
  initial #1ps rst_n = 1'b0;

  always #4ns clk = ~clk;

  task automatic step(pump_t p, logic [3:0] a, logic [3:0] b);
    longint ki, c, amax;
    // called at a falling edge: apply, let one rising edge pass, check
    pump = p; alpha = a; beta = b;
    ki   = longint'(1) << b;
    amax = (longint'(1) << (CODE_W + FRAC)) - 1;
    if (p == PUMP_UP) acc += ki;
    if (p == PUMP_DN) acc -= ki;
    if (acc < 0) acc = 0;
    if (acc > amax) acc = amax;
    c = acc >>> FRAC;
    if (p == PUMP_UP) c += a;
    if (p == PUMP_DN) c -= a;
    if (c < 0) c = 0;
    if (c > 1023) c = 1023;
    if (c == 1023) hit_top++;
    if (c == 0) hit_bottom++;
    @(negedge clk);
    checks++;
    if (code !== code_t'(c)) begin
      failures++;
      $display("FAIL: pump=%s a=%0d b=%0d code=%0d expected %0d", p.name(), a, b, code, c);
    end
  endtask

  initial begin
    acc = longint'(128) << FRAC;
    repeat (2) @(negedge clk);
    checks++;
    if (code !== 10'd128) begin failures++; $display("FAIL: reset code %0d", code); end
    rst_n = 1'b1;
    // latency: an up applied now is visible after exactly one rising edge
    step(PUMP_HOLD, 0, 0);
    // integral only, small gain: 64 ups at beta=2 -> +1 code
    repeat (64) step(PUMP_UP, 0, 2);
    checks++;
    if (code !== 10'd129) begin failures++; $display("FAIL: 64 ups at beta 2 gave %0d", code); end
    // drive to the top and to the bottom
    repeat (300) step(PUMP_UP, 0, 12);
    repeat (700) step(PUMP_DN, 0, 12);
    repeat (20) step(PUMP_HOLD, 0, 5);
    // random pumps and gains, including a proportional part
    repeat (3000) begin
      int r;
      pump_t p;
      r = $urandom_range(0, 2);
      p = (r == 0) ? PUMP_UP : (r == 1) ? PUMP_DN : PUMP_HOLD;
      step(p, 4'($urandom_range(0, 3)), 4'($urandom_range(4, 11)));
    end
    checks++;
    if (hit_top == 0 || hit_bottom == 0) begin failures++; $display("FAIL: saturation not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
