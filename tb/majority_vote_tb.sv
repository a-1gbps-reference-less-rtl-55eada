// majority_vote_tb: all 256 combinations of four up and four dn decisions,
// then random words.  The expected pump is computed here by counting bits;
// the output must appear exactly one clock after the word.
module majority_vote_tb;
  timeunit 1ps; timeprecision 1fs;
  import cdr_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b1;
  logic [3:0] up = '0, dn = '0;
  pump_t      pump;
  int checks = 0, failures = 0;

  majority_vote dut (.*);

  // async reset acts on its falling edge: pulse it low at the start
  initial #1ps rst_n = 1'b0;

  always #4ns clk = ~clk;

  function automatic pump_t ref_pump(logic [3:0] u, logic [3:0] d);
    int nu, nd;
    nu = u[0] + u[1] + u[2] + u[3];
    nd = d[0] + d[1] + d[2] + d[3];
    if (nu > nd) return PUMP_UP;
    if (nd > nu) return PUMP_DN;
    return PUMP_HOLD;
  endfunction

  task automatic apply(logic [3:0] u, logic [3:0] d);
    pump_t exp_p;
    @(negedge clk);
    up = u;
    dn = d;
    exp_p = ref_pump(u, d);
    @(negedge clk);
    checks++;
    if (pump !== exp_p) begin
      failures++;
      $display("FAIL: up=%b dn=%b pump=%s expected %s", u, d, pump.name(), exp_p.name());
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (pump !== PUMP_HOLD) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 256; i++) apply(4'(i), 4'(i >> 4));
    repeat (200) apply(4'($urandom), 4'($urandom));
    // latency: a word applied right after an edge is seen at the next edge
    @(negedge clk);
    up = 4'b1111; dn = 4'b0000;
    @(posedge clk); #1ps;
    checks++;
    if (pump !== PUMP_UP) begin failures++; $display("FAIL: latency"); end
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
