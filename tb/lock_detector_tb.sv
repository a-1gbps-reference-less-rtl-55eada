// lock_detector_tb: drives whole 2048-sample windows of codes and checks
// that lock_flag rises exactly at the last sample of the first window whose
// spread (max - min) is at most 1, never earlier, and then stays high.
// Windows used: wide random codes, a spread of exactly 2, a spread of 1 with
// one outlier in the last sample, a spread of 1 (locks), then after a reset a constant 0
// and a constant 1023 (checks the initial max and min values).
module lock_detector_tb;
  timeunit 1ps; timeprecision 1fs;
  import cdr_pkg::*;

  localparam int N = 2048;

  logic  clk = 1'b0, rst_n = 1'b1;
  code_t code = '0;
  logic  lock_flag;
  int checks = 0, failures = 0;

  lock_detector dut (.*);

  // async reset acts on its falling edge: pulse it low at the start
  initial #1ps rst_n = 1'b0;

  always #4ns clk = ~clk;

  // kind: 0 wide random, 1 spread 2, 2 spread 1 with outlier, 3 spread 1,
  //       4 constant 0, 5 constant 1023
  task automatic window(int kind, bit expect_lock);
    for (int i = 0; i < N; i++) begin
      case (kind)
        0: code = code_t'($urandom);
        1: code = code_t'(500 + ((i == 7) ? 2 : $urandom_range(0, 2)));
        2: code = code_t'((i == N - 1) ? 503 : 500 + $urandom_range(0, 1));
        3: code = code_t'(700 + $urandom_range(0, 1));
        4: code = '0;
        default: code = code_t'(1023);
      endcase
      @(posedge clk);
      #1ns;
      checks++;
      if (lock_flag !== ((i == N - 1) ? expect_lock : 1'b0)) begin
        failures++;
        $display("FAIL: window kind %0d sample %0d lock=%0d", kind, i, lock_flag);
      end
    end
  endtask

  task automatic restart();
    @(negedge clk);
    rst_n = 1'b0;
    #1ns;
    rst_n = 1'b1;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    window(0, 1'b0);
    restart();
    window(1, 1'b0);
    restart();
    window(2, 1'b0);
    restart();
    window(3, 1'b1);
    // sticky
    repeat (3000) begin
      @(negedge clk);
      code = code_t'($urandom);
      checks++;
      if (lock_flag !== 1'b1) begin failures++; $display("FAIL: lock dropped"); end
    end
    @(negedge clk);
    rst_n = 1'b0;
    #1ns;
    checks++;
    if (lock_flag !== 1'b0) begin failures++; $display("FAIL: reset"); end
    rst_n = 1'b1;
    window(4, 1'b1);
    restart();
    window(5, 1'b1);
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
