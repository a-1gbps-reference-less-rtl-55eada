// deser_1to4_tb: a random 2-bit symbol stream, one symbol per clk rising
// edge, through the 1:4 deserializer.  The testbench records the symbols
// itself and expects the k-th word (k = 0, 1, ...) after the first data word
// to hold symbols 4k..4k+3 with word[0] the oldest.  It also checks the
// word-clock period (four clk periods) and the alignment after reset: the
// first word holding data appears 5 clk edges after the first symbol edge.
module deser_1to4_tb;
  timeunit 1ps; timeprecision 1fs;

  localparam int W = 2;

  logic         clk = 1'b0, rst_n = 1'b1;
  logic [W-1:0] din = '0;
  logic         wclk;
  logic [W-1:0] word [4];
  int checks = 0, failures = 0;

  deser_1to4 #(.WIDTH(W)) dut (.*);

  // async reset acts on its falling edge: pulse it low at the start
  initial #1ps rst_n = 1'b0;

  always #1ns clk = ~clk;   // 500 MHz symbol clock

  logic [W-1:0] sent [$];   // symbol presented at each clk edge after reset
  int n_clk = 0;

  // New symbol just after every rising edge; the edge itself samples the old one.
  always @(posedge clk) if (rst_n) begin
    sent.push_back(din);
    n_clk++;
    #100ps din = W'($urandom);
  end

  int     n_word = 0;
  realtime t_last = 0;
  always @(posedge wclk) if (rst_n) begin
    #10ps;
    n_word++;
    if (n_word > 1) begin
      checks++;
      if (($realtime - t_last) < 7999ps || ($realtime - t_last) > 8001ps) begin
        failures++;
        $display("FAIL: word clock period %0t", $realtime - t_last);
      end
    end
    t_last = $realtime;
    if (n_word == 2) begin
      checks++;
      if (n_clk != 6) begin   // edges 0..5: the 6th edge is t=5
        failures++;
        $display("FAIL: first data word after %0d clk edges", n_clk);
      end
    end
    if (n_word >= 2) begin
      int base;
      base = 4 * (n_word - 2);
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (word[j] !== sent[base + j]) begin
          failures++;
          $display("FAIL: word %0d lane %0d = %0d expected %0d", n_word, j, word[j], sent[base + j]);
        end
      end
    end
  end

  initial begin
    din = W'($urandom);
    #5500ps rst_n = 1'b1;   // released between edges
    #20us;
    checks++;
    if (n_word < 2000) begin failures++; $display("FAIL: only %0d words", n_word); end
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
