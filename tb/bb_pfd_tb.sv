// bb_pfd_tb: the detector sees a 1 Gb/s PRBS-7 stream and eight ideal clock
// phases generated here at a chosen frequency.
//   * 450 MHz (clock slow against the 500 MHz half-rate point): up decisions
//     must clearly outnumber dn decisions;
//   * 340 MHz (clock far too slow, beyond the rotation rule's range): up
//     must dominate through the short-run rule;
//   * 560 MHz (clock fast): dn must clearly outnumber up;
//   * 500 MHz, data edges 125 ps after ph[1]: the frequency matches, so at
//     most a handful of decisions may appear, and the recovered bits (135 and
//     315 degree samples) must reproduce the transmitted stream.
module bb_pfd_tb;
  timeunit 1ps; timeprecision 1fs;

  logic       rst_n = 1'b1;
  logic [7:0] ph = 8'h0f;
  logic       data = 1'b0;
  logic       up, dn;
  logic [1:0] rdata;
  int checks = 0, failures = 0;

  bb_pfd dut (.*);

  // async reset acts on its falling edge: pulse it low at the start
  initial #1ps rst_n = 1'b0;

  // ideal 8-phase clock; ph[k] high when (idx - k) mod 8 < 4
  real step_ps = 250.0;
  int  idx = 0;
  always begin
    #(step_ps * 1ps);
    idx = (idx + 1) & 7;
    for (int k = 0; k < 8; k++) ph[k] = (((idx - k) & 7) < 4);
  end

  // 1 Gb/s PRBS-7, edges at 125 ps + n * 1000 ps
  logic [6:0] prbs = 7'h5a;
  bit sent [$];
  initial begin
    #125ps;
    forever begin
      data = prbs[6];
      sent.push_back(prbs[6]);
      prbs = {prbs[5:0], prbs[6] ^ prbs[5]};
      #1000ps;
    end
  end

  int n_up, n_dn;
  bit rx [$];
  always @(posedge ph[0]) if (rst_n) begin
    #1ps;
    n_up += up;
    n_dn += dn;
    rx.push_back(rdata[0]);
    rx.push_back(rdata[1]);
  end

  task automatic run(real mhz, int cycles);
    step_ps = 1.0e6 / mhz / 8.0;
    repeat (20) @(posedge ph[0]);
    n_up = 0;
    n_dn = 0;
    rx.delete();
    repeat (cycles) @(posedge ph[0]);
    $display("%0.1f MHz: up=%0d dn=%0d", mhz, n_up, n_dn);
  endtask

  initial begin
    // start phase: ph[1] rises at 1000 ps -> data edges sit 125 ps after it
    #(750ps);
    rst_n = 1'b1;
    run(500.0, 4000);
    checks++;
    if (n_up + n_dn > 20) begin failures++; $display("FAIL: decisions at matched frequency"); end
    begin
      int best, errs, n;
      best = 1 << 30;
      n = sent.size();
      for (int lag = 0; lag < 32; lag++) begin
        errs = 0;
        for (int i = 0; i < rx.size() - 8; i++)
          if (rx[rx.size() - 1 - i] != sent[n - 1 - lag - i]) errs++;
        if (errs < best) best = errs;
      end
      checks++;
      if (best != 0) begin failures++; $display("FAIL: recovered data errors %0d", best); end
    end
    run(450.0, 8000);
    checks++;
    if (!(n_up > 500 && n_up > 4 * n_dn)) begin failures++; $display("FAIL: slow clock not detected"); end
    run(340.0, 8000);
    checks++;
    if (!(n_up > 2000 && n_up > 2 * n_dn)) begin failures++; $display("FAIL: far too slow clock not detected"); end
    run(560.0, 8000);
    checks++;
    if (!(n_dn > 500 && n_dn > 4 * n_up)) begin failures++; $display("FAIL: fast clock not detected"); end
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
