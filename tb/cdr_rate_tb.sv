// cdr_rate_tb: runs the complete CDR (default parameters) at several input
// data rates inside the oscillator's range, and with sinusoidal input jitter
// of 0.22 UI amplitude at 10 MHz at 1 Gb/s.
//
// Rates: 0.75, 0.90, 1.00, 1.10, 1.25 and 1.33 Gb/s, all acquired from the
// reset code 128 (about 408 MHz), then 1.00 Gb/s with jitter.
// For each case the CDR is reset to code 128 with a PRBS-7 stream at the
// case's bit rate.  Checks: lock_flag rises within 400 us; the locked DCO
// frequency is half the bit rate within 0.5 %; no injection pulse before
// lock; 2000 recovered bits equal the transmitted bits (best alignment).
module cdr_rate_tb;
  timeunit 1ps; timeprecision 1fs;
  import cdr_pkg::*;

  logic       rst_n = 1'b1;   // pulsed low below: async reset acts on its falling edge
  logic       data_in = 1'b0;
  logic       pen = 1'b1;
  logic       mode_sel = 1'b1;
  logic       en_cors = 1'b0;
  code_t      ext_code = '0;
  logic [3:0] alpha = 4'd0;
  logic [3:0] beta = 4'd4;
  logic [9:0] pulse_width_ps = 10'd56;
  logic       ref_clk = 1'b0;
  logic       ref_pu = 1'b0;
  logic       ref_dn = 1'b0;
  logic [7:0] dco_ph;
  logic       rclk, wclk, lock_flag, inj_pulse;
  logic [1:0] rdata;
  code_t      code;

  int checks = 0, failures = 0;

  cdr_top dut (.*);

  // data source: bit period ui_ps, optional sinusoidal jitter
  real  ui_ps = 1000.0;
  real  sj_ui = 0.0;        // jitter amplitude in UI
  real  sj_mhz = 10.0;
  logic [6:0] prbs = 7'h7f;
  bit   tx_hist [$];
  initial begin
    real t_ideal, t_edge, t_prev;
    t_ideal = 0.0;
    t_prev  = 0.0;
    forever begin
      t_ideal = t_ideal + ui_ps;
      t_edge  = t_ideal + sj_ui * ui_ps * $sin(2.0 * 3.14159265358979 * sj_mhz * 1.0e-6 * t_ideal);
      #((t_edge - t_prev) * 1ps);
      t_prev  = t_edge;
      data_in = prbs[6];
      tx_hist.push_back(prbs[6]);
      if (tx_hist.size() > 4096) void'(tx_hist.pop_front());
      prbs = {prbs[5:0], prbs[6] ^ prbs[5]};
    end
  end

  bit inj_before_lock = 0;
  always @(posedge inj_pulse) if (!lock_flag) inj_before_lock = 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t code=%0d)", what, $time, code);
    end
  endtask

  task automatic run_case(real gbps, real jitter_ui);
    realtime t0, t_rst;
    real mhz;
    int errs, best, n;
    bit rx [$];
    #1ns;
    rst_n = 1'b0;
    ui_ps = 1000.0 / gbps;
    sj_ui = jitter_ui;
    inj_before_lock = 0;
    #20ns;
    rst_n = 1'b1;
    t_rst = $realtime;
    while (!lock_flag && ($realtime - t_rst) < 400us) #1us;
    check(lock_flag, $sformatf("lock at %0.2f Gb/s", gbps));
    check(!inj_before_lock, "no injection before lock");
    if (lock_flag) begin
      @(posedge rclk);
      t0 = $realtime;
      repeat (2000) @(posedge rclk);
      mhz = 2000.0 * 1.0e6 / (($realtime - t0) / 1ps);
      $display("%0.2f Gb/s, jitter %0.2f UI: lock after %0.1f us, code %0d, DCO %0.2f MHz",
               gbps, jitter_ui, (t0 - t_rst) / 1us, code, mhz);
      check(mhz > gbps * 500.0 * 0.995 && mhz < gbps * 500.0 * 1.005,
            $sformatf("DCO at half rate for %0.2f Gb/s", gbps));
      repeat (1000) begin
        @(posedge rclk);
        rx.push_back(rdata[0]);
        rx.push_back(rdata[1]);
      end
      n = tx_hist.size();
      best = 1 << 30;
      for (int lag = 0; lag < 64; lag++) begin
        errs = 0;
        for (int i = 0; i < rx.size(); i++)
          if (rx[rx.size() - 1 - i] != tx_hist[n - 1 - lag - i]) errs++;
        if (errs < best) best = errs;
      end
      $display("  recovered-data errors %0d of %0d", best, rx.size());
      check(best == 0, $sformatf("recovered data at %0.2f Gb/s", gbps));
    end
  endtask

  initial begin
    run_case(0.75, 0.0);
    run_case(0.90, 0.0);
    run_case(1.00, 0.0);
    run_case(1.10, 0.0);
    run_case(1.25, 0.0);
    run_case(1.33, 0.0);
    run_case(1.00, 0.22);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
