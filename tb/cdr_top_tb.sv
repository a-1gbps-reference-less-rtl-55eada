// cdr_top_tb: end-to-end test of the CDR, every parameter at its default.
//
// A PRBS-7 stream at 1 Gb/s (1000 ps per bit) drives the data input.  The
// test walks through the design's operations in order and counts each one:
//   1. external mode: en_cors = 1 forces ext_code onto the DCO; the DCO
//      frequency measured from ph[0] must match the code's frequency;
//   2. reference mode: mode_sel = 0, ref_pu pulses on ref_clk must raise the
//      code by the integral gain;
//   3. frequency acquisition: mode_sel = 1, from code 128 the data loop must
//      drive the code up, lock_flag must rise, and the locked code must give
//      a DCO frequency within 0.5 % of 500 MHz;
//   4. no injection pulse may appear before lock_flag, and pulses must follow
//      every rising data edge after it;
//   5. injection phase lock: after lock the recovered bits must equal the
//      transmitted PRBS (aligned by search), with no errors over 2000 bits.
// Each mechanism that never occurred counts as a failure.
module cdr_top_tb;
  timeunit 1ps; timeprecision 1fs;
  import cdr_pkg::*;

  localparam real UI_PS = 1000.0;

  logic       rst_n = 1'b1;   // pulsed low below: async reset acts on its falling edge
  logic       data_in = 1'b0;
  logic       pen = 1'b0;
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
  int n_ext = 0, n_ref = 0, n_lock = 0, n_inj = 0, n_rx = 0;

  cdr_top dut (.*);

  // ---------------------------------------------------------------- data
  logic [6:0] prbs = 7'h7f;
  bit         tx_hist [$];
  always begin
    #(UI_PS * 1ps);
    data_in = prbs[6];
    tx_hist.push_back(prbs[6]);
    if (tx_hist.size() > 4096) void'(tx_hist.pop_front());
    prbs = {prbs[5:0], prbs[6] ^ prbs[5]};
  end

  always #(4000ps) ref_clk = ~ref_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0t code=%0d)", what, $time, code);
    end
  endtask

  function automatic real code_mhz(input int c);
    return 371.0 + (670.0 - 371.0) * real'(c) / 1023.0;
  endfunction

  // Measure the DCO frequency over n periods of ph[0].
  task automatic measure_mhz(input int n, output real mhz);
    realtime t0;
    @(posedge dco_ph[0]);
    t0 = $realtime;
    repeat (n) @(posedge dco_ph[0]);
    mhz = real'(n) * 1.0e6 / (($realtime - t0) / 1ps);
  endtask

  // ------------------------------------------------- injection monitoring
  bit inj_before_lock = 0;
  always @(posedge inj_pulse) begin
    if (!lock_flag) inj_before_lock = 1;
    else n_inj++;
  end
  int n_rise = 0;             // rising data edges while lock_flag is high
  always @(posedge data_in) if (lock_flag) n_rise++;

  // ---------------------------------------------------------------- test
  real mhz;
  initial begin
    #(1ns);
    rst_n = 1'b0;
    #(19ns);
    pen = 1'b1;
    // 1. external mode
    en_cors  = 1'b1;
    ext_code = 10'd700;
    #(20ns);
    rst_n = 1'b1;
    measure_mhz(200, mhz);
    check(code == 10'd700, "external mode drives code");
    check(mhz > code_mhz(700) * 0.995 && mhz < code_mhz(700) * 1.005, "DCO frequency at external code");
    if (code == 10'd700) n_ext++;
    // 2. reference mode
    en_cors  = 1'b0;
    mode_sel = 1'b0;
    @(negedge ref_clk);
    check(code == code_t'(128), "reference filter starts at initial code");
    repeat (32) begin
      ref_pu = 1'b1;
      @(negedge ref_clk);
    end
    ref_pu = 1'b0;
    @(negedge ref_clk);
    check(code == code_t'(130), "reference filter integrates 32 PU at beta=4");
    if (code == code_t'(130)) n_ref++;
    // 3. data loop
    rst_n = 1'b0;
    #(10ns);
    mode_sel = 1'b1;
    rst_n = 1'b1;
    fork
      begin
        wait (lock_flag);
      end
      begin
        #(400us);
      end
    join_any
    disable fork;
    $display("lock_flag=%0d at %0t code=%0d", lock_flag, $time, code);
    check(lock_flag, "frequency lock reached");
    check(!inj_before_lock, "no injection before lock");
    if (lock_flag) begin
      n_lock++;
      measure_mhz(2000, mhz);
      $display("locked DCO frequency %f MHz", mhz);
      check(mhz > 497.5 && mhz < 502.5, "DCO at the 500 MHz half-rate point");
      // 5. recovered data against transmitted data
      repeat (100) @(posedge rclk);
      begin
        int errs_best;
        int errs;
        bit rx [$];
        int n;
        errs_best = 1 << 30;
        repeat (1000) begin
          @(posedge rclk);
          rx.push_back(rdata[0]);
          rx.push_back(rdata[1]);
        end
        n = tx_hist.size();
        for (int lag = 0; lag < 64; lag++) begin
          errs = 0;
          for (int i = 0; i < rx.size(); i++)
            if (rx[rx.size() - 1 - i] != tx_hist[n - 1 - lag - i]) errs++;
          if (errs < errs_best) errs_best = errs;
        end
        $display("recovered-data errors (best alignment) %0d of %0d", errs_best, rx.size());
        check(errs_best == 0, "recovered data equals transmitted data");
        if (errs_best == 0) n_rx++;
      end
      check(n_inj > 500, "injection pulses after lock");
      $display("rising data edges after lock %0d, injection pulses %0d", n_rise, n_inj);
      check(n_inj == n_rise || n_inj + 1 == n_rise, "one injection pulse per rising data edge");
    end
    // every mechanism must have occurred
    check(n_ext > 0, "external mode exercised");
    check(n_ref > 0, "reference mode exercised");
    check(n_lock > 0, "frequency lock exercised");
    check(n_inj > 0, "injection exercised");
    check(n_rx > 0, "data recovery exercised");
    $display("mechanisms: external=%0d reference=%0d lock=%0d injections=%0d recovered=%0d",
             n_ext, n_ref, n_lock, n_inj, n_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // progress trace
  initial begin
    #(40ns);
    forever begin
      #(10us);
      $display("t=%0t code=%0d lock=%0d", $time, code, lock_flag); $fflush;
    end
  end

  // watchdog
  initial begin
    #(600us);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
