// cdr_lock_range_tb: injection lock range of the full CDR against the
// injection pulse width.
//
// The DCO is held at a fixed code through external mode (en_cors = 1), so
// the only thing that can keep it at the data rate is injection.  Data is a
// PRBS-7 stream at 1 Gb/s, so a locked DCO runs at exactly 500 MHz.  The
// lock detector sees a constant code and raises lock_flag, which enables the
// pulse generator.  For each pulse width (56, 112, 170 and 192 ps) the code
// is stepped outward from 441 (499.9 MHz free-running) in both directions,
// two codes per step.  At each code the test waits 5 us, then times 5000 DCO
// periods.  The code counts as locked if the mean frequency is 500 MHz within
// 0.02 MHz; one slip of half a period already moves the mean by 0.05 MHz.
// The lock range is the span of free-running frequencies, from the lowest to
// the highest locked code.
// Checks:
//   * code 441 locks at every width;
//   * the lock range never shrinks as the width grows;
//   * the 192 ps range is at least twice the 56 ps range;
//   * every range contains 500 MHz and the 56 ps range stays below
//     +-10 MHz, so lock comes from injection and not from a wide window.
module cdr_lock_range_tb;
  timeunit 1ps; timeprecision 1fs;
  import cdr_pkg::*;

  localparam real UI_PS = 1000.0;

  logic       rst_n = 1'b1;   // pulsed low below: async reset acts on its falling edge
  logic       data_in = 1'b0;
  logic       pen = 1'b0;
  logic       mode_sel = 1'b1;
  logic       en_cors = 1'b1;
  code_t      ext_code = 10'd441;
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

  logic [6:0] prbs = 7'h7f;
  always begin
    #(UI_PS * 1ps);
    data_in = prbs[6];
    prbs = {prbs[5:0], prbs[6] ^ prbs[5]};
  end

  always #(4000ps) ref_clk = ~ref_clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real code_mhz(input int c);
    return 371.0 + (670.0 - 371.0) * real'(c) / 1023.0;
  endfunction

  task automatic locked_at(input int c, output bit ok);
    realtime t0;
    real mhz;
    ext_code = 10'(c);
    #(5us);
    @(posedge dco_ph[0]);
    t0 = $realtime;
    repeat (5000) @(posedge dco_ph[0]);
    mhz = 5000.0 * 1.0e6 / (($realtime - t0) / 1ps);
    ok = (mhz > 499.98 && mhz < 500.02);
  endtask

  localparam int NW = 4;
  int  widths [NW] = '{56, 112, 170, 192};
  real lo_mhz [NW];
  real hi_mhz [NW];

  initial begin
    bit ok;
    int lo, hi;
    #(1ns);
    rst_n = 1'b0;
    #(19ns);
    pen = 1'b1;
    #(20ns);
    rst_n = 1'b1;
    wait (lock_flag);
    $display("lock_flag at %0t", $time);
    for (int w = 0; w < NW; w++) begin
      pulse_width_ps = 10'(widths[w]);
      locked_at(441, ok);
      check(ok, $sformatf("code 441 locks with %0d ps pulses", widths[w]));
      lo = 441;
      hi = 441;
      if (ok) begin
        for (int c = 443; c <= 1023; c += 2) begin
          locked_at(c, ok);
          if (!ok) break;
          hi = c;
        end
        for (int c = 439; c >= 0; c -= 2) begin
          locked_at(c, ok);
          if (!ok) break;
          lo = c;
        end
      end
      lo_mhz[w] = code_mhz(lo);
      hi_mhz[w] = code_mhz(hi);
      $display("width %0d ps: locked codes %0d..%0d, free-running %f..%f MHz, range %f MHz",
               widths[w], lo, hi, lo_mhz[w], hi_mhz[w], hi_mhz[w] - lo_mhz[w]);
      $fflush;
    end
    for (int w = 1; w < NW; w++)
      check(hi_mhz[w] - lo_mhz[w] >= hi_mhz[w-1] - lo_mhz[w-1],
            $sformatf("lock range at %0d ps not below %0d ps", widths[w], widths[w-1]));
    check(hi_mhz[NW-1] - lo_mhz[NW-1] >= 2.0 * (hi_mhz[0] - lo_mhz[0]),
          "192 ps range at least twice the 56 ps range");
    for (int w = 0; w < NW; w++)
      check(lo_mhz[w] <= 500.0 && hi_mhz[w] >= 500.0, $sformatf("%0d ps range holds 500 MHz", widths[w]));
    check(hi_mhz[0] - lo_mhz[0] < 20.0, "56 ps range below 20 MHz");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #(20ms);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
