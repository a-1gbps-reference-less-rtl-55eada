// il_dco_tb: checks the oscillator model against the figures it is built
// from.
//   * Frequency at codes 0, 323, 441, 1023 measured over 500 periods of ph[0]
//     must equal 371 + 299 * code / 1023 MHz within 0.1 %.
//   * The eight phases must be spaced by one eighth of the period, ph[k]
//     rising after ph[k-1].
//   * pen low stops the ring.
//   * An injection pulse must pull the 45-degree node toward the pulse's
//     rising edge by the phase error, limited to INJ_GAIN times the pulse
//     width: after the pulse, the ph[1] edges must sit on the old edge grid
//     shifted by that amount.  Wide pulses (1100 ps) must align ph[1] exactly
//     with the rising edge; narrow ones (55 ps) only by up to 27.5 ps.
module il_dco_tb;
  timeunit 1ps; timeprecision 1fs;

  logic       pen = 1'b0;
  logic [9:0] cors = '0;
  logic       inj = 1'b0;
  logic [7:0] ph;
  int checks = 0, failures = 0;

  localparam real G = 0.5;
  realtime t_edge1 = 0;      // last ph[1] edge

  il_dco #(.INJ_GAIN(G)) dut (.*);

  always @(posedge ph[1] or negedge ph[1]) t_edge1 = $realtime;


  task automatic check_freq(int c);
    realtime t0;
    real mhz, expect_mhz;
    cors = 10'(c);
    repeat (3) @(posedge ph[0]);
    t0 = $realtime;
    repeat (500) @(posedge ph[0]);
    mhz = 500.0 * 1.0e6 / (($realtime - t0) / 1ps);
    expect_mhz = 371.0 + 299.0 * real'(c) / 1023.0;
    checks++;
    if (mhz < expect_mhz * 0.999 || mhz > expect_mhz * 1.001) begin
      failures++;
      $display("FAIL: code %0d gives %f MHz, expected %f", c, mhz, expect_mhz);
    end
  endtask

  initial begin
    realtime tr [8];
    real period;
    #10ns;
    checks++;
    if (ph !== 8'he1) begin failures++; $display("FAIL: ring ran without pen"); end
    pen = 1'b1;
    check_freq(0);
    check_freq(323);
    check_freq(441);
    check_freq(1023);
    // phase order at code 441
    cors = 10'd441;
    repeat (3) @(posedge ph[0]);
    tr[0] = $realtime;
    for (int k = 1; k < 8; k++) begin
      @(posedge ph[k]);
      tr[k] = $realtime;
    end
    period = 1.0e6 / (371.0 + 299.0 * 441.0 / 1023.0);
    for (int k = 1; k < 8; k++) begin
      checks++;
      if ((tr[k] - tr[k-1]) / 1ps < period / 8.0 - 0.5 || (tr[k] - tr[k-1]) / 1ps > period / 8.0 + 0.5) begin
        failures++;
        $display("FAIL: phase %0d spacing %f ps", k, (tr[k] - tr[k-1]) / 1ps);
      end
    end
    // injection at random points of the cycle, wide then narrow pulses
    for (int n = 0; n < 100; n++) begin
      realtime tr_i, tl, te;
      real w, d, err, corr, rem;
      w = (n < 50) ? 1100.0 : 55.0;
      @(posedge ph[0]);
      #($urandom_range(0, 2000) * 1ps);
      inj = 1'b1;
      tr_i = $realtime;
      tl = t_edge1;
      #(w * 1ps) inj = 1'b0;
      d = (tr_i - tl) / 1ps;
      err = (d < period / 4.0) ? d : d - period / 2.0;
      corr = (err > G * w) ? G * w : (err < -G * w) ? -G * w : err;
      #1ps;
      @(posedge ph[1] or negedge ph[1]);
      te = $realtime;
      rem = ((te - tl) / 1ps) - corr;
      while (rem > period / 4.0) rem = rem - period / 2.0;
      while (rem < -period / 4.0) rem = rem + period / 2.0;
      checks++;
      if (rem < -0.5 || rem > 0.5) begin
        failures++;
        $display("FAIL: %0.0f ps pulse at %0t, error %f ps: ph[1] edge %f ps off the expected grid",
                 w, tr_i, err, rem);
      end
    end
    // pen low stops it
    pen = 1'b0;
    #5ns;
    begin
      logic [7:0] frozen;
      frozen = ph;
      #20ns;
      checks++;
      if (ph !== frozen) begin failures++; $display("FAIL: ring did not stop"); end
    end
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
