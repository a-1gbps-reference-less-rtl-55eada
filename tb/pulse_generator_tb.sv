// pulse_generator_tb: random data with en low (no pulse allowed), then en
// high with widths 56, 112, 170 and 192 ps.  Every rising data edge must
// start a pulse at that instant whose width equals width_ps; falling edges
// must start nothing.
module pulse_generator_tb;
  timeunit 1ps; timeprecision 1fs;

  logic       din = 1'b0, en = 1'b0;
  logic [9:0] width_ps = 10'd56;
  logic       pgout;
  int checks = 0, failures = 0;

  pulse_generator dut (.*);

  int      n_pulse = 0;
  realtime t_rise_din = -1.0, t_rise_pg;
  always @(posedge din) t_rise_din = $realtime;
  always @(posedge pgout) begin
    n_pulse++;
    t_rise_pg = $realtime;
    checks++;
    if (!en || t_rise_pg != t_rise_din) begin
      failures++;
      $display("FAIL: pulse at %0t not at a rising data edge with en", $realtime);
    end
  end
  always @(negedge pgout) if (n_pulse > 0) begin
    real w;
    w = ($realtime - t_rise_pg) / 1ps;
    checks++;
    if (w < real'(width_ps) - 0.01 || w > real'(width_ps) + 0.01) begin
      failures++;
      $display("FAIL: width %f ps expected %0d", w, width_ps);
    end
  end

  task automatic bits(int n);
    repeat (n) begin
      #1000ps din = 1'($urandom);
    end
  endtask

  initial begin
    int rises;
    bits(200);
    checks++;
    if (n_pulse != 0) begin failures++; $display("FAIL: pulses without enable"); end
    #100ps en = 1'b1;
    for (int w = 0; w < 4; w++) begin
      int n0;
      width_ps = (w == 0) ? 10'd56 : (w == 1) ? 10'd112 : (w == 2) ? 10'd170 : 10'd192;
      n0 = n_pulse;
      rises = 0;
      repeat (300) begin
        logic nb;
        nb = 1'($urandom);
        if (!din && nb) rises++;
        #1000ps din = nb;
      end
      #1ns;
      checks++;
      if (n_pulse - n0 != rises) begin
        failures++;
        $display("FAIL: %0d pulses for %0d rising edges (width %0d)", n_pulse - n0, rises, width_ps);
      end
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
