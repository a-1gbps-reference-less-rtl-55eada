// mode_select_tb: random codes on both loop outputs; MODE_SEL high must pass
// the data-loop code, MODE_SEL low the reference-loop code.
module mode_select_tb;
  timeunit 1ps; timeprecision 1fs;
  import cdr_pkg::*;

  logic  mode_sel;
  code_t data_code, ref_code, int_code;
  int checks = 0, failures = 0;

  mode_select dut (.*);

  initial begin
    for (int i = 0; i < 400; i++) begin
      mode_sel  = 1'($urandom);
      data_code = code_t'($urandom);
      ref_code  = code_t'($urandom);
      #1ns;
      checks++;
      if (int_code !== (mode_sel ? data_code : ref_code)) begin
        failures++;
        $display("FAIL: mode_sel=%0d data=%0d ref=%0d out=%0d", mode_sel, data_code, ref_code, int_code);
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
