// external_mode_tb: random codes on both inputs; with en_cors high the output
// must be ext_code, with en_cors low int_code.
module external_mode_tb;
  timeunit 1ps; timeprecision 1fs;
  import cdr_pkg::*;

  logic  en_cors;
  code_t int_code, ext_code, code;
  int checks = 0, failures = 0;

  external_mode dut (.*);

  initial begin
    for (int i = 0; i < 400; i++) begin
      en_cors  = 1'($urandom);
      int_code = code_t'($urandom);
      ext_code = code_t'($urandom);
      #1ns;
      checks++;
      if (code !== (en_cors ? ext_code : int_code)) begin
        failures++;
        $display("FAIL: en_cors=%0d int=%0d ext=%0d code=%0d", en_cors, int_code, ext_code, code);
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
