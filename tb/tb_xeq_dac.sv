// tb_xeq_dac: self-checking test of the DAC model. Every code, enabled and
// disabled: the current is the signed code while enabled and zero otherwise.
module tb_xeq_dac;
  localparam int DACW = 8;
  logic en;
  logic signed [DACW-1:0] code, iout;
  int checks = 0, failures = 0;

  xeq_dac #(.DACW(DACW)) dut (.en, .code, .iout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int c = -(1 << (DACW-1)); c < (1 << (DACW-1)); c++) begin
        en = e[0];
        code = DACW'(c);
        #1;
        checks++;
        if (int'(iout) != (e == 1 ? c : 0)) begin
          failures++;
          $display("FAIL en=%0d code=%0d iout=%0d", e, c, iout);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
