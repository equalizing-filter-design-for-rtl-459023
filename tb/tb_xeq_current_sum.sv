// tb_xeq_current_sum: self-checking test of the current-summing model.
// Random signed DAC currents, including the extremes, against an integer sum.
module tb_xeq_current_sum;
  localparam int R = 4, DACW = 8, SW = DACW + 2;
  logic [R-1:0][DACW-1:0] iin;
  logic signed [SW-1:0] v;
  int checks = 0, failures = 0;
  int s;

  xeq_current_sum #(.R(R), .DACW(DACW)) dut (.iin, .v);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      s = 0;
      for (int k = 0; k < R; k++) begin
        int c;
        case (n)
          0: c = -128;
          1: c = 127;
          default: c = $urandom_range(0, 255) - 128;
        endcase
        iin[k] = DACW'(c);
        s += c;
      end
      #1;
      checks++;
      if (int'(v) != s) begin
        failures++;
        $display("FAIL sum got %0d exp %0d", v, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
