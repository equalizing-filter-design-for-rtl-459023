// tb_xeq_fir_phase: self-checking test of one DAC channel's filter.
// Random precomputed values and data bits; the registered sum must equal
// the sum of the values whose bit is 1 (modulo 2^DW), the DAC code must be
// that sum limited to the signed DAC range, and both must hold while load
// is low. Small and large value ranges make both saturation limits occur.
module tb_xeq_fir_phase;
  localparam int NTAP = 15, DW = 12, DACW = 8;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [NTAP-1:0] bits;
  logic [NTAP-1:0][DW-1:0] coef;
  logic signed [DW-1:0] v;
  logic signed [DACW-1:0] dac_code;
  int checks = 0, failures = 0;
  int exp_v, exp_c, n_sat_hi = 0, n_sat_lo = 0;

  xeq_fir_phase #(.NTAP(NTAP), .DW(DW), .DACW(DACW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int wrap(int s);
    s = s & ((1 << DW) - 1);
    return (s >= (1 << (DW-1))) ? s - (1 << DW) : s;
  endfunction

  task automatic check_out();
    checks++;
    if (int'(v) != exp_v || int'(dac_code) != exp_c) begin
      failures++;
      $display("FAIL v=%0d exp %0d code=%0d exp %0d", v, exp_v, dac_code, exp_c);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    exp_v = 0; exp_c = 0;
    check_out();
    for (int n = 0; n < 3000; n++) begin
      int range, s;
      range = (n % 3 == 0) ? 2048 : (n % 3 == 1) ? 40 : 200;
      s = 0;
      bits = NTAP'($urandom);
      for (int t = 0; t < NTAP; t++) begin
        int c;
        c = $urandom_range(0, 2*range - 1) - range;
        coef[t] = DW'(c);
        if (bits[t]) s += c;
      end
      // load low: outputs hold.
      @(negedge clk);
      check_out();
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      exp_v = wrap(s);
      exp_c = (exp_v > 127) ? 127 : (exp_v < -128) ? -128 : exp_v;
      if (exp_v > 127) n_sat_hi++;
      if (exp_v < -128) n_sat_lo++;
      check_out();
    end
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++;
      $display("FAIL saturation not exercised hi=%0d lo=%0d", n_sat_hi, n_sat_lo);
    end
    $display("saturated high %0d, low %0d", n_sat_hi, n_sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
