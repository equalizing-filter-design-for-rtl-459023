// tb_xeq_wire_filter: self-checking test of one wire's interleaved filter.
// Programs a random table of precomputed values through the write port,
// then drives random neighbour bits one bit period at a time from a local
// phase ring. In every sample period of the following bit the summed output
// must equal the reference sample for that phase, which checks the
// one-bit-period latency and the R samples per bit. The table is rewritten
// for one DAC in mid-run to check that values can be adjusted per DAC.
module tb_xeq_wire_filter;
  localparam int NL = 7, R = 4, DW = 12, DACW = 8, NTAP = 2*NL + 1;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [R-1:0] phase;
  logic bit_strobe;
  logic [NTAP-1:0] bits;
  logic we = 1'b0;
  logic [1:0] wphase;
  logic [3:0] wtap;
  logic [DW-1:0] wdata;
  logic [R-1:0][DACW-1:0] dac_code;
  logic signed [DACW+1:0] v;
  int tbl [R][NTAP];
  int checks = 0, failures = 0;
  int exp_s [R];

  xeq_wire_filter #(.NL(NL), .R(R), .DW(DW), .DACW(DACW)) dut (.*);

  always #5 clk = ~clk;

  // Reference phase ring.
  always_ff @(posedge clk) begin
    if (!rst_n) phase <= 4'b0001;
    else        phase <= {phase[R-2:0], phase[R-1]};
  end
  assign bit_strobe = phase[R-1];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(int k, int t, int c);
    @(negedge clk);
    we = 1'b1; wphase = 2'(k); wtap = 4'(t); wdata = DW'(c);
    tbl[k][t] = c;
    @(negedge clk);
    we = 1'b0;
  endtask

  function automatic int sample(int k, logic [NTAP-1:0] b);
    int s = 0;
    for (int t = 0; t < NTAP; t++) if (b[t]) s += tbl[k][t];
    return (s > 127) ? 127 : (s < -128) ? -128 : s;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < R; k++)
      for (int t = 0; t < NTAP; t++)
        write_word(k, t, (t == NL) ? 64 + $urandom_range(0, 40) : $urandom_range(0, 40) - 20);
    for (int n = 0; n < 400; n++) begin
      logic [NTAP-1:0] b;
      if (n == 200)
        for (int t = 0; t < NTAP; t++) write_word(2, t, $urandom_range(0, 300) - 150);
      b = NTAP'($urandom);
      // Present the bit in the strobe cycle.
      while (!(phase[R-2])) @(negedge clk);
      @(negedge clk);  // now phase R-1 (bit_strobe) is active
      bits = b;
      for (int k = 0; k < R; k++) exp_s[k] = sample(k, b);
      // Next R sample periods carry samples 0..R-1 of this bit.
      for (int k = 0; k < R; k++) begin
        @(negedge clk);
        checks++;
        if (phase != R'(1 << k) || int'(v) != exp_s[k] || int'(signed'(dac_code[k])) != exp_s[k]) begin
          failures++;
          $display("FAIL bit %0d sample %0d: phase=%b v=%0d exp %0d", n, k, phase, v, exp_s[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
