// tb_xeq_clock_gen: self-checking test of the interleaving phase generator.
// Checks the one-hot phase sequence and the bit strobe against a counter
// model for many bit periods, including a second reset in mid-sequence.
module tb_xeq_clock_gen;
  localparam int R = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [R-1:0] phase;
  logic bit_strobe;
  int checks = 0, failures = 0;
  int cnt;

  xeq_clock_gen #(.R(R)) dut (.clk, .rst_n, .phase, .bit_strobe);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now(int exp_k);
    checks++;
    if (phase != R'(1 << exp_k) || bit_strobe != (exp_k == R-1)) begin
      failures++;
      $display("FAIL phase=%b strobe=%b expected phase %0d", phase, bit_strobe, exp_k);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check_now(0);
    cnt = 1;
    // First cycle after reset: phase 0; the phase then advances each cycle.
    for (int c = 0; c < 10*R + 1; c++) begin
      @(negedge clk);
      check_now(cnt % R);
      cnt++;
    end
    // Reset mid-bit restarts at phase 0.
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    check_now(0);
    cnt = 1;
    for (int c = 0; c < 3*R; c++) begin
      @(negedge clk);
      check_now(cnt % R);
      cnt++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
