// tb_xeq_coef_store: self-checking test of the precomputed-value table.
// Writes random words to random addresses and compares the whole parallel
// output with a reference array after every write; checks reset clears all.
module tb_xeq_coef_store;
  localparam int R = 4, NTAP = 15, DW = 12;
  logic clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [1:0] wphase;
  logic [3:0] wtap;
  logic [DW-1:0] wdata;
  logic [R-1:0][NTAP-1:0][DW-1:0] coef;
  logic [DW-1:0] ref_t [R][NTAP];
  int checks = 0, failures = 0;

  xeq_coef_store #(.R(R), .NTAP(NTAP), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int k = 0; k < R; k++)
      for (int t = 0; t < NTAP; t++) begin
        checks++;
        if (coef[k][t] != ref_t[k][t]) begin
          failures++;
          $display("FAIL [%0d][%0d] got %h exp %h", k, t, coef[k][t], ref_t[k][t]);
        end
      end
  endtask

  initial begin
    foreach (ref_t[k, t]) ref_t[k][t] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    compare();
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we     = ($urandom_range(0, 3) != 0);
      wphase = 2'($urandom_range(0, R-1));
      wtap   = 4'($urandom_range(0, NTAP-1));
      wdata  = DW'($urandom);
      @(negedge clk);
      if (we) ref_t[wphase][wtap] = wdata;
      we = 1'b0;
      compare();
    end
    // Reset clears the table.
    rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    foreach (ref_t[k, t]) ref_t[k][t] = '0;
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
