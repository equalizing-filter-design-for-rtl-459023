// tb_xeq_equalizer: end-to-end test of the bus equalizer at its default
// sizes (32 wires, 7+7 neighbours, 4 DACs per wire, 12-bit datapath,
// 8-bit DACs).
//
// 1. Loads a complete table of precomputed values through the configuration
//    port: a crosstalk-cancelling shape (a strong own-wire value, with more
//    drive in the first sample of each bit, and negative values falling off
//    with distance for the neighbours).
// 2. Drives random words on the bus, one per bit period, and checks every
//    sample of every wire against a reference model computed here from the
//    same table, one bit period later, phase by phase.
// 3. Reloads the whole table with a 5-wide window (outer taps zero), the
//    size of the least-squares filter the design is compared with.
// 4. Rewrites the table for one DAC of every wire with random values while
//    the bus keeps running (per-DAC adjustment), and keeps checking.
// 5. Drives all-ones and all-zeros words. A second rewrite, of DAC 3, uses
//    values up to +-136 (15 of them still fit the 12-bit datapath), so that
//    the DAC range limits are reached in both directions.
// Mechanisms counted (each must occur): samples at both saturation limits,
// samples on edge wires whose window reaches past the bus edge, table
// reloads and rewrites during operation, and every DAC phase.
module tb_xeq_equalizer;
  import xeq_pkg::*;
  localparam int W = W_DEF, NL = NL_DEF, R = R_DEF, DW = DW_DEF, DACW = DACW_DEF;
  localparam int NTAP = 2*NL + 1, SW = DACW + $clog2(R);
  localparam int NBITS = 600;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] x = '0;
  logic [R-1:0] phase;
  logic bit_strobe;
  logic cfg_we = 1'b0;
  logic [$clog2(W)-1:0] cfg_wire = '0;
  logic [$clog2(R)-1:0] cfg_phase = '0;
  logic [$clog2(NTAP)-1:0] cfg_tap = '0;
  logic [DW-1:0] cfg_data = '0;
  logic [W-1:0][R-1:0][DACW-1:0] dac_code;
  logic [W-1:0][SW-1:0] v;

  int tbl [W][R][NTAP];
  int exp_s [W][R];
  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0, n_edge = 0, n_rewrite = 0, n_narrow = 0;
  int n_phase [R];
  longint cyc = 0;

  xeq_equalizer dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(int i, int k, int t, int c);
    @(negedge clk);
    cfg_we = 1'b1; cfg_wire = 5'(i); cfg_phase = 2'(k); cfg_tap = 4'(t); cfg_data = DW'(c);
    tbl[i][k][t] = c;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // Reference: sample k of wire i for data word b, limited to the DAC range.
  function automatic int ref_sample(int i, int k, logic [W-1:0] b);
    int s = 0;
    for (int t = 0; t < NTAP; t++) begin
      int j = i + t - NL;
      if (j >= 0 && j < W && b[j]) s += tbl[i][k][t];
    end
    return (s > 127) ? 127 : (s < -128) ? -128 : s;
  endfunction

  function automatic int shaped(int k, int t);
    int d = (t > NL) ? t - NL : NL - t;
    if (d == 0) return (k == 0) ? 60 : 35;
    return -((k == 0) ? 12 : 6) / d;
  endfunction

  task automatic run_bit(logic [W-1:0] b);
    // Wait for the cycle with bit_strobe high, present the word there.
    while (!phase[R-2]) @(negedge clk);
    @(negedge clk);
    x = b;
    for (int i = 0; i < W; i++)
      for (int k = 0; k < R; k++) exp_s[i][k] = ref_sample(i, k, b);
    for (int k = 0; k < R; k++) begin
      @(negedge clk);
      if (phase != R'(1 << k)) begin
        failures++;
        $display("FAIL phase %b, expected sample %0d", phase, k);
      end
      n_phase[k]++;
      for (int i = 0; i < W; i++) begin
        checks++;
        if (int'(signed'(v[i])) != exp_s[i][k] || int'(signed'(dac_code[i][k])) != exp_s[i][k]) begin
          failures++;
          if (failures < 20)
            $display("FAIL wire %0d sample %0d: v=%0d exp %0d", i, k, signed'(v[i]), exp_s[i][k]);
        end
        if (exp_s[i][k] == 127) n_sat_hi++;
        if (exp_s[i][k] == -128) n_sat_lo++;
        if ((i < NL || i >= W - NL) && b[i]) n_edge++;
      end
    end
  endtask

  initial begin
    longint t0;
    foreach (n_phase[k]) n_phase[k] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int i = 0; i < W; i++)
      for (int k = 0; k < R; k++)
        for (int t = 0; t < NTAP; t++) write_word(i, k, t, shaped(k, t));

    // Latency: a word taken at the end of a bit period is on the outputs
    // one sample period later (phase 0 of the next bit).
    while (!phase[R-2]) @(negedge clk);
    @(negedge clk);
    x = '1;
    t0 = cyc;
    @(negedge clk);
    checks++;
    if (cyc - t0 != 1 || phase != R'(1) || int'(signed'(v[W/2])) != ref_sample(W/2, 0, '1)) begin
      failures++;
      $display("FAIL latency: v=%0d exp %0d after %0d cycles", signed'(v[W/2]), ref_sample(W/2, 0, '1), cyc - t0);
    end

    for (int n = 0; n < NBITS; n++) begin
      logic [W-1:0] b;
      if (n == NBITS/6) begin
        // Reload every wire with a 5-wide window (taps beyond +-2 are 0),
        // the size of the least-squares filter the design is compared with.
        for (int i = 0; i < W; i++)
          for (int k = 0; k < R; k++)
            for (int t = 0; t < NTAP; t++)
              write_word(i, k, t, (t < NL - 2 || t > NL + 2) ? 0 : 2 * shaped(k, t));
        n_narrow++;
      end
      if (n == NBITS/3) begin
        // Adjust DAC 1 of every wire while the bus runs.
        for (int i = 0; i < W; i++)
          for (int t = 0; t < NTAP; t++) write_word(i, 1, t, $urandom_range(0, 160) - 80);
        n_rewrite++;
      end
      if (n == 2*NBITS/3) begin
        for (int i = 0; i < W; i++)
          for (int t = 0; t < NTAP; t++) write_word(i, 3, t, $urandom_range(0, 272) - 136);
        n_rewrite++;
      end
      case (n % 50)
        0: b = '1;
        1: b = '0;
        2: b = 32'h5555_5555;
        default: b = W'($urandom);
      endcase
      run_bit(b);
    end

    if (n_sat_hi == 0) begin failures++; $display("FAIL no sample at the upper DAC limit"); end
    if (n_sat_lo == 0) begin failures++; $display("FAIL no sample at the lower DAC limit"); end
    if (n_edge == 0)   begin failures++; $display("FAIL no edge-wire window exercised"); end
    if (n_narrow == 0) begin failures++; $display("FAIL no 5-wide table run"); end
    if (n_rewrite == 0) begin failures++; $display("FAIL no table rewrite in operation"); end
    foreach (n_phase[k])
      if (n_phase[k] == 0) begin failures++; $display("FAIL phase %0d never seen", k); end
    $display("upper limit %0d, lower limit %0d, edge samples %0d, 5-wide reloads %0d, rewrites %0d, samples per phase %0d",
             n_sat_hi, n_sat_lo, n_edge, n_narrow, n_rewrite, n_phase[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
