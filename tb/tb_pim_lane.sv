// tb_pim_lane: one bank's in-memory combination in the three schemes. For
// random weight rows and feature elements, the products must equal W * H
// (NEM-C2, NEM-C3) or W * H[k] * 2^k for replica bit k (NEM-C1, whose eight
// replicas must add up to W * H), and the start-to-done latency must be
// 2 cycles (NEM-C3, NEM-C1), p + 3 cycles for the first '1' at bit p (NEM-C2)
// or 9 cycles for H = 0 (NEM-C2, no early stop).
module tb_pim_lane;
  import nem_pkg::*;
  localparam int ROWS = 4, COLS = 32, NOUT = COLS / W_BITS;
  logic clk = 0, rst_n = 0;
  logic we = 0, cache_re = 0, start = 0, busy, done;
  logic [1:0] waddr = 0, cache_raddr = 0, row = 0;
  logic [COLS-1:0] wdata = 0, cache_rdata;
  comb_mode_e mode = COMB_C3;
  logic [H_BITS-1:0] h = 0;
  logic [2:0] c1_bit = 0;
  logic signed [W_BITS+H_BITS-1:0] prod [NOUT];
  logic [COLS-1:0] model [ROWS];
  int checks = 0, failures = 0, n_ect = 0, n_full = 0, n_c1 = 0;
  int c1_sum [NOUT];

  pim_lane #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input comb_mode_e m, input int r, input int hv, input int kb = 0);
    int cyc, exp_lat, p, he;
    mode = m; row = 2'(r); h = H_BITS'(hv); c1_bit = 3'(kb); start = 1;
    he = (m == COMB_C1) ? (hv & (1 << kb)) : hv;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 50) begin @(negedge clk); cyc++; end
    p = -1;
    for (int k = 0; k < H_BITS; k++) if (p < 0 && hv[k]) p = k;
    if (m != COMB_C2)  exp_lat = 2;
    else if (p < 0)    exp_lat = H_BITS + 1;
    else               exp_lat = p + 3;
    if (m == COMB_C2 && p >= 0 && p < H_BITS - 1) n_ect++;
    if (m == COMB_C2 && p < 0) n_full++;
    checks++;
    if (cyc != exp_lat) begin
      failures++;
      $display("FAIL latency mode %0d h=%02h: %0d exp %0d", m, hv, cyc, exp_lat);
    end
    for (int y = 0; y < NOUT; y++) begin
      int w;
      w = int'($signed(model[r][y*W_BITS +: W_BITS]));
      checks++;
      if (m == COMB_C1) c1_sum[y] += int'(prod[y]);
      if (int'(prod[y]) != w * he) begin
        failures++;
        $display("FAIL mode %0d row %0d y %0d h=%0d: got %0d exp %0d", m, r, y, hv, prod[y], w * he);
      end
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      model[r] = $urandom;
      we = 1; waddr = 2'(r); wdata = model[r];
      @(negedge clk);
    end
    we = 0;
    // normal read of every row
    for (int r = 0; r < ROWS; r++) begin
      cache_re = 1; cache_raddr = 2'(r);
      @(negedge clk);
      cache_re = 0;
      checks++;
      if (cache_rdata !== model[r]) begin failures++; $display("FAIL cache read %0d", r); end
    end
    // corner feature values, then random ones, both schemes
    foreach (model[r]) begin
      run(COMB_C2, r, 0);   run(COMB_C3, r, 0);
      run(COMB_C2, r, 1);   run(COMB_C3, r, 1);
      run(COMB_C2, r, 128); run(COMB_C3, r, 128);
      run(COMB_C2, r, 255); run(COMB_C3, r, 255);
      run(COMB_C2, r, 12);  run(COMB_C3, r, 12);
    end
    for (int t = 0; t < 200; t++) begin
      run(t[0] ? COMB_C2 : COMB_C3, $urandom_range(0, ROWS-1), $urandom_range(0, 255));
    end
    // NEM-C1: the eight single-bit replicas of one element add up to W * H
    for (int t = 0; t < 40; t++) begin
      int r, hv;
      r = $urandom_range(0, ROWS-1); hv = (t < 2) ? t * 255 : $urandom_range(0, 255);
      for (int y = 0; y < NOUT; y++) c1_sum[y] = 0;
      for (int k = 0; k < H_BITS; k++) run(COMB_C1, r, hv, k);
      for (int y = 0; y < NOUT; y++) begin
        checks++;
        if (c1_sum[y] != int'($signed(model[r][y*W_BITS +: W_BITS])) * hv) begin
          failures++; $display("FAIL C1 replica sum row %0d y %0d", r, y);
        end
      end
      n_c1++;
    end
    checks++;
    if (n_ect == 0 || n_full == 0 || n_c1 == 0) begin failures++; $display("FAIL: ECT or no-termination case not seen"); end
    $display("ECT broadcasts %0d, full serial %0d, C1 replica sets %0d", n_ect, n_full, n_c1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
