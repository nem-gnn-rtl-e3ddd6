// tb_nem_gnn_top: end-to-end test of the accelerator at reduced size
// (8 tiles of 1 bank of 4 x 32 bits, 4 outputs, 8 nodes). It stores a weight
// matrix into the banks, checks a normal-mode cache read and that start is
// ignored before LCONF, then runs five layers on an 8-node graph:
//   A: NEM-C3, unweighted undirected, 2 passes (8 features)
//   B: NEM-C2, weighted directed,     1 pass, softmax over 3 classes
//   C: NEM-C2, weighted directed,     1 pass (D^-1 must be reused)
//   D: NEM-C3, unweighted undirected, 1 pass, features answered at once
//   E: NEM-C1 (weights rewritten as 8 replicas), weighted undirected,
//      4 passes of 1 element, softmax over 2 classes
// Every output row is compared with relu(floor(agg * floor(2^16/deg) / 2^16))
// computed here from the graph, the weights and the features it sent.
// It counts how often each mechanism happened (pre-compute, replica, ECT broadcast,
// full serial element, multi-pass accumulation, CAR overlap, hand-over stall,
// D generation overlap, D reuse, directed skip, weighted edge, softmax, mode
// switch) and counts a failure for any that never happened.
module tb_nem_gnn_top;
  import nem_pkg::*;
  localparam int TILES = 8, BPT = 1, ROWS = 4, COLS = 32, NODES = 8, ME = 32;
  localparam int NB = TILES * BPT, NOUT = COLS / W_BITS, NN = 8;
  localparam int FMAX = ROWS * NB;

  logic clk = 0, rst_n = 0;
  logic lconf_we = 0, lconf_compute = 0, compute_mode;
  logic w_we = 0; logic [2:0] w_bank = 0; logic [1:0] w_row = 0; logic [COLS-1:0] w_data = 0;
  logic cache_re = 0; logic [2:0] cache_bank = 0; logic [1:0] cache_row = 0; logic [COLS-1:0] cache_rdata;
  logic rp_we = 0; logic [3:0] rp_waddr = 0; logic [5:0] rp_wdata = 0;
  logic ent_we = 0; logic [4:0] ent_waddr = 0; adj_entry_t ent_wdata;
  comb_mode_e cfg_comb_mode = COMB_C3;
  logic cfg_weighted = 0, cfg_directed = 0, cfg_softmax = 0;
  logic [3:0] cfg_num_nodes = 4'(NN);
  logic [2:0] cfg_num_passes = 1;
  logic [2:0] cfg_num_classes = 0;
  logic start = 0, busy, done;
  logic h_req; logic [2:0] h_req_node; logic [1:0] h_req_pass;
  logic h_valid = 0; logic [H_BITS-1:0] h_data [NB];
  logic out_valid; logic [2:0] out_node;
  logic signed [ACC_BITS-1:0] out_vec [NOUT];
  logic [2:0] out_class; logic [16:0] out_exp [NOUT]; logic [31:0] out_exp_sum;
  logic [31:0] stat_handoff_stalls, stat_overlap_cycles, stat_dgen_overlap_cycles;
  logic [31:0] stat_agg_updates, stat_agg_skipped;

  nem_gnn_top #(.TILES(TILES), .BANKS_PER_TILE(BPT), .ROWS(ROWS), .COLS(COLS),
                .NODES(NODES), .MAX_EDGES(ME)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int W [FMAX][NOUT];
  int H [NN][FMAX];
  // graph: undirected edge list; u -> v is the direction in directed mode
  int eu [9] = '{0, 0, 0, 1, 1, 2, 0, 0, 0};
  int ev [9] = '{2, 3, 4, 2, 3, 4, 5, 6, 7};
  int ew [9] = '{3, 1, 4, 5, 2, 7, 2, 6, 1};
  int rp [NN+1];
  int en [18][3];   // neighbour, dir, weight
  int h_delay = 2;

  // mechanism counters
  int m_c3 = 0, m_ect = 0, m_full = 0, m_multipass = 0, m_dreuse = 0, m_modesw = 0;
  int m_c1 = 0, m_softmax = 0, m_weighted = 0, m_stall = 0, m_overlap = 0, m_dgen = 0, m_skip = 0;

  for (genvar b = 0; b < NB; b++) begin : g_mon
    always @(posedge clk) if (dut.g_lane[b].u_lane.done) begin
      if (dut.mode_q == COMB_C3)                   m_c3++;
      else if (dut.mode_q == COMB_C1)              m_c1++;
      else if (dut.g_lane[b].u_lane.u_ect.valid)   m_ect++;
      else                                         m_full++;
    end
  end

  // L2 side: answer each feature request after h_delay cycles
  initial begin
    for (int b = 0; b < NB; b++) h_data[b] = '0;
    forever begin
      @(posedge clk);
      if (h_req) begin
        int n, p;
        n = int'(h_req_node); p = int'(h_req_pass);
        if (p > 0) m_multipass++;
        repeat (h_delay) @(posedge clk);
        #1;
        h_valid = 1;
        for (int b = 0; b < NB; b++)
          h_data[b] = (b < epp(cfg_comb_mode)) ? H_BITS'(H[n][p*epp(cfg_comb_mode) + b]) : '0;
        @(posedge clk);
        #1;
        h_valid = 0;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // feature elements per pass: NEM-C1 spends H_BITS banks on one element
  function automatic int epp(input comb_mode_e m);
    return (m == COMB_C1) ? NB / H_BITS : NB;
  endfunction

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic build_csr();
    int k;
    k = 0;
    for (int n = 0; n < NN; n++) begin
      rp[n] = k;
      for (int e = 0; e < 9; e++) begin
        if (eu[e] == n) begin en[k] = '{ev[e], 0, ew[e]}; k++; end
        if (ev[e] == n) begin en[k] = '{eu[e], 1, ew[e]}; k++; end
      end
    end
    rp[NN] = k;
  endtask

  task automatic run_layer(input comb_mode_e cm, input bit wt, input bit dr,
                           input int passes, input int ncls, input string name);
    int agg [NN][NOUT];
    int comb [NOUT];
    int cyc, seen, dgen_busy_cycles;
    for (int n = 0; n < NN; n++) for (int j = 0; j < FMAX; j++) H[n][j] = $urandom_range(0, 255);
    for (int n = 0; n < NN; n++) for (int y = 0; y < NOUT; y++) agg[n][y] = 0;
    // reference
    for (int p = 0; p < NN; p++) begin
      for (int y = 0; y < NOUT; y++) begin
        comb[y] = 0;
        for (int j = 0; j < passes * epp(cm); j++) comb[y] += W[j][y] * H[p][j];
        agg[p][y] += comb[y];
      end
      for (int e = rp[p]; e < rp[p+1]; e++)
        if (!dr || en[e][1] == 0)
          for (int y = 0; y < NOUT; y++) agg[en[e][0]][y] += (wt ? en[e][2] : 1) * comb[y];
    end
    cfg_comb_mode = cm; cfg_weighted = wt; cfg_directed = dr;
    cfg_num_passes = 3'(passes); cfg_softmax = (ncls != 0); cfg_num_classes = 3'(ncls);
    start = 1; @(negedge clk); start = 0;
    cyc = 0; seen = 0; dgen_busy_cycles = 0;
    while (!done && cyc < 5000) begin
      if (dut.dgen_busy) dgen_busy_cycles++;
      if (out_valid) begin
        int n, deg, dinv, mx, am;
        longint v;
        int r [NOUT];
        n = int'(out_node);
        deg = 1;
        for (int e = rp[n]; e < rp[n+1]; e++) if (!dr || en[e][1] == 1) deg++;
        dinv = 65536 / deg;
        for (int y = 0; y < NOUT; y++) begin
          v = (longint'(agg[n][y]) * dinv) >>> 16;
          r[y] = (v < 0) ? 0 : int'(v);
          chk(int'(out_vec[y]) == r[y], $sformatf("%s node %0d y %0d: %0d exp %0d", name, n, y, out_vec[y], r[y]));
        end
        if (ncls != 0) begin
          int s;
          mx = r[0]; am = 0; s = 0;
          for (int y = 1; y < ncls; y++) if (r[y] > mx) begin mx = r[y]; am = y; end
          chk(int'(out_class) == am, $sformatf("%s node %0d class %0d exp %0d", name, n, out_class, am));
          for (int y = 0; y < ncls; y++) s += int'(out_exp[y]);
          chk(out_exp[am] == 17'd65536 && int'(out_exp_sum) == s, $sformatf("%s node %0d softmax sum", name, n));
          m_softmax++;
        end
        seen++;
      end
      @(negedge clk); cyc++;
    end
    chk(seen == NN, $sformatf("%s: %0d output rows", name, seen));
    if (dgen_busy_cycles == 0) m_dreuse++;
    m_stall   += int'(stat_handoff_stalls);
    m_overlap += int'(stat_overlap_cycles);
    m_dgen    += int'(stat_dgen_overlap_cycles);
    if (wt) m_weighted++;
    $display("%s: %0d cycles, stalls %0d, overlap %0d, dgen overlap %0d, D reused %0d",
             name, cyc, stat_handoff_stalls, stat_overlap_cycles, stat_dgen_overlap_cycles, dgen_busy_cycles == 0);
    @(negedge clk);
  endtask

  initial begin
    int skip0;
    ent_wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // weights: feature row j lives in bank j % NB, SRAM row j / NB
    for (int j = 0; j < FMAX; j++) begin
      logic [COLS-1:0] rowbits;
      for (int y = 0; y < NOUT; y++) begin
        W[j][y] = $urandom_range(0, 255) - 128;
        rowbits[y*W_BITS +: W_BITS] = W_BITS'(W[j][y]);
      end
      w_we = 1; w_bank = 3'(j % NB); w_row = 2'(j / NB); w_data = rowbits;
      @(negedge clk);
    end
    w_we = 0;
    // adjacency
    build_csr();
    for (int n = 0; n <= NN; n++) begin
      rp_we = 1; rp_waddr = 4'(n); rp_wdata = 6'(rp[n]); @(negedge clk);
    end
    rp_we = 0;
    for (int e = 0; e < rp[NN]; e++) begin
      ent_we = 1; ent_waddr = 5'(e);
      ent_wdata.node = 16'(en[e][0]); ent_wdata.dir = en[e][1][0]; ent_wdata.weight = 8'(en[e][2]);
      @(negedge clk);
    end
    ent_we = 0;
    // normal mode: the banks are an ordinary cache, start is ignored
    chk(!compute_mode, "reset in normal mode");
    cache_re = 1; cache_bank = 3'd2; cache_row = 2'd1; @(negedge clk); cache_re = 0;
    begin
      logic [COLS-1:0] e_row;
      for (int y = 0; y < NOUT; y++) e_row[y*W_BITS +: W_BITS] = W_BITS'(W[1*NB+2][y]);
      chk(cache_rdata == e_row, "normal-mode cache read");
    end
    start = 1; @(negedge clk); start = 0; @(negedge clk);
    chk(!busy, "start ignored in normal mode");
    lconf_we = 1; lconf_compute = 1; @(negedge clk); lconf_we = 0;
    chk(compute_mode, "LCONF selects compute mode");
    if (compute_mode && !busy) m_modesw++;

    skip0 = int'(stat_agg_skipped);
    run_layer(COMB_C3, 0, 0, 2, 0, "layer A");
    run_layer(COMB_C2, 1, 1, 1, 3, "layer B");
    run_layer(COMB_C2, 1, 1, 1, 0, "layer C");
    h_delay = 0;
    run_layer(COMB_C3, 0, 0, 1, 0, "layer D");
    m_skip = int'(stat_agg_skipped) - skip0;
    // NEM-C1: store every weight row once per tile of a group (replicas)
    for (int b = 0; b < NB; b++) for (int r = 0; r < ROWS; r++) begin
      logic [COLS-1:0] rowbits;
      int j;
      j = r * (NB / H_BITS) + (b / (BPT * H_BITS)) * BPT + b % BPT;
      for (int y = 0; y < NOUT; y++) rowbits[y*W_BITS +: W_BITS] = W_BITS'(W[j][y]);
      w_we = 1; w_bank = 3'(b); w_row = 2'(r); w_data = rowbits;
      @(negedge clk);
    end
    w_we = 0;
    h_delay = 2;
    run_layer(COMB_C1, 1, 0, 4, 2, "layer E");

    $display("mechanisms: precompute %0d replica %0d ect %0d full-serial %0d multipass %0d overlap %0d stall %0d dgen-overlap %0d D-reuse %0d skip %0d weighted %0d softmax %0d modesw %0d",
             m_c3, m_c1, m_ect, m_full, m_multipass, m_overlap, m_stall, m_dgen, m_dreuse, m_skip, m_weighted, m_softmax, m_modesw);
    chk(m_c3 > 0, "NEM-C3 pre-compute happened");
    chk(m_c1 > 0, "NEM-C1 replica combination happened");
    chk(m_ect > 0, "NEM-C2 ECT broadcast happened");
    chk(m_full > 0, "NEM-C2 element without a 1 happened");
    chk(m_multipass > 0, "multi-pass combination happened");
    chk(m_overlap > 0, "aggregation overlapped combination (CAR)");
    chk(m_stall > 0, "hand-over stall happened");
    chk(m_dgen > 0, "D generation overlapped the first layer");
    chk(m_dreuse > 0, "D^-1 reused by a later layer");
    chk(m_skip > 0, "directed mode skipped incoming edges");
    chk(m_weighted > 0, "weighted aggregation happened");
    chk(m_softmax > 0, "softmax happened");
    chk(m_modesw > 0, "LCONF mode switch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
