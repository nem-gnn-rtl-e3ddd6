// tb_nem_gnn_citeseer: workload test on a CiteSeer-shaped graph slice.
//
// One aggregation bank is filled: 256 nodes joined by 700 random undirected
// edges, i.e. CiteSeer's average of 9,104 / 3,327 = 2.74 edges per node, which
// gives 1,400 CSR entries. Edge weights are 1..15. The PIM side is reduced to
// 8 tiles of 1 bank of 8 x 32 bits: 4 outputs and up to 64 features in 8
// passes. The four graph kinds of the CiteSeer family are run as four layers
// on the same adjacency:
//   CS : unweighted, undirected, NEM-C3
//   CS1: weighted,   directed,   NEM-C2
//   CS2: weighted,   undirected, NEM-C3
//   CS3: unweighted, directed,   NEM-C3, softmax over 4 classes
// The features are sparse (about 70 % zeros, like bag-of-words inputs). Every
// output element of every node is compared with
// relu(floor(agg * floor(2^16/deg) / 2^16)) computed here from the graph, the
// weights and the features sent. The testbench also checks the per-layer
// growth of the update and skip counters (which count from reset) against the
// number of kept and dropped edges.
module tb_nem_gnn_citeseer;
  import nem_pkg::*;
  localparam int TILES = 8, BPT = 1, ROWS = 8, COLS = 32, NODES = 256, ME = 4096;
  localparam int NB = TILES * BPT, NOUT = COLS / W_BITS, NN = 256, NE = 700;
  localparam int FMAX = ROWS * NB;

  logic clk = 0, rst_n = 0;
  logic lconf_we = 0, lconf_compute = 0, compute_mode;
  logic w_we = 0; logic [2:0] w_bank = 0; logic [2:0] w_row = 0; logic [COLS-1:0] w_data = 0;
  logic cache_re = 0; logic [2:0] cache_bank = 0; logic [2:0] cache_row = 0; logic [COLS-1:0] cache_rdata;
  logic rp_we = 0; logic [8:0] rp_waddr = 0; logic [12:0] rp_wdata = 0;
  logic ent_we = 0; logic [11:0] ent_waddr = 0; adj_entry_t ent_wdata;
  comb_mode_e cfg_comb_mode = COMB_C3;
  logic cfg_weighted = 0, cfg_directed = 0, cfg_softmax = 0;
  logic [8:0] cfg_num_nodes = 9'(NN);
  logic [3:0] cfg_num_passes = 4'(ROWS);
  logic [2:0] cfg_num_classes = 0;
  logic start = 0, busy, done;
  logic h_req; logic [7:0] h_req_node; logic [2:0] h_req_pass;
  logic h_valid = 0; logic [H_BITS-1:0] h_data [NB];
  logic out_valid; logic [7:0] out_node;
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
  int eu [NE], ev [NE], ew [NE];
  int rp [NN+1];
  int en [2*NE][3];   // neighbour, dir, weight

  // L2 side: answer each feature request two cycles later
  initial begin
    for (int b = 0; b < NB; b++) h_data[b] = '0;
    forever begin
      @(posedge clk);
      if (h_req) begin
        int n, p;
        n = int'(h_req_node); p = int'(h_req_pass);
        repeat (2) @(posedge clk);
        #1;
        h_valid = 1;
        for (int b = 0; b < NB; b++) h_data[b] = H_BITS'(H[n][p*NB + b]);
        @(posedge clk);
        #1;
        h_valid = 0;
      end
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // random graph in CSR form: entry dir = 0 at u (u -> v), dir = 1 at v
  task automatic build_graph();
    int k;
    for (int e = 0; e < NE; e++) begin
      eu[e] = $urandom_range(0, NN-1);
      ev[e] = $urandom_range(0, NN-2);
      if (ev[e] >= eu[e]) ev[e]++;
      ew[e] = $urandom_range(1, 15);
    end
    k = 0;
    for (int n = 0; n < NN; n++) begin
      rp[n] = k;
      for (int e = 0; e < NE; e++) begin
        if (eu[e] == n) begin en[k] = '{ev[e], 0, ew[e]}; k++; end
        if (ev[e] == n) begin en[k] = '{eu[e], 1, ew[e]}; k++; end
      end
    end
    rp[NN] = k;
  endtask

  task automatic run_layer(input comb_mode_e cm, input bit wt, input bit dr,
                           input int ncls, input string name);
    int agg [NN][NOUT];
    int comb [NOUT];
    int cyc, seen, kept, dropped, upd0, skp0;
    for (int n = 0; n < NN; n++)
      for (int j = 0; j < FMAX; j++)
        H[n][j] = ($urandom_range(0, 9) < 7) ? 0 : $urandom_range(1, 255);
    for (int n = 0; n < NN; n++) for (int y = 0; y < NOUT; y++) agg[n][y] = 0;
    kept = 0; dropped = 0;
    for (int p = 0; p < NN; p++) begin
      for (int y = 0; y < NOUT; y++) begin
        comb[y] = 0;
        for (int j = 0; j < FMAX; j++) comb[y] += W[j][y] * H[p][j];
        agg[p][y] += comb[y];
      end
      kept++;
      for (int e = rp[p]; e < rp[p+1]; e++)
        if (!dr || en[e][1] == 0) begin
          kept++;
          for (int y = 0; y < NOUT; y++) agg[en[e][0]][y] += (wt ? en[e][2] : 1) * comb[y];
        end else dropped++;
    end
    cfg_comb_mode = cm; cfg_weighted = wt; cfg_directed = dr;
    cfg_softmax = (ncls != 0); cfg_num_classes = 3'(ncls);
    upd0 = int'(stat_agg_updates); skp0 = int'(stat_agg_skipped);
    start = 1; @(negedge clk); start = 0;
    cyc = 0; seen = 0;
    while (!done && cyc < 200000) begin
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
          mx = r[0]; am = 0;
          for (int y = 1; y < ncls; y++) if (r[y] > mx) begin mx = r[y]; am = y; end
          chk(int'(out_class) == am, $sformatf("%s node %0d class %0d exp %0d", name, n, out_class, am));
        end
        seen++;
      end
      @(negedge clk); cyc++;
    end
    chk(seen == NN, $sformatf("%s: %0d output rows", name, seen));
    chk(int'(stat_agg_updates) - upd0 == kept,
        $sformatf("%s: %0d row updates exp %0d", name, int'(stat_agg_updates) - upd0, kept));
    chk(int'(stat_agg_skipped) - skp0 == dropped,
        $sformatf("%s: %0d skipped exp %0d", name, int'(stat_agg_skipped) - skp0, dropped));
    $display("%s: %0d cycles for %0d nodes / %0d CSR entries, stalls %0d, overlap %0d",
             name, cyc, NN, rp[NN], stat_handoff_stalls, stat_overlap_cycles);
    @(negedge clk);
  endtask

  initial begin
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
      w_we = 1; w_bank = 3'(j % NB); w_row = 3'(j / NB); w_data = rowbits;
      @(negedge clk);
    end
    w_we = 0;
    build_graph();
    for (int n = 0; n <= NN; n++) begin
      rp_we = 1; rp_waddr = 9'(n); rp_wdata = 13'(rp[n]); @(negedge clk);
    end
    rp_we = 0;
    for (int e = 0; e < rp[NN]; e++) begin
      ent_we = 1; ent_waddr = 12'(e);
      ent_wdata.node = 16'(en[e][0]); ent_wdata.dir = en[e][1][0]; ent_wdata.weight = 8'(en[e][2]);
      @(negedge clk);
    end
    ent_we = 0;
    lconf_we = 1; lconf_compute = 1; @(negedge clk); lconf_we = 0;

    run_layer(COMB_C3, 0, 0, 0, "CS");
    run_layer(COMB_C2, 1, 1, 0, "CS1");
    run_layer(COMB_C3, 1, 0, 0, "CS2");
    run_layer(COMB_C3, 0, 1, 4, "CS3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
