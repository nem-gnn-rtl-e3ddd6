// tb_agg_engine: UWC/WC aggregation on the five-node weighted, directed
// example graph (edge lists as node,dir,weight with dir 0 = outgoing), in all
// four graph modes. Combination vectors arrive node by node; the aggregation
// rows are compared with a reference computed here, the busy time per node
// must be d + 2 cycles and directed mode must skip incoming entries.
module tb_agg_engine;
  import nem_pkg::*;
  localparam int NODES = 8, ME = 16, FEAT = 3, ACC = 32;
  localparam int NN = 5;
  logic clk = 0, rst_n = 0;
  logic weighted = 0, directed = 0, start = 0, busy, done;
  logic [2:0] node_proc = 0;
  logic signed [ACC-1:0] vec [FEAT];
  logic [3:0] adj_node, a_node_unused;
  logic [4:0] adj_lo, adj_hi, b_lo, b_hi;
  logic [3:0] adj_eaddr;
  adj_entry_t adj_entry, b_entry;
  logic [2:0] agg_idx, b_idx = 0;
  logic signed [ACC-1:0] agg_rdata [FEAT], agg_wdata [FEAT], b_rdata [FEAT];
  logic agg_we, clear = 0;
  logic [31:0] n_updates, n_skipped;
  logic rp_we = 0, ent_we = 0;
  logic [3:0] rp_waddr = 0, ent_waddr = 0;
  logic [4:0] rp_wdata = 0;
  adj_entry_t ent_wdata;
  int checks = 0, failures = 0;

  // CSR of the example (0-based): row n lists {neighbour, dir, weight}
  int rp [NN+1] = '{0, 3, 5, 8, 10, 12};
  int en [12][3] = '{'{2,1,4}, '{3,1,1}, '{4,0,4},
                     '{2,1,5}, '{3,0,2},
                     '{0,0,4}, '{1,0,5}, '{4,1,7},
                     '{0,0,1}, '{1,1,2},
                     '{0,1,4}, '{2,0,7}};

  agg_engine #(.NODES(NODES), .MAX_EDGES(ME), .FEAT(FEAT), .ACC(ACC)) dut (.*);
  adj_buffer #(.NODES(NODES), .MAX_EDGES(ME)) u_adj (
    .clk, .rp_we, .rp_waddr, .rp_wdata, .ent_we, .ent_waddr, .ent_wdata,
    .a_node(adj_node), .a_lo(adj_lo), .a_hi(adj_hi), .a_eaddr(adj_eaddr), .a_entry(adj_entry),
    .b_node(4'd0), .b_lo, .b_hi, .b_eaddr(4'd0), .b_entry);
  agg_array #(.NODES(NODES), .FEAT(FEAT), .ACC(ACC)) u_agg (
    .clk, .rst_n, .clear, .a_idx(agg_idx), .a_rdata(agg_rdata), .a_we(agg_we),
    .a_wdata(agg_wdata), .b_idx, .b_rdata);
  always #5 clk = ~clk;
  assign a_node_unused = '0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_agg [NN][FEAT];
    int cv [NN][FEAT];
    int skipped_exp;
    ent_wdata = '0;
    for (int f = 0; f < FEAT; f++) vec[f] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n <= NN; n++) begin
      rp_we = 1; rp_waddr = 4'(n); rp_wdata = 5'(rp[n]); @(negedge clk);
    end
    rp_we = 0;
    for (int e = 0; e < 12; e++) begin
      ent_we = 1; ent_waddr = 4'(e);
      ent_wdata.node = 16'(en[e][0]); ent_wdata.dir = en[e][1][0]; ent_wdata.weight = 8'(en[e][2]);
      @(negedge clk);
    end
    ent_we = 0;
    for (int m = 0; m < 4; m++) begin
      int skipped0;
      weighted = m[1]; directed = m[0];
      clear = 1; @(negedge clk); clear = 0;
      skipped0 = int'(n_skipped);
      skipped_exp = 0;
      for (int n = 0; n < NN; n++) for (int f = 0; f < FEAT; f++) begin
        ref_agg[n][f] = 0;
        cv[n][f] = $urandom_range(0, 20000) - 10000;
      end
      for (int p = 0; p < NN; p++) begin
        int cyc;
        for (int f = 0; f < FEAT; f++) begin
          vec[f] = cv[p][f];
          ref_agg[p][f] += cv[p][f];
        end
        for (int e = rp[p]; e < rp[p+1]; e++) begin
          if (!directed || en[e][1] == 0) begin
            for (int f = 0; f < FEAT; f++) ref_agg[en[e][0]][f] += (weighted ? en[e][2] : 1) * cv[p][f];
          end else skipped_exp++;
        end
        node_proc = 3'(p); start = 1;
        @(negedge clk);
        start = 0;
        for (int f = 0; f < FEAT; f++) vec[f] = 'hdead;  // engine must have latched it
        cyc = 0;
        while (busy && cyc < 40) begin @(negedge clk); cyc++; end
        checks++;
        if (cyc != rp[p+1] - rp[p] + 2) begin
          failures++; $display("FAIL busy %0d cycles for node %0d, exp %0d", cyc, p, rp[p+1]-rp[p]+2);
        end
      end
      for (int n = 0; n < NN; n++) begin
        b_idx = 3'(n); #1;
        for (int f = 0; f < FEAT; f++) begin
          checks++;
          if (int'(b_rdata[f]) != ref_agg[n][f]) begin
            failures++; $display("FAIL mode %0d node %0d f %0d: %0d exp %0d", m, n, f, b_rdata[f], ref_agg[n][f]);
          end
        end
      end
      checks++;
      if (int'(n_skipped) - skipped0 != skipped_exp) begin failures++; $display("FAIL skipped count"); end
      if (directed && skipped_exp == 0) begin failures++; $display("FAIL no skip seen"); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
