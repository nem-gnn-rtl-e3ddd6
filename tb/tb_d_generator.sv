// tb_d_generator: D^-1 of the five-node example graph, undirected (all
// entries + self loop) and directed (incoming entries + self loop), against
// floor(65536 / degree); generation time d + 20 cycles per node; the
// element-by-vector scaling of a row; ready cleared by invalidate.
module tb_d_generator;
  import nem_pkg::*;
  localparam int NODES = 8, ME = 16, FEAT = 3, ACC = 32, NN = 5;
  logic clk = 0, rst_n = 0, gen_start = 0, invalidate = 0, directed = 0;
  logic [3:0] num_nodes = 4'(NN);
  logic ready, busy;
  logic [3:0] adj_node;
  logic [4:0] adj_lo, adj_hi, a_lo, a_hi;
  logic [3:0] adj_eaddr;
  adj_entry_t adj_entry, a_entry;
  logic [2:0] s_node = 0;
  logic signed [ACC-1:0] s_vec [FEAT], s_out [FEAT];
  logic [DINV_FRAC:0] s_dinv;
  logic rp_we = 0, ent_we = 0;
  logic [3:0] rp_waddr = 0, ent_waddr = 0;
  logic [4:0] rp_wdata = 0;
  adj_entry_t ent_wdata;
  int checks = 0, failures = 0;

  int rp [NN+1] = '{0, 3, 5, 8, 10, 12};
  int en [12][3] = '{'{2,1,4}, '{3,1,1}, '{4,0,4},
                     '{2,1,5}, '{3,0,2},
                     '{0,0,4}, '{1,0,5}, '{4,1,7},
                     '{0,0,1}, '{1,1,2},
                     '{0,1,4}, '{2,0,7}};

  d_generator #(.NODES(NODES), .MAX_EDGES(ME), .FEAT(FEAT), .ACC(ACC)) dut (.*);
  adj_buffer #(.NODES(NODES), .MAX_EDGES(ME)) u_adj (
    .clk, .rp_we, .rp_waddr, .rp_wdata, .ent_we, .ent_waddr, .ent_wdata,
    .a_node(4'd0), .a_lo, .a_hi, .a_eaddr(4'd0), .a_entry,
    .b_node(adj_node), .b_lo(adj_lo), .b_hi(adj_hi), .b_eaddr(adj_eaddr), .b_entry(adj_entry));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ent_wdata = '0;
    for (int f = 0; f < FEAT; f++) s_vec[f] = '0;
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
    for (int m = 0; m < 2; m++) begin
      int cyc, exp_cyc;
      directed = m[0];
      gen_start = 1; @(negedge clk); gen_start = 0;
      cyc = 1;
      while (!ready && cyc < 1000) begin @(negedge clk); cyc++; end
      exp_cyc = 1;  // start cycle
      for (int n = 0; n < NN; n++) exp_cyc += rp[n+1] - rp[n] + DINV_FRAC + 4;
      checks++;
      if (cyc != exp_cyc) begin failures++; $display("FAIL gen time %0d exp %0d", cyc, exp_cyc); end
      for (int n = 0; n < NN; n++) begin
        int deg, dinv;
        deg = 1;
        for (int e = rp[n]; e < rp[n+1]; e++) if (!directed || en[e][1] == 1) deg++;
        dinv = 65536 / deg;
        s_node = 3'(n);
        for (int f = 0; f < FEAT; f++) s_vec[f] = (f == 0) ? -32'sd1000 : ACC'($urandom_range(0, 1000000));
        #1;
        checks++;
        if (int'(s_dinv) != dinv) begin failures++; $display("FAIL dinv node %0d: %0d exp %0d", n, s_dinv, dinv); end
        for (int f = 0; f < FEAT; f++) begin
          longint p;
          p = longint'(s_vec[f]) * dinv;
          checks++;
          if (longint'(s_out[f]) != (p >>> 16)) begin failures++; $display("FAIL scale n%0d f%0d", n, f); end
        end
        @(negedge clk);
      end
      invalidate = 1; @(negedge clk); invalidate = 0;
      checks++;
      if (ready) begin failures++; $display("FAIL ready after invalidate"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
