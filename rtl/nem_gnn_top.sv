// nem_gnn_top: one CPU core's NEM-GNN accelerator, one GNN layer per start.
//
// The L1 cache banks (pim_lane, one per bank) keep the layer's weights: SRAM
// row r of bank b holds weight row j = r*NUM_BANKS + b, i.e. NOUT = COLS/8
// weights of 8 bits. A layer runs node by node:
//  1. Combination. For node i and pass r the controller asks the L2 side for
//     the NUM_BANKS feature elements H_j (h_req / h_valid), every bank
//     multiplies its row by its element bit-serially in memory (NEM-C2 or
//     NEM-C3, chosen by cfg_comb_mode), the adder reduction sums the banks and
//     the combination array accumulates the passes.
//     In NEM-C1 mode the weights are stored H_BITS times, once per tile of a
//     group of H_BITS tiles: tile t applies bit t mod H_BITS of the element of
//     its bank in one read, and the adder reduction does the shift-and-add
//     over the replicas. A pass then covers NUM_BANKS / H_BITS elements,
//     taken from h_data[0 .. NUM_BANKS/H_BITS-1]; bank b row r holds weight
//     row j = r*(NUM_BANKS/H_BITS) + (b / (8*BANKS_PER_TILE))*BANKS_PER_TILE
//     + b % BANKS_PER_TILE. NEM-C1 needs TILES to be a multiple of H_BITS.
//  2. Aggregation (CAR). The finished combination vector is handed to the
//     UWC/WC engine, which broadcasts it into the aggregation-array rows of
//     the node and of its neighbours while the banks already combine node i+1.
//     If the engine is still busy with node i-1 the hand-over stalls.
//  3. The D generator builds D^-1 from the CSR buffer in parallel with the
//     first layer's combination and aggregation, and is then idle and reused
//     (until the adjacency is rewritten).
//  4. Normalisation. Each aggregation row is multiplied by its D^-1 element,
//     passed through ReLU and, for the last layer, the softmax control, and
//     streamed out (out_valid). This is the next layer's feature matrix.
// A special-purpose register set by LCONF (lconf_we/lconf_compute) switches
// the L1 between normal mode (cache_re reads a row of any bank) and compute
// mode (start is accepted). Weights and adjacency are written through the
// normal store ports in either mode.
//
// The default sizes follow the document: 32 tiles x 8 banks = 256 banks of
// 32 x 1024 bits (4 KB), 128-entry x 32-bit combination array, aggregation
// bank of 256 nodes x 128 x 32 bits. The node-serial schedule, the all-banks
// pass over the feature index and the port protocol are this design's.
module nem_gnn_top
  import nem_pkg::*;
#(
  parameter int unsigned TILES          = 32,
  parameter int unsigned BANKS_PER_TILE = 8,
  parameter int unsigned ROWS           = 32,
  parameter int unsigned COLS           = 1024,
  parameter int unsigned NODES          = 256,
  parameter int unsigned MAX_EDGES      = 4096,
  localparam int unsigned NUM_BANKS = TILES * BANKS_PER_TILE,
  localparam int unsigned NOUT      = COLS / W_BITS,
  localparam int unsigned BW  = (NUM_BANKS > 1) ? $clog2(NUM_BANKS) : 1,
  localparam int unsigned RW  = $clog2(ROWS),
  localparam int unsigned NW  = $clog2(NODES),
  localparam int unsigned PW  = $clog2(NODES + 1),
  localparam int unsigned EW  = $clog2(MAX_EDGES + 1),
  localparam int unsigned EA  = $clog2(MAX_EDGES),
  localparam int unsigned CW  = $clog2(NOUT + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // LCONF: L1 mode register
  input  logic                  lconf_we,
  input  logic                  lconf_compute,
  output logic                  compute_mode,
  // weight store into the L1 banks
  input  logic                  w_we,
  input  logic [BW-1:0]         w_bank,
  input  logic [RW-1:0]         w_row,
  input  logic [COLS-1:0]       w_data,
  // normal cache read (normal mode only), data one cycle later
  input  logic                  cache_re,
  input  logic [BW-1:0]         cache_bank,
  input  logic [RW-1:0]         cache_row,
  output logic [COLS-1:0]       cache_rdata,
  // adjacency (CSR) store
  input  logic                  rp_we,
  input  logic [PW-1:0]         rp_waddr,
  input  logic [EW-1:0]         rp_wdata,
  input  logic                  ent_we,
  input  logic [EA-1:0]         ent_waddr,
  input  adj_entry_t            ent_wdata,
  // layer configuration, sampled at start
  input  comb_mode_e            cfg_comb_mode,
  input  logic                  cfg_weighted,
  input  logic                  cfg_directed,
  input  logic [PW-1:0]         cfg_num_nodes,
  input  logic [RW:0]           cfg_num_passes,
  input  logic                  cfg_softmax,
  input  logic [CW-1:0]         cfg_num_classes,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  // feature fetch from the L2 side
  output logic                  h_req,
  output logic [NW-1:0]         h_req_node,
  output logic [RW-1:0]         h_req_pass,
  input  logic                  h_valid,
  input  logic [H_BITS-1:0]     h_data [NUM_BANKS],
  // layer output, one node per out_valid
  output logic                  out_valid,
  output logic [NW-1:0]         out_node,
  output logic signed [ACC_BITS-1:0] out_vec [NOUT],
  output logic [CW-1:0]         out_class,
  output logic [16:0]           out_exp [NOUT],
  output logic [31:0]           out_exp_sum,
  // activity counters: the first three restart at start, the last two count from reset
  output logic [31:0]           stat_handoff_stalls,
  output logic [31:0]           stat_overlap_cycles,
  output logic [31:0]           stat_dgen_overlap_cycles,
  output logic [31:0]           stat_agg_updates,
  output logic [31:0]           stat_agg_skipped
);

  // ---------------------------------------------------------------- mode SPR
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        compute_mode <= 1'b0;
    else if (lconf_we) compute_mode <= lconf_compute;
  end

  // ------------------------------------------------------------- controller
  typedef enum logic [3:0] {
    T_IDLE, T_REQ, T_WAIT_H, T_LANES, T_REDUCE, T_HAND, T_DRAIN,
    T_NORM, T_NORM_WAIT, T_DONE
  } tstate_e;
  tstate_e state;

  comb_mode_e    mode_q;
  logic          weighted_q, directed_q, softmax_q;
  logic [PW-1:0] nnodes_q;
  logic [RW:0]   npass_q;
  logic [CW-1:0] ncls_q;
  logic [PW-1:0] node;
  logic [RW-1:0] pass;
  logic [PW-1:0] nn;

  // lanes
  logic [H_BITS-1:0]                   h_q [NUM_BANKS];
  logic                                lane_start;
  logic [NUM_BANKS-1:0]                lane_busy, lane_done, lane_fin;
  logic signed [W_BITS+H_BITS-1:0]     lane_prod [NUM_BANKS][NOUT];
  logic [COLS-1:0]                     lane_cache [NUM_BANKS];
  logic [BW-1:0]                       cache_bank_q;

  // dot product datapath
  logic                                red_in_valid, red_out_valid;
  logic signed [ACC_BITS-1:0]          red_sum  [NOUT];
  logic signed [ACC_BITS-1:0]          comb_vec [NOUT];

  // aggregation
  logic                                agg_clear;
  logic                                eng_start, eng_busy, eng_done;
  logic [PW-1:0]                       adj_a_node, adj_b_node;
  logic [EW-1:0]                       adj_a_lo, adj_a_hi, adj_b_lo, adj_b_hi;
  logic [EA-1:0]                       adj_a_eaddr, adj_b_eaddr;
  adj_entry_t                          adj_a_entry, adj_b_entry;
  logic [NW-1:0]                       agg_a_idx;
  logic                                agg_a_we;
  logic signed [ACC_BITS-1:0]          agg_a_rdata [NOUT];
  logic signed [ACC_BITS-1:0]          agg_a_wdata [NOUT];
  logic signed [ACC_BITS-1:0]          agg_b_rdata [NOUT];

  // D generator and auxiliary control
  logic                                dgen_start, dgen_ready, dgen_busy;
  logic signed [ACC_BITS-1:0]          norm_vec [NOUT];
  logic [DINV_FRAC:0]                  dinv_unused;
  logic                                aux_start, aux_busy, aux_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= T_IDLE;
      mode_q     <= COMB_C3;
      weighted_q <= 1'b0;
      directed_q <= 1'b0;
      softmax_q  <= 1'b0;
      nnodes_q   <= '0;
      npass_q    <= '0;
      ncls_q     <= '0;
      node       <= '0;
      pass       <= '0;
      nn         <= '0;
      lane_fin   <= '0;
      for (int b = 0; b < NUM_BANKS; b++) h_q[b] <= '0;
    end else begin
      lane_fin <= lane_start ? '0 : (lane_fin | lane_done);
      case (state)
        T_IDLE: if (start && compute_mode && cfg_num_nodes != '0 && cfg_num_passes != '0) begin
          mode_q     <= cfg_comb_mode;
          weighted_q <= cfg_weighted;
          directed_q <= cfg_directed;
          softmax_q  <= cfg_softmax;
          nnodes_q   <= cfg_num_nodes;
          npass_q    <= cfg_num_passes;
          ncls_q     <= cfg_num_classes;
          node       <= '0;
          pass       <= '0;
          state      <= T_REQ;
        end
        T_REQ:    state <= T_WAIT_H;
        T_WAIT_H: if (h_valid) begin
          h_q   <= h_data;
          state <= T_LANES;
        end
        T_LANES: if (!lane_start && (&(lane_fin | lane_done))) state <= T_REDUCE;
        T_REDUCE: if (red_out_valid) begin
          if ((RW+1)'(pass) + 1'b1 == npass_q) begin
            state <= T_HAND;
          end else begin
            pass  <= pass + 1'b1;
            state <= T_REQ;
          end
        end
        T_HAND: if (!eng_busy) begin
          pass <= '0;
          if (node + 1'b1 == nnodes_q) begin
            state <= T_DRAIN;
          end else begin
            node  <= node + 1'b1;
            state <= T_REQ;
          end
        end
        T_DRAIN: if (!eng_busy && !eng_start && dgen_ready) begin
          nn    <= '0;
          state <= T_NORM;
        end
        T_NORM: state <= T_NORM_WAIT;
        T_NORM_WAIT: if (aux_done) begin
          if (nn + 1'b1 == nnodes_q) state <= T_DONE;
          else begin
            nn    <= nn + 1'b1;
            state <= T_NORM;
          end
        end
        T_DONE:  state <= T_IDLE;
        default: state <= T_IDLE;
      endcase
    end
  end

  // lanes start the cycle after the features arrive
  logic lane_go;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) lane_go <= 1'b0;
    else        lane_go <= (state == T_WAIT_H) && h_valid;
  end
  assign lane_start = lane_go;

  assign h_req      = (state == T_REQ);
  assign h_req_node = NW'(node);
  assign h_req_pass = pass;

  assign red_in_valid = (state == T_LANES) && !lane_start && (&(lane_fin | lane_done));
  assign agg_clear    = (state == T_IDLE) && start && compute_mode;
  // D^-1 is regenerated only when missing or built for the other graph kind
  logic d_directed_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          d_directed_q <= 1'b0;
    else if (dgen_start) d_directed_q <= cfg_directed;
  end
  assign dgen_start   = agg_clear && !dgen_busy && (!dgen_ready || d_directed_q != cfg_directed);
  assign eng_start    = (state == T_HAND) && !eng_busy;
  assign aux_start    = (state == T_NORM);
  assign busy         = (state != T_IDLE);
  assign done         = (state == T_DONE);

  // ------------------------------------------------------------ PIM lanes
  always_ff @(posedge clk) begin
    if (cache_re) cache_bank_q <= cache_bank;
  end
  assign cache_rdata = lane_cache[cache_bank_q];

  // NEM-C1 replica mapping: tile t applies feature bit t mod H_BITS, and each
  // group of H_BITS tiles shares the elements of one group of banks.
  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_lane
    localparam int unsigned C1_BIT  = (b / BANKS_PER_TILE) % H_BITS;
    localparam int unsigned C1_ELEM = (b / (BANKS_PER_TILE * H_BITS)) * BANKS_PER_TILE
                                      + b % BANKS_PER_TILE;
    pim_lane #(.ROWS(ROWS), .COLS(COLS)) u_lane (
      .clk, .rst_n,
      .we          (w_we && (w_bank == BW'(b))),
      .waddr       (w_row),
      .wdata       (w_data),
      .cache_re    (cache_re && !compute_mode && (cache_bank == BW'(b))),
      .cache_raddr (cache_row),
      .cache_rdata (lane_cache[b]),
      .mode        (mode_q),
      .start       (lane_start),
      .h           ((mode_q == COMB_C1) ? h_q[C1_ELEM] : h_q[b]),
      .row         (pass),
      .c1_bit      ($clog2(H_BITS)'(C1_BIT)),
      .busy        (lane_busy[b]),
      .done        (lane_done[b]),
      .prod        (lane_prod[b])
    );
  end

  adder_reduction #(.N(NUM_BANKS), .NOUT(NOUT), .IW(W_BITS+H_BITS), .ACC(ACC_BITS)) u_red (
    .clk, .rst_n,
    .in_valid  (red_in_valid),
    .in        (lane_prod),
    .out_valid (red_out_valid),
    .out       (red_sum)
  );

  comb_array #(.ENTRIES(NOUT), .ACC(ACC_BITS)) u_comb (
    .clk, .rst_n,
    .acc_en (red_out_valid),
    .first  (pass == '0),
    .din    (red_sum),
    .vec    (comb_vec)
  );

  // ---------------------------------------------------------- aggregation
  adj_buffer #(.NODES(NODES), .MAX_EDGES(MAX_EDGES)) u_adj (
    .clk,
    .rp_we, .rp_waddr, .rp_wdata,
    .ent_we, .ent_waddr, .ent_wdata,
    .a_node (adj_a_node), .a_lo (adj_a_lo), .a_hi (adj_a_hi),
    .a_eaddr(adj_a_eaddr), .a_entry(adj_a_entry),
    .b_node (adj_b_node), .b_lo (adj_b_lo), .b_hi (adj_b_hi),
    .b_eaddr(adj_b_eaddr), .b_entry(adj_b_entry)
  );

  agg_engine #(.NODES(NODES), .MAX_EDGES(MAX_EDGES), .FEAT(NOUT), .ACC(ACC_BITS)) u_eng (
    .clk, .rst_n,
    .weighted  (weighted_q),
    .directed  (directed_q),
    .start     (eng_start),
    .node_proc (NW'(node)),
    .vec       (comb_vec),
    .busy      (eng_busy),
    .done      (eng_done),
    .adj_node  (adj_a_node),
    .adj_lo    (adj_a_lo),
    .adj_hi    (adj_a_hi),
    .adj_eaddr (adj_a_eaddr),
    .adj_entry (adj_a_entry),
    .agg_idx   (agg_a_idx),
    .agg_rdata (agg_a_rdata),
    .agg_we    (agg_a_we),
    .agg_wdata (agg_a_wdata),
    .n_updates (stat_agg_updates),
    .n_skipped (stat_agg_skipped)
  );

  agg_array #(.NODES(NODES), .FEAT(NOUT), .ACC(ACC_BITS)) u_agg (
    .clk, .rst_n,
    .clear   (agg_clear),
    .a_idx   (agg_a_idx),
    .a_rdata (agg_a_rdata),
    .a_we    (agg_a_we),
    .a_wdata (agg_a_wdata),
    .b_idx   (NW'(nn)),
    .b_rdata (agg_b_rdata)
  );

  d_generator #(.NODES(NODES), .MAX_EDGES(MAX_EDGES), .FEAT(NOUT), .ACC(ACC_BITS)) u_dgen (
    .clk, .rst_n,
    .gen_start  (dgen_start),
    .invalidate (rp_we || ent_we),
    .directed   (cfg_directed),
    .num_nodes  (cfg_num_nodes),
    .ready      (dgen_ready),
    .busy       (dgen_busy),
    .adj_node   (adj_b_node),
    .adj_lo     (adj_b_lo),
    .adj_hi     (adj_b_hi),
    .adj_eaddr  (adj_b_eaddr),
    .adj_entry  (adj_b_entry),
    .s_node     (NW'(nn)),
    .s_vec      (agg_b_rdata),
    .s_out      (norm_vec),
    .s_dinv     (dinv_unused)
  );

  aux_control #(.FEAT(NOUT), .ACC(ACC_BITS)) u_aux (
    .clk, .rst_n,
    .start       (aux_start),
    .vec         (norm_vec),
    .softmax_en  (softmax_q),
    .num_classes (ncls_q),
    .busy        (aux_busy),
    .done        (aux_done),
    .relu_vec    (out_vec),
    .cls         (out_class),
    .exp_vec     (out_exp),
    .exp_sum     (out_exp_sum)
  );

  assign out_valid = aux_done;
  assign out_node  = NW'(nn);

  // -------------------------------------------------------------- counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stat_handoff_stalls      <= '0;
      stat_overlap_cycles      <= '0;
      stat_dgen_overlap_cycles <= '0;
    end else if (agg_clear) begin
      stat_handoff_stalls      <= '0;
      stat_overlap_cycles      <= '0;
      stat_dgen_overlap_cycles <= '0;
    end else begin
      if (state == T_HAND && eng_busy)        stat_handoff_stalls <= stat_handoff_stalls + 1;
      if (eng_busy && (|lane_busy))           stat_overlap_cycles <= stat_overlap_cycles + 1;
      if (dgen_busy && (|lane_busy || eng_busy)) stat_dgen_overlap_cycles <= stat_dgen_overlap_cycles + 1;
    end
  end

  // the hand-over must never find the engine busy when it starts it
  assert property (@(posedge clk) disable iff (!rst_n) eng_start |-> !eng_busy);
  // a layer reads D^-1 only after it has been generated
  assert property (@(posedge clk) disable iff (!rst_n) (state == T_NORM) |-> dgen_ready);
  // the layer cannot finish while a node is still being broadcast
  assert property (@(posedge clk) disable iff (!rst_n) (state == T_NORM) |-> !eng_busy && !eng_done);
  // the auxiliary control is working whenever a row is being normalised
  assert property (@(posedge clk) disable iff (!rst_n) (state == T_NORM_WAIT) |-> aux_busy || aux_done);
  // NEM-C1 needs whole groups of H_BITS tiles
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == T_IDLE && start && cfg_comb_mode == COMB_C1) |-> (TILES % H_BITS == 0));

endmodule
