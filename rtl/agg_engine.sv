// agg_engine: graph- and sparsity-aware aggregation engine (UWC and WC).
//
// When the combination vector of node NodeProc is ready it is handed to the
// engine (start), which adds it at once into the aggregation-array rows of
// every node that aggregates from NodeProc: compute-as-soon-as-ready (CAR)
// with the vector broadcast to all candidates. The candidates are NodeProc
// itself (self loop) and the entries of NodeProc's CSR row; in directed mode
// only entries whose direction bit marks an outgoing edge (dir = 0) are kept.
// Zero entries of the adjacency matrix are never visited (sparsity-aware).
//   UWC (weighted = 0): row += vec
//   WC  (weighted = 1): row += Weight_G * vec, Weight_G = the edge weight,
//                       1 for the self loop.
// The two engines share one row of FEAT adders; WC adds FEAT multipliers.
//
// Pipeline: the vector is latched in an incoming register, so the next node's
// combination can proceed while the engine works. Step 1 reads one CSR entry
// per cycle into the update-index register (node, Weight_G, keep flag); step 2
// performs the read-modify-write of that row in the next cycle. After start,
// a node with d stored entries occupies the engine for d + 2 cycles.
// Interface: start is accepted only while !busy; done pulses on the last write.
module agg_engine
  import nem_pkg::*;
#(
  parameter int unsigned NODES     = 256,
  parameter int unsigned MAX_EDGES = 4096,
  parameter int unsigned FEAT      = 128,
  parameter int unsigned ACC       = ACC_BITS,
  localparam int unsigned NW  = $clog2(NODES),
  localparam int unsigned PW  = $clog2(NODES + 1),
  localparam int unsigned EW  = $clog2(MAX_EDGES + 1),
  localparam int unsigned EA  = $clog2(MAX_EDGES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  weighted,
  input  logic                  directed,
  input  logic                  start,
  input  logic [NW-1:0]         node_proc,
  input  logic signed [ACC-1:0] vec [FEAT],
  output logic                  busy,
  output logic                  done,
  // adjacency buffer read port
  output logic [PW-1:0]         adj_node,
  input  logic [EW-1:0]         adj_lo,
  input  logic [EW-1:0]         adj_hi,
  output logic [EA-1:0]         adj_eaddr,
  input  adj_entry_t            adj_entry,
  // aggregation array read-modify-write port
  output logic [NW-1:0]         agg_idx,
  input  logic signed [ACC-1:0] agg_rdata [FEAT],
  output logic                  agg_we,
  output logic signed [ACC-1:0] agg_wdata [FEAT],
  // activity counters
  output logic [31:0]           n_updates,
  output logic [31:0]           n_skipped
);

  typedef enum logic [1:0] {E_IDLE, E_PTR, E_SCAN} estate_e;
  estate_e state;

  logic signed [ACC-1:0] inc [FEAT];     // incoming combination vector
  logic [NW-1:0]         np_q;
  logic [EW-1:0]         e_ptr, e_end;

  // update-index register (step 1 -> step 2)
  logic                  ui_valid;
  logic [NW-1:0]         ui_node;
  logic [EW_BITS-1:0]    ui_wg;

  logic                  keep;
  assign keep = !directed || (adj_entry.dir == 1'b0);

  assign adj_node  = PW'(np_q);
  assign adj_eaddr = EA'(e_ptr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= E_IDLE;
      np_q      <= '0;
      e_ptr     <= '0;
      e_end     <= '0;
      ui_valid  <= 1'b0;
      ui_node   <= '0;
      ui_wg     <= '0;
      n_updates <= '0;
      n_skipped <= '0;
      for (int f = 0; f < FEAT; f++) inc[f] <= '0;
    end else begin
      if (agg_we) n_updates <= n_updates + 1;
      case (state)
        E_IDLE: begin
          ui_valid <= 1'b0;
          if (start) begin
            inc      <= vec;
            np_q     <= node_proc;
            // the self loop is the first update candidate
            ui_valid <= 1'b1;
            ui_node  <= node_proc;
            ui_wg    <= EW_BITS'(1);
            state    <= E_PTR;
          end
        end
        E_PTR: begin
          // the self-loop row is written while NodeProc's CSR bounds are read
          e_ptr    <= adj_lo;
          e_end    <= adj_hi;
          ui_valid <= 1'b0;
          state    <= E_SCAN;
        end
        E_SCAN: begin
          // step 1: one CSR entry into the update-index register per cycle
          if (e_ptr != e_end) begin
            ui_valid <= keep;
            ui_node  <= NW'(adj_entry.node);
            ui_wg    <= adj_entry.weight;
            e_ptr    <= e_ptr + 1'b1;
            if (!keep) n_skipped <= n_skipped + 1;
          end else begin
            ui_valid <= 1'b0;
            state    <= E_IDLE;
          end
        end
        default: state <= E_IDLE;
      endcase
    end
  end

  // step 2: broadcast add of the incoming vector into the candidate's row
  assign agg_idx = ui_node;
  assign agg_we  = ui_valid;
  always_comb begin
    for (int f = 0; f < FEAT; f++) begin
      if (weighted) agg_wdata[f] = agg_rdata[f] + ACC'(inc[f] * signed'({1'b0, ui_wg}));
      else          agg_wdata[f] = agg_rdata[f] + inc[f];
    end
  end

  assign busy = (state != E_IDLE);
  assign done = (state == E_SCAN) && (e_ptr == e_end);

endmodule
