// d_generator: sparsity-aware degree-matrix generator and D^-1 multiplier.
//
// Only the diagonal of D^-1 is kept, one element per node. Generation (gen)
// walks the CSR rows: a counter per node counts the entries that feed the
// node (all entries of an undirected graph, the incoming ones, dir = 1, of a
// directed graph) plus one for the self loop, so D_ii = sum of row i of A
// with the self loop included. A restoring divider then forms
// dinv = floor(2^DINV_FRAC / D_ii), one quotient bit per cycle, stored in
// unsigned Q1.DINV_FRAC. Once all nodes are done, ready stays high and the
// generator idles (it is power-gated in the document) until invalidate, so D
// is reused by every layer.
// Normalisation multiplies a whole aggregation row by its node's element
// (element-by-vector, FEAT multipliers): s_out[f] = (s_vec[f] * dinv) >>> DINV_FRAC.
//
// Timing: a node with d CSR entries takes d + DINV_FRAC + 4 cycles to
// generate. The scaling path is combinational.
// Only the direction bit of each CSR entry is needed for counting, so the
// neighbour and weight fields of adj_entry are left unread, and the top
// remainder bit is never needed once the divider has finished.
module d_generator
  import nem_pkg::*;
#(
  parameter int unsigned NODES     = 256,
  parameter int unsigned MAX_EDGES = 4096,
  parameter int unsigned FEAT      = 128,
  parameter int unsigned ACC       = ACC_BITS,
  localparam int unsigned NW = $clog2(NODES),
  localparam int unsigned PW = $clog2(NODES + 1),
  localparam int unsigned EW = $clog2(MAX_EDGES + 1),
  localparam int unsigned EA = $clog2(MAX_EDGES),
  localparam int unsigned QW = DINV_FRAC + 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  gen_start,
  input  logic                  invalidate,
  input  logic                  directed,
  input  logic [PW-1:0]         num_nodes,
  output logic                  ready,
  output logic                  busy,
  // adjacency buffer read port
  output logic [PW-1:0]         adj_node,
  input  logic [EW-1:0]         adj_lo,
  input  logic [EW-1:0]         adj_hi,
  output logic [EA-1:0]         adj_eaddr,
  input  adj_entry_t            adj_entry,
  // element-by-vector multiplier
  input  logic [NW-1:0]         s_node,
  input  logic signed [ACC-1:0] s_vec [FEAT],
  output logic signed [ACC-1:0] s_out [FEAT],
  output logic [QW-1:0]         s_dinv
);

  typedef enum logic [2:0] {G_IDLE, G_ROW, G_COUNT, G_DIV, G_STORE} gstate_e;
  gstate_e state;

  logic [QW-1:0]   dinv [NODES];
  logic [PW-1:0]   node;
  logic [PW-1:0]   nn_q;           // num_nodes and directed, taken at gen_start
  logic            dir_q;
  logic [EW-1:0]   e_ptr, e_end;
  logic [EW:0]     cnt;            // degree counter incl. self loop
  logic [EW+1:0]   rem;
  logic [QW-1:0]   quo;
  logic [$clog2(QW+1)-1:0] bitn;

  assign adj_node  = node;
  assign adj_eaddr = EA'(e_ptr);

  // next partial remainder of the restoring divider; dividend = 1 << DINV_FRAC
  logic [EW+1:0] rem_sh;
  assign rem_sh = {rem[EW:0], (bitn == $clog2(QW+1)'(QW)) ? 1'b1 : 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= G_IDLE;
      ready <= 1'b0;
      node  <= '0;
      nn_q  <= '0;
      dir_q <= 1'b0;
      e_ptr <= '0;
      e_end <= '0;
      cnt   <= '0;
      rem   <= '0;
      quo   <= '0;
      bitn  <= '0;
      for (int n = 0; n < NODES; n++) dinv[n] <= '0;
    end else begin
      if (invalidate) ready <= 1'b0;
      case (state)
        G_IDLE: if (gen_start) begin
          node  <= '0;
          nn_q  <= num_nodes;
          dir_q <= directed;
          ready <= 1'b0;
          state <= (num_nodes == '0) ? G_IDLE : G_ROW;
        end
        G_ROW: begin
          e_ptr <= adj_lo;
          e_end <= adj_hi;
          cnt   <= (EW+1)'(1);
          state <= G_COUNT;
        end
        G_COUNT: begin
          if (e_ptr != e_end) begin
            if (!dir_q || adj_entry.dir) cnt <= cnt + 1'b1;
            e_ptr <= e_ptr + 1'b1;
          end else begin
            rem   <= '0;
            quo   <= '0;
            bitn  <= $clog2(QW+1)'(QW);
            state <= G_DIV;
          end
        end
        G_DIV: begin
          // one quotient bit per cycle, most significant first
          if (rem_sh >= (EW+2)'(cnt)) begin
            rem <= rem_sh - (EW+2)'(cnt);
            quo <= {quo[QW-2:0], 1'b1};
          end else begin
            rem <= rem_sh;
            quo <= {quo[QW-2:0], 1'b0};
          end
          bitn <= bitn - 1'b1;
          if (bitn == 1) state <= G_STORE;
        end
        G_STORE: begin
          dinv[NW'(node)] <= quo;
          if (node + 1'b1 == nn_q) begin
            ready <= 1'b1;
            state <= G_IDLE;
          end else begin
            node  <= node + 1'b1;
            state <= G_ROW;
          end
        end
        default: state <= G_IDLE;
      endcase
    end
  end

  assign busy = (state != G_IDLE);

  assign s_dinv = dinv[s_node];
  always_comb begin
    for (int f = 0; f < FEAT; f++) begin
      s_out[f] = ACC'((64'(s_vec[f]) * signed'({1'b0, s_dinv})) >>> DINV_FRAC);
    end
  end

endmodule
