// nem_pkg: types and constants shared by the NEM-GNN near-memory GNN datapath.
//
// The sizes below are the defaults of one CPU core's accelerator: 8-bit weights
// and 8-bit features, a 32-row x 1024-column 8T SRAM bank (4 KB) that holds one
// weight row of 128 outputs per SRAM row, 256 banks, a 128-entry x 32-bit
// combination array and an aggregation bank of 256 nodes. Signedness (signed
// weights, unsigned features) and the fixed-point format of D^-1 are choices of
// this design; the document gives the sizes but not the number formats.
package nem_pkg;

  // Bit resolution of features (m) and weights (n).
  localparam int unsigned H_BITS   = 8;
  localparam int unsigned W_BITS   = 8;
  // Accumulator width of the combination and aggregation arrays.
  localparam int unsigned ACC_BITS = 32;
  // Fraction bits of the stored D^-1 element.
  localparam int unsigned DINV_FRAC = 16;
  // Edge weight resolution of weighted graphs.
  localparam int unsigned EW_BITS  = 8;

  // Combination scheme of the PIM lanes.
  //   COMB_C2: bit-serial with early compute termination (ECT datapath).
  //   COMB_C3: pre-compute, one bank read broadcast through an AND per row.
  //   COMB_C1: weights replicated over H_BITS tiles; each tile's bank applies
  //            one feature bit in a single read.
  typedef enum logic [1:0] {
    COMB_C2 = 2'd0,
    COMB_C3 = 2'd1,
    COMB_C1 = 2'd2
  } comb_mode_e;

  // Source selected by the 3:1 write MUX of a partial products row (NEM-C2).
  typedef enum logic [1:0] {
    PP_BR   = 2'd0,  // bank read: value just computed in memory
    PP_ECT  = 2'd1,  // ECT register: broadcast of the first non-zero read
    PP_ZERO = 2'd2   // zero: H bit of this row is 0
  } pp_sel_e;

  // One CSR adjacency entry: neighbour index, direction bit, edge weight.
  // dir = 0 marks an edge that leaves the row's node (outgoing), 1 an
  // incoming one. Only outgoing entries are aggregated in directed mode.
  typedef struct packed {
    logic [15:0]         node;
    logic                dir;
    logic [EW_BITS-1:0]  weight;
  } adj_entry_t;

endpackage
