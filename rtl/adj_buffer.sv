// adj_buffer: near-memory buffer holding the graph in compressed sparse row
// (CSR) form.
//
// rowptr[n] .. rowptr[n+1]-1 index the entries of node n. Each entry is an
// adj_entry_t: neighbour index, direction bit and edge weight (the weight
// field is used by weighted graphs, the direction bit by directed graphs).
// The self loop is not stored; the engines add it themselves.
// Two independent read ports (A for the aggregation engine, B for the D
// generator), each returning rowptr[n], rowptr[n+1] and one entry,
// combinationally. Writes are synchronous.
module adj_buffer
  import nem_pkg::*;
#(
  parameter int unsigned NODES     = 256,
  parameter int unsigned MAX_EDGES = 4096,
  localparam int unsigned NW = $clog2(NODES + 1),
  localparam int unsigned EW = $clog2(MAX_EDGES + 1),
  localparam int unsigned EA = $clog2(MAX_EDGES)
) (
  input  logic             clk,
  input  logic             rp_we,
  input  logic [NW-1:0]    rp_waddr,
  input  logic [EW-1:0]    rp_wdata,
  input  logic             ent_we,
  input  logic [EA-1:0]    ent_waddr,
  input  adj_entry_t       ent_wdata,
  // port A
  input  logic [NW-1:0]    a_node,
  output logic [EW-1:0]    a_lo,
  output logic [EW-1:0]    a_hi,
  input  logic [EA-1:0]    a_eaddr,
  output adj_entry_t       a_entry,
  // port B
  input  logic [NW-1:0]    b_node,
  output logic [EW-1:0]    b_lo,
  output logic [EW-1:0]    b_hi,
  input  logic [EA-1:0]    b_eaddr,
  output adj_entry_t       b_entry
);

  logic [EW-1:0] rowptr  [NODES+1];
  adj_entry_t    entries [MAX_EDGES];

  always_ff @(posedge clk) begin
    if (rp_we)  rowptr[rp_waddr]   <= rp_wdata;
    if (ent_we) entries[ent_waddr] <= ent_wdata;
  end

  always_comb begin
    a_lo    = rowptr[a_node];
    a_hi    = rowptr[a_node + 1'b1];
    a_entry = entries[a_eaddr];
    b_lo    = rowptr[b_node];
    b_hi    = rowptr[b_node + 1'b1];
    b_entry = entries[b_eaddr];
  end

endmodule
