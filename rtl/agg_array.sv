// agg_array: aggregation array, one FEAT x ACC-bit vector per node.
//
// A flop array indexed by node number. Port A is the read-modify-write port of
// the aggregation engine (combinational read, write at the clock edge); port B
// is a read port for the normalisation pass. A valid bit per row lets clear
// empty the whole array in one cycle: a row that has not been written since
// the last clear reads as zero.
module agg_array
  import nem_pkg::*;
#(
  parameter int unsigned NODES = 256,
  parameter int unsigned FEAT  = 128,
  parameter int unsigned ACC   = ACC_BITS,
  localparam int unsigned NW = $clog2(NODES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic [NW-1:0]         a_idx,
  output logic signed [ACC-1:0] a_rdata [FEAT],
  input  logic                  a_we,
  input  logic signed [ACC-1:0] a_wdata [FEAT],
  input  logic [NW-1:0]         b_idx,
  output logic signed [ACC-1:0] b_rdata [FEAT]
);

  logic signed [ACC-1:0] mem [NODES][FEAT];
  logic [NODES-1:0]      vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0;
    end else if (clear) begin
      vld <= '0;
    end else if (a_we) begin
      vld[a_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (a_we && !clear) mem[a_idx] <= a_wdata;
  end

  always_comb begin
    for (int f = 0; f < FEAT; f++) begin
      a_rdata[f] = vld[a_idx] ? mem[a_idx][f] : '0;
      b_rdata[f] = vld[b_idx] ? mem[b_idx][f] : '0;
    end
  end

endmodule
