// pim_bank: one 8T SRAM bank of the L1 cache, reused as a compute array.
//
// The bank keeps ROWS x COLS bits. It has the decoupled ports of an 8T cell:
// a write port (write word line / write bit lines) and a read port whose read
// word line (RWL) is driven by a single feature bit during compute. The read
// bit line of a column discharges only when the stored bit and the RWL bit are
// both 1, so the sensed value of a compute read is "stored row AND rwl". A
// normal cache read is a compute read with rwl = 1.
//
// Timing: write and read are issued in the same cycle on different rows (the
// precharge of the read port overlaps the write, as in an 8T SRAM); the read
// data appears on rbl one cycle after rd_en and holds until the next read.
// A read of the row written in the same cycle returns the old contents.
// The precharge, sense amplifiers and bit-line physics are not modelled: only
// the logic function the document gives for them.
module pim_bank #(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 1024
) (
  input  logic                    clk,
  input  logic                    we,
  input  logic [$clog2(ROWS)-1:0] waddr,
  input  logic [COLS-1:0]         wdata,
  input  logic                    rd_en,
  input  logic [$clog2(ROWS)-1:0] raddr,
  input  logic                    rwl,
  output logic [COLS-1:0]         rbl
);

  logic [COLS-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  // Read port: RBL discharge (sensed as 1) only where S = 1 and RWL = 1.
  always_ff @(posedge clk) begin
    if (rd_en) rbl <= mem[raddr] & {COLS{rwl}};
  end

endmodule
