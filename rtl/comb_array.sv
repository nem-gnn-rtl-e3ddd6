// comb_array: combination array, ENTRIES x ACC-bit flops.
//
// Holds the combination vector of the node being combined: entry y is the
// dot product of that node's features with weight column y. A feature vector
// longer than the number of banks is combined in several passes; each pass's
// reduced sums are added into the array (acc_en), and the first pass of a node
// overwrites it (first). The whole vector is visible on vec.
//
// Timing: vec reflects an acc_en one cycle later.
module comb_array
  import nem_pkg::*;
#(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned ACC     = ACC_BITS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  acc_en,
  input  logic                  first,
  input  logic signed [ACC-1:0] din [ENTRIES],
  output logic signed [ACC-1:0] vec [ENTRIES]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int y = 0; y < ENTRIES; y++) vec[y] <= '0;
    end else if (acc_en) begin
      for (int y = 0; y < ENTRIES; y++) vec[y] <= first ? din[y] : vec[y] + din[y];
    end
  end

endmodule
