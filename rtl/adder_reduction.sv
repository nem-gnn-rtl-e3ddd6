// adder_reduction: adder reduction tree of the dot product datapath.
//
// Sums, column by column, the NOUT products that the N banks produced in the
// same pass: out[y] = sum over b of in[b][y]. Each bank holds a different
// weight row j, so the sum runs over the feature index j of the dot product.
// The tree is a balanced binary tree of ACC-bit adders (N is padded to a power
// of two with zeros) followed by one output register.
//
// Timing: in_valid with in; out_valid and out one cycle later.
module adder_reduction
  import nem_pkg::*;
#(
  parameter int unsigned N    = 256,
  parameter int unsigned NOUT = 128,
  parameter int unsigned IW   = W_BITS + H_BITS,
  parameter int unsigned ACC  = ACC_BITS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [IW-1:0]  in  [N][NOUT],
  output logic                  out_valid,
  output logic signed [ACC-1:0] out [NOUT]
);

  localparam int unsigned LVL = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned NP2 = 1 << LVL;

  logic signed [ACC-1:0] tree [LVL+1][NP2][NOUT];
  logic signed [ACC-1:0] sum  [NOUT];

  always_comb begin
    for (int i = 0; i < NP2; i++)
      for (int y = 0; y < NOUT; y++)
        tree[0][i][y] = (i < N) ? ACC'(in[i][y]) : '0;
    for (int l = 1; l <= LVL; l++)
      for (int i = 0; i < NP2; i++)
        for (int y = 0; y < NOUT; y++)
          tree[l][i][y] = (i < (NP2 >> l)) ? tree[l-1][2*i][y] + tree[l-1][2*i+1][y] : '0;
    for (int y = 0; y < NOUT; y++) sum[y] = tree[LVL][0][y];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int y = 0; y < NOUT; y++) out[y] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out <= sum;
    end
  end

endmodule
