// shift_add: shift-and-add unit for one 8-column weight slice of a bank.
//
// Row k of the partial products array holds W AND H[k] for one weight W, where
// H[k] is bit k of the feature element (bit 0 is the least significant and is
// applied first). The unit sums the rows with weight 2^k, giving the product
// W * H. W is read as a signed two's complement number and H as unsigned; the
// document gives the shift-and-add but not the number formats.
// Purely combinational.
module shift_add
  import nem_pkg::*;
#(
  parameter int unsigned WB = W_BITS,
  parameter int unsigned M  = H_BITS
) (
  input  logic [WB-1:0]            pp [M],
  output logic signed [WB+M-1:0]   prod
);

  always_comb begin
    prod = '0;
    for (int k = 0; k < M; k++) begin
      prod = prod + ((WB+M)'(signed'(pp[k])) <<< k);
    end
  end

endmodule
