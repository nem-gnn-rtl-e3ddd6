// ect_unit: early compute termination datapath of the NEM-C2 combination.
//
// Step 1 (CAM logic): the feature bit on the RWL of the current read is matched
// against '1'; a match sets the valid bit. Step 2: on a match, the bank read of
// that cycle (which equals the stored weight row) is written into the ECT
// register. Step 3: per row r of the partial products array a write select is
// produced from the valid bit and the feature bit of that row:
//   valid = 0            -> BR   (keep the bank read)
//   valid = 1, H[r] = 1  -> ECT  (broadcast of the ECT register)
//   valid = 1, H[r] = 0  -> ZERO
// which drive the 3:1 MUX in front of the array.
//
// Interface: clear resets the valid bit at the start of an element; cam_en
// marks a cycle in which rbl holds the read for feature bit h_bit.
// Timing: valid and ect_reg update one cycle after cam_en with h_bit = 1;
// sel is combinational from the registered valid bit and h_vec.
module ect_unit
  import nem_pkg::*;
#(
  parameter int unsigned COLS = 1024,
  parameter int unsigned M    = H_BITS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            cam_en,
  input  logic            h_bit,
  input  logic [COLS-1:0] rbl,
  input  logic [M-1:0]    h_vec,
  output logic            valid,
  output logic [COLS-1:0] ect_reg,
  output pp_sel_e         sel [M]
);

  logic match;
  assign match = cam_en && (h_bit == 1'b1) && !valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid   <= 1'b0;
      ect_reg <= '0;
    end else if (clear) begin
      valid   <= 1'b0;
    end else if (match) begin
      valid   <= 1'b1;
      ect_reg <= rbl;
    end
  end

  always_comb begin
    for (int r = 0; r < M; r++) begin
      if (!valid)        sel[r] = PP_BR;
      else if (h_vec[r]) sel[r] = PP_ECT;
      else               sel[r] = PP_ZERO;
    end
  end

endmodule
