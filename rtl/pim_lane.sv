// pim_lane: bit-serial in-memory combination of one bank (PIM datapath).
//
// Each SRAM row of the bank holds one weight row W^{j,*}: NOUT weights of
// W_BITS bits side by side. For a feature element H_j (H_BITS bits, unsigned)
// the lane fills an H_BITS-row partial products array with W^{j,*} AND H_j[k]
// and the shift-add units turn it into NOUT products W^{j,y} * H_j.
//
// Three schemes, chosen per element by `mode`:
//  * NEM-C3 (pre-compute): one read with RWL = 1 gives the product for a '1'
//    bit; the next cycle every array row is written with that read ANDed with
//    its own feature bit. start -> done: 2 cycles.
//  * NEM-C2 (early compute termination): feature bits are applied LSB first,
//    one read per cycle, each written straight into its row (BR). When the
//    ECT unit sees the first '1' it stores the read in the ECT register and the
//    next cycle all rows are written through the 3:1 MUX (BR / ECT / zero), so
//    the array stops being read. start -> done: p + 3 cycles for the first '1'
//    at bit p, H_BITS + 1 cycles for H = 0.
//  * NEM-C1 (replication): the lane is the copy of a weight row kept in tile
//    t; it applies only feature bit c1_bit (= t mod H_BITS) on the RWL in one
//    read and puts the result in array row c1_bit, so prod = W * H[c1_bit] *
//    2^c1_bit. The shift-and-add over the replicas is completed by the adder
//    reduction. start -> done: 2 cycles.
// The bit order and the cycle split are this design's choice; the steps and
// the MUX/AND structure follow the document.
//
// Interface: start (one cycle, lane idle) with h and row; done is a one-cycle
// pulse, after which prod holds until the next start. The write port of the
// bank is brought out unchanged (cache store of weights).
module pim_lane
  import nem_pkg::*;
#(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 1024,
  localparam int unsigned NOUT = COLS / W_BITS
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // weight store (normal cache write)
  input  logic                           we,
  input  logic [$clog2(ROWS)-1:0]        waddr,
  input  logic [COLS-1:0]                wdata,
  // normal cache read
  input  logic                           cache_re,
  input  logic [$clog2(ROWS)-1:0]        cache_raddr,
  output logic [COLS-1:0]                cache_rdata,
  // compute
  input  comb_mode_e                     mode,
  input  logic                           start,
  input  logic [H_BITS-1:0]              h,
  input  logic [$clog2(ROWS)-1:0]        row,
  input  logic [$clog2(H_BITS)-1:0]      c1_bit,
  output logic                           busy,
  output logic                           done,
  output logic signed [W_BITS+H_BITS-1:0] prod [NOUT]
);

  typedef enum logic [2:0] {S_IDLE, S_C3_FILL, S_C2_WR, S_C2_BC, S_C1_FILL, S_DONE} state_e;
  state_e state;

  logic [H_BITS-1:0]         h_q;
  logic [$clog2(ROWS)-1:0]   row_q;
  logic [$clog2(H_BITS)-1:0] k;
  logic [$clog2(H_BITS)-1:0] c1_q;

  logic                      rd_en, rwl;
  logic [$clog2(ROWS)-1:0]   raddr;
  logic [COLS-1:0]           rbl;

  logic [COLS-1:0]           pp [H_BITS];

  // ECT datapath
  logic                      ect_clear, ect_cam_en, ect_valid;
  logic [COLS-1:0]           ect_reg;
  pp_sel_e                   ect_sel [H_BITS];

  pim_bank #(.ROWS(ROWS), .COLS(COLS)) u_bank (
    .clk, .we, .waddr, .wdata,
    .rd_en, .raddr, .rwl, .rbl
  );

  ect_unit #(.COLS(COLS), .M(H_BITS)) u_ect (
    .clk, .rst_n,
    .clear  (ect_clear),
    .cam_en (ect_cam_en),
    .h_bit  (h_q[k]),
    .rbl,
    .h_vec  (h_q),
    .valid  (ect_valid),
    .ect_reg,
    .sel    (ect_sel)
  );

  assign cache_rdata = rbl;

  // Read port control: compute reads from the FSM, otherwise a cache read.
  always_comb begin
    rd_en = 1'b0;
    rwl   = 1'b1;
    raddr = cache_raddr;
    if (state == S_IDLE && start) begin
      rd_en = 1'b1;
      raddr = row;
      case (mode)
        COMB_C3: rwl = 1'b1;
        COMB_C1: rwl = h[c1_bit];
        default: rwl = h[0];
      endcase
    end else if (state == S_C2_WR && !h_q[k] && k != $clog2(H_BITS)'(H_BITS-1)) begin
      // no '1' yet: keep streaming bits onto the RWL
      rd_en = 1'b1;
      raddr = row_q;
      rwl   = h_q[k+1];
    end else if (state == S_IDLE && cache_re) begin
      rd_en = 1'b1;
    end
  end

  assign ect_clear  = (state == S_IDLE) && start;
  assign ect_cam_en = (state == S_C2_WR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      h_q   <= '0;
      row_q <= '0;
      k     <= '0;
      c1_q  <= '0;
      for (int r = 0; r < H_BITS; r++) pp[r] <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          h_q   <= h;
          row_q <= row;
          k     <= '0;
          c1_q  <= c1_bit;
          case (mode)
            COMB_C3: state <= S_C3_FILL;
            COMB_C1: state <= S_C1_FILL;
            default: state <= S_C2_WR;
          endcase
        end
        S_C3_FILL: begin
          // pre-compute: bank read ANDed with each row's feature bit
          for (int r = 0; r < H_BITS; r++) pp[r] <= rbl & {COLS{h_q[r]}};
          state <= S_DONE;
        end
        S_C2_WR: begin
          pp[k] <= rbl;  // bank read (BR)
          if (h_q[k])                                   state <= S_C2_BC;
          else if (k == $clog2(H_BITS)'(H_BITS-1))      state <= S_DONE;
          else                                          k <= k + 1'b1;
        end
        S_C2_BC: begin
          // single-cycle broadcast of the ECT register into the YTC rows
          for (int r = 0; r < H_BITS; r++) begin
            case (ect_sel[r])
              PP_ECT:  pp[r] <= ect_reg;
              PP_ZERO: pp[r] <= '0;
              default: pp[r] <= pp[r];
            endcase
          end
          state <= S_DONE;
        end
        S_C1_FILL: begin
          // single-bit replica: only row c1_bit carries the read
          for (int r = 0; r < H_BITS; r++) pp[r] <= (r == int'(c1_q)) ? rbl : '0;
          state <= S_DONE;
        end
        S_DONE:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // the broadcast step only follows a detected '1'
  assert property (@(posedge clk) disable iff (!rst_n) (state == S_C2_BC) |-> ect_valid);

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

  // one shift-and-add unit per W_BITS columns
  for (genvar y = 0; y < NOUT; y++) begin : g_sa
    logic [W_BITS-1:0] slice [H_BITS];
    always_comb begin
      for (int r = 0; r < H_BITS; r++) slice[r] = pp[r][y*W_BITS +: W_BITS];
    end
    shift_add #(.WB(W_BITS), .M(H_BITS)) u_sa (.pp(slice), .prod(prod[y]));
  end

endmodule
