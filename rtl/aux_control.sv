// aux_control: auxiliary control after aggregation: ReLU and softmax control.
//
// ReLU: a sign checker per element clears the negative elements of the
// normalised aggregation row (all FEAT elements in one cycle).
// Softmax (softmax_en, last layer): over the first num_classes elements of the
// ReLU output, a first pass finds the maximum and its index (the predicted
// class), a second pass forms e^(x - max) for each element and their sum.
// The elements are read as fixed point with SM_FRAC fraction bits. The
// exponential is computed as 2^-(d*log2 e), d = max - x: the integer part of
// the exponent is a right shift and the fraction part the linear
// approximation 2^-f ~ 1 - f/2. Results are unsigned Q1.16; a result below
// 2^-16 is 0. The number format and the approximation are this design's
// choice; the document names only "exponential/summation".
//
// Timing: start (idle) with vec; without softmax done pulses 2 cycles later,
// with softmax 2*num_classes + 2 cycles later. Outputs hold until next start.
module aux_control
  import nem_pkg::*;
#(
  parameter int unsigned FEAT    = 128,
  parameter int unsigned ACC     = ACC_BITS,
  parameter int unsigned SM_FRAC = 8,
  localparam int unsigned CW = $clog2(FEAT + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic signed [ACC-1:0] vec [FEAT],
  input  logic                  softmax_en,
  input  logic [CW-1:0]         num_classes,
  output logic                  busy,
  output logic                  done,
  output logic signed [ACC-1:0] relu_vec [FEAT],
  output logic [CW-1:0]         cls,
  output logic [16:0]           exp_vec [FEAT],
  output logic [31:0]           exp_sum
);

  localparam int unsigned LOG2E_Q8 = 369;  // log2(e) * 256

  typedef enum logic [2:0] {A_IDLE, A_RELU, A_MAX, A_EXP, A_DONE} astate_e;
  astate_e state;

  logic [CW-1:0]         idx;
  logic signed [ACC-1:0] mx;
  logic                  sm_q;
  logic [CW-1:0]         ncls_q;

  // exponential of element idx relative to the maximum
  logic [ACC-1:0]        d;
  logic [ACC+8:0]        t;
  logic [ACC+8:0]        ip;
  logic [SM_FRAC-1:0]    fr;
  logic [16:0]           e;
  assign d  = ACC'(mx - relu_vec[idx[$clog2(FEAT)-1:0]]);
  assign t  = ((ACC+9)'(d) * (ACC+9)'(LOG2E_Q8)) >> 8;
  assign ip = t >> SM_FRAC;
  assign fr = t[SM_FRAC-1:0];
  always_comb begin
    logic [16:0] lin;
    lin = 17'd65536 - 17'((32'(fr) << 16) >> (SM_FRAC + 1));
    e   = (ip > 16) ? '0 : (lin >> ip[4:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= A_IDLE;
      idx     <= '0;
      mx      <= '0;
      sm_q    <= 1'b0;
      ncls_q  <= '0;
      cls     <= '0;
      exp_sum <= '0;
      for (int f = 0; f < FEAT; f++) begin
        relu_vec[f] <= '0;
        exp_vec[f]  <= '0;
      end
    end else begin
      case (state)
        A_IDLE: if (start) begin
          for (int f = 0; f < FEAT; f++) begin
            relu_vec[f] <= vec[f][ACC-1] ? '0 : vec[f];
            exp_vec[f]  <= '0;
          end
          sm_q    <= softmax_en && (num_classes != '0);
          ncls_q  <= num_classes;
          state   <= A_RELU;
        end
        A_RELU: begin
          idx     <= '0;
          mx      <= relu_vec[0];
          cls     <= '0;
          exp_sum <= '0;
          state   <= sm_q ? A_MAX : A_DONE;
        end
        A_MAX: begin
          if (relu_vec[idx[$clog2(FEAT)-1:0]] > mx) begin
            mx  <= relu_vec[idx[$clog2(FEAT)-1:0]];
            cls <= idx;
          end
          if (idx + 1'b1 == ncls_q) begin
            idx   <= '0;
            state <= A_EXP;
          end else idx <= idx + 1'b1;
        end
        A_EXP: begin
          exp_vec[idx[$clog2(FEAT)-1:0]] <= e;
          exp_sum <= exp_sum + 32'(e);
          if (idx + 1'b1 == ncls_q) state <= A_DONE;
          else                      idx   <= idx + 1'b1;
        end
        A_DONE:  state <= A_IDLE;
        default: state <= A_IDLE;
      endcase
    end
  end

  assign busy = (state != A_IDLE);
  assign done = (state == A_DONE);

endmodule
