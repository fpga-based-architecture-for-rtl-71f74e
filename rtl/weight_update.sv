// weight_update - one step of the STDP weight equation for one synapse.
//
//   LTP (post-synaptic spike after a pre-synaptic one):
//     w' = w + eps_i * eps_j * P * (W_LTP - w)
//   LTD (pre-synaptic spike after a post-synaptic one):
//     w' = w - eps_i * eps_j * Q * (w - W_LTD)
// eps_i, eps_j and f (= P or Q) are TRACE_W-bit fractions (all ones = 1.0).
// Weights are W_W bits; the bounds W_LTP and W_LTD are given on the 8-bit
// output scale and placed in the top 8 bits, so the result never leaves
// [W_LTD, W_LTP] (a weight configured outside is first clamped to it).
// One multiplier is used three times: k = eps_i*eps_j, k = k*f, d = k*span;
// each product keeps its TRACE_W high bits (truncation). `start` with the
// operands valid in that cycle; `done` pulses with w_out in the third cycle
// after it, and a new start is taken from the cycle after done.
// The equation, the 20-bit weight and the 0/255 bounds follow the published
// design; the multiplier sharing and the fraction formats are this design's.
module weight_update
  import stdp_pkg::*;
#(
  parameter int unsigned W_LTP = 255,
  parameter int unsigned W_LTD = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  logic    ltp,
  input  weight_t w_in,
  input  frac_t   eps_i,
  input  frac_t   eps_j,
  input  frac_t   f,
  output logic    done,
  output weight_t w_out
);

  localparam int unsigned SH = W_W - W_OUT_W;
  localparam weight_t HI = weight_t'(W_LTP) << SH;
  localparam weight_t LO = weight_t'(W_LTD) << SH;

  typedef enum logic [1:0] {WU_IDLE, WU_K2, WU_D, WU_OUT} wu_state_e;

  wu_state_e st;
  frac_t     k;
  frac_t     f_q;
  weight_t   w_q, span;
  logic      ltp_q;

  logic [TRACE_W-1:0]       mul_a;
  logic [W_W-1:0]           mul_b;
  logic [TRACE_W+W_W-1:0]   prod;

  weight_t w_clamped;
  assign w_clamped = (w_in > HI) ? HI : (w_in > LO) ? w_in : LO;

  // The shared multiplier.
  always_comb begin
    unique case (st)
      WU_IDLE: begin mul_a = eps_i; mul_b = W_W'(eps_j); end
      WU_K2:   begin mul_a = k;     mul_b = W_W'(f_q);   end
      default: begin mul_a = k;     mul_b = span;        end
    endcase
  end
  assign prod = mul_a * mul_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= WU_IDLE;
      done  <= 1'b0;
      k     <= '0;
      f_q   <= '0;
      w_q   <= '0;
      span  <= '0;
      ltp_q <= 1'b0;
      w_out <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        WU_IDLE: if (start) begin
          k     <= prod[2*TRACE_W-1 -: TRACE_W];
          f_q   <= f;
          w_q   <= w_clamped;
          span  <= ltp ? HI - w_clamped : w_clamped - LO;
          ltp_q <= ltp;
          st    <= WU_K2;
        end
        WU_K2: begin
          k  <= prod[2*TRACE_W-1 -: TRACE_W];
          st <= WU_D;
        end
        WU_D: begin
          w_out <= ltp_q ? w_q + prod[TRACE_W +: W_W] : w_q - prod[TRACE_W +: W_W];
          done  <= 1'b1;
          st    <= WU_OUT;
        end
        WU_OUT: st <= WU_IDLE;
      endcase
    end
  end

endmodule
