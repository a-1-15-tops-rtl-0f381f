// nnp_pe: processor element (PE) - nine 8x8 multipliers and an adder tree.
//
// One PE works on one input channel of a 3x3 window (3x3 convolution), on
// eight input channels of one pixel (1x1 convolution), or on two of the four
// output phases of a 4x4 / stride-2 deconvolution.  It is a fixed SIMD unit,
// not a systolic array, with three pipeline stages:
//   stage 1  nine products (16 bit) are registered,
//   stage 2  two four-input 20-bit adders sum products 0-3 and 4-7,
//            product 8 is delayed alongside,
//   stage 3  a third four-input adder forms s0 + s1 + p8 (conv), or the two
//            stage-2 sums are passed on as two outputs (deconv).
// Result latency is 3 cycles from pix/w to out0/out1; one window per cycle.
//
// Tap routing.  pix[t] is window pixel (r, c) with t = 3r + c.
//   OP_CONV3 : multiplier k takes pix[k]; out0 = sum of all nine products.
//   OP_CONV1 : pix[k] (k < 8) are eight channels of one pixel; multiplier 8
//              is idle; out0 = sum of eight products.
//   OP_DECONV: an output pixel of a stride-2 4x4 deconvolution sees a 2x2
//              block of input pixels.  The PE with half = 0 makes output
//              phases (0,0) -> out0 and (0,1) -> out1; the PE with half = 1
//              (its partner in the neighbouring PEC) makes (1,0) and (1,1).
//              Multiplier k < 4 takes pix at (half + k/2, k%2), multiplier
//              4 + k takes (half + k/2, 1 + k%2).  Window column 1 is shared
//              by both outputs through small selectors.  w[k] must hold kernel
//              tap K[3 - half - 2(k/2)][3 - 2(k%2)] for k < 4 and
//              K[3 - half - 2(k'/2)][2 - 2(k'%2)] for k = 4 + k'.
// The three-stage pipeline, the four-input 20-bit adders, 16-bit products and
// the pairing of two PEs for deconvolution follow the processor description;
// the exact tap-to-multiplier table and weight order are this design's.
module nnp_pe
  import nnp_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,        // advance the pipeline
  input  op_e                     op,
  input  logic                    half,      // deconv output row phase of this PE
  input  logic                    in_signed, // pix are signed (first layer)
  input  logic [N_TAP-1:0][7:0]   pix,
  input  logic [N_TAP-1:0][7:0]   w,         // signed weights
  output logic signed [PE_W-1:0]  out0,
  output logic signed [PE_W-1:0]  out1
);

  // ---- tap selection (deconv selectors) ----
  logic [N_TAP-1:0][7:0] msel;
  always_comb begin
    for (int k = 0; k < N_TAP; k++) msel[k] = pix[k];
    if (op == OP_CONV1) msel[8] = '0;
    if (op == OP_DECONV) begin
      for (int k = 0; k < 4; k++) begin
        msel[k]     = pix[3 * (int'(half) + k / 2) + (k % 2)];
        msel[4 + k] = pix[3 * (int'(half) + k / 2) + 1 + (k % 2)];
      end
      msel[8] = '0;
    end
  end

  // ---- stage 1: multipliers ----
  logic signed [17:0]       pfull [N_TAP];
  logic signed [PROD_W-1:0] p_q   [N_TAP];
  for (genvar k = 0; k < N_TAP; k++) begin : g_mul
    nnp_mul8 u_mul (.a(msel[k]), .a_signed(in_signed), .b(w[k]), .b_signed(1'b1), .p(pfull[k]));
  end

  // ---- four-input 20-bit adder ----
  function automatic logic signed [PE_W-1:0] add4(input logic signed [PE_W-1:0] a, b, c, d);
    return a + b + c + d;
  endfunction

  logic signed [PE_W-1:0] s0_q, s1_q, p8_q;
  op_e                    op1, op2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N_TAP; k++) p_q[k] <= '0;
      s0_q <= '0; s1_q <= '0; p8_q <= '0;
      out0 <= '0; out1 <= '0;
      op1  <= OP_CONV3; op2 <= OP_CONV3;
    end else if (en) begin
      // stage 1
      for (int k = 0; k < N_TAP; k++) p_q[k] <= pfull[k][PROD_W-1:0];
      op1 <= op;
      // stage 2
      s0_q <= add4(PE_W'(p_q[0]), PE_W'(p_q[1]), PE_W'(p_q[2]), PE_W'(p_q[3]));
      s1_q <= add4(PE_W'(p_q[4]), PE_W'(p_q[5]), PE_W'(p_q[6]), PE_W'(p_q[7]));
      p8_q <= PE_W'(p_q[8]);
      op2  <= op1;
      // stage 3
      if (op2 == OP_DECONV) begin
        out0 <= s0_q;
        out1 <= s1_q;
      end else begin
        out0 <= add4(s0_q, s1_q, p8_q, '0);
        out1 <= '0;
      end
    end
  end

endmodule
