// nnp_in_aligner: IN memory aligner - 576 bits from nine banks to 8 PEs x 9 taps.
//
// The nine IN banks deliver one 64-bit word each (8 channels x 8 bit).  For a
// 3x3 window (3x3 convolution or deconvolution) the banks hold the nine
// window pixels in an order that depends on where the window sits: window
// pixel (r, c) comes from bank 3*((ymod + r) mod 3) + ((xmod + c) mod 3),
// where ymod/xmod are the window's top row and left column modulo 3.  The
// aligner rotates the banks back into window order and transposes them, so
// PE j receives channel j of all nine pixels.  Pixels that fall outside the
// feature map (zero padding) are replaced by 0 using mask[r*3 + c].
// For 1x1 convolution the eight banks a-d, f-i each hold eight further
// channels of the same pixel; PE j receives all eight channels of bank j
// (j >= 4 skips bank e) on taps 0..7, and tap 8 gets the dummy value zero,
// which is also what bank e contributes.  mask[0] then zeroes the pixel.
// The same inputs go to all 16 PECs.  One register stage (latency 1).
// The 576-bit width, the per-PE distribution and the zero dummy for bank e
// follow the processor description; the modulo-3 bank rotation is this
// design's way of giving every window pixel its own bank.
module nnp_in_aligner
  import nnp_pkg::*;
(
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 en,
  input  op_e                                  op,
  input  logic [1:0]                           ymod,
  input  logic [1:0]                           xmod,
  input  logic [N_TAP-1:0]                     mask,
  input  logic [N_INBANK-1:0][WORD_W-1:0]      bank,
  output logic [N_PE-1:0][N_TAP-1:0][7:0]      pix
);
  logic [N_PE-1:0][N_TAP-1:0][7:0] pix_d;

  function automatic int unsigned mod3(input int unsigned v);
    return (v >= 6) ? v - 6 : (v >= 3) ? v - 3 : v;
  endfunction

  always_comb begin
    pix_d = '0;
    if (op == OP_CONV1) begin
      for (int j = 0; j < N_PE; j++)
        for (int k = 0; k < 8; k++)
          pix_d[j][k] = mask[0] ? bank[(j < 4) ? j : j + 1][8*k +: 8] : 8'd0;
    end else begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          for (int j = 0; j < N_PE; j++)
            pix_d[j][3*r + c] = mask[3*r + c]
              ? bank[3 * mod3(int'(ymod) + r) + mod3(int'(xmod) + c)][8*j +: 8] : 8'd0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  pix <= '0;
    else if (en) pix <= pix_d;
  end
endmodule
