// nnp_bn_mac: batch-normalisation MAC and activation reduction of a PEC.
//
// Batch normalisation folded with the convolution bias is one multiply-add
// per channel, y = A_c * x + B_c, with a 16-bit scale A_c and an 8-bit offset
// B_c.  The unit
//   1. reduces the 32-bit accumulator to the 16-bit partial-sum format,
//      x = sat16(acc >>> ps_shift),
//   2. forms the 16 x 16 product A_c * x from four 8 x 8 multipliers
//      (high/low byte of each operand) and adds B_c <<< b_shift, giving a
//      32-bit result,
//   3. reduces that to an 8-bit activation: y >>> bn_shift, clamped to 0..255
//      with ReLU (activations carry no sign bit), or to -128..127 without it.
// With bn_en = 0 (the final prediction layers carry no BN) step 2 is skipped
// and y = x.  One register stage: act is valid one cycle after in_valid.
// The 16-bit A / 8-bit B widths, the four 8x8 multipliers and the 32-bit
// result follow the processor description; the shift-based dynamic fixed-point
// alignment and the saturation rules are this design's choice.
module nnp_bn_mac
  import nnp_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [ACC_W-1:0] acc,
  input  logic [3:0]              ps_shift,
  input  logic signed [BNA_W-1:0] bn_a,
  input  logic signed [BNB_W-1:0] bn_b,
  input  logic [3:0]              b_shift,
  input  logic [4:0]              bn_shift,
  input  logic                    bn_en,
  input  logic                    relu_en,
  output logic                    out_valid,
  output logic [7:0]              act
);

  logic signed [PS_W-1:0]  x;
  logic signed [17:0]      p_hh, p_hl, p_lh, p_ll;
  logic signed [ACC_W-1:0] prod, y, ysh;
  logic [7:0]              act_d;

  assign x = sat16(acc >>> ps_shift);

  // A = Ah:Al, x = xh:xl (high bytes signed, low bytes unsigned)
  nnp_mul8 u_hh (.a(x[15:8]), .a_signed(1'b1), .b(bn_a[15:8]), .b_signed(1'b1), .p(p_hh));
  nnp_mul8 u_hl (.a(x[7:0]),  .a_signed(1'b0), .b(bn_a[15:8]), .b_signed(1'b1), .p(p_hl));
  nnp_mul8 u_lh (.a(x[15:8]), .a_signed(1'b1), .b(bn_a[7:0]),  .b_signed(1'b0), .p(p_lh));
  nnp_mul8 u_ll (.a(x[7:0]),  .a_signed(1'b0), .b(bn_a[7:0]),  .b_signed(1'b0), .p(p_ll));

  always_comb begin
    prod = (ACC_W'(p_hh) <<< 16) + (ACC_W'(p_hl) <<< 8) + (ACC_W'(p_lh) <<< 8) + ACC_W'(p_ll);
    y    = bn_en ? prod + (ACC_W'(bn_b) <<< b_shift) : ACC_W'(x);
    ysh  = y >>> bn_shift;
    if (relu_en) begin
      if (ysh < 0)              act_d = 8'd0;
      else if (ysh > 32'sd255)  act_d = 8'd255;
      else                      act_d = ysh[7:0];
    end else begin
      if (ysh < -32'sd128)      act_d = 8'h80;
      else if (ysh > 32'sd127)  act_d = 8'h7f;
      else                      act_d = ysh[7:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      act       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) act <= act_d;
    end
  end

endmodule
