// nnp_mul8: 8 x 8 bit multiplier of the PE datapath.
//
// The input operand a is either signed or unsigned (only the first layer of
// the network has signed inputs, every later layer feeds unsigned ReLU
// activations); the weight b is always signed.  The 16-bit product covers
// both cases: 255 x -128 = -32640 and -128 x -128 = 16384 fit.  The same cell
// also takes an unsigned b (b_signed = 0), which the batch-normalisation MAC
// needs for the low bytes of its 16 x 16 product; the product is then 17 bit
// wide, so the output is 18 bit and the PE uses its low 16 bits.
// The processor uses a Wallace tree here; this model writes the product as a
// single multiply of two sign-extended 9-bit operands and leaves the tree to
// synthesis.  Purely combinational.
module nnp_mul8 (
  input  logic [7:0]         a,
  input  logic               a_signed,
  input  logic [7:0]         b,
  input  logic               b_signed,
  output logic signed [17:0] p
);
  logic signed [8:0] ax, bx;
  always_comb begin
    ax = {a_signed & a[7], a};
    bx = {b_signed & b[7], b};
    p  = ax * bx;
  end
endmodule
