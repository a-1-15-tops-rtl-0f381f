// nnp_pec: processor element cluster (PEC) - one output channel.
//
// A PEC holds eight PEs (one per input channel of the current group), a W
// buffer FIFO, the accumulators and a batch-normalisation MAC.  All PECs see
// the same aligned input pixels; each has its own weights, so the 16 PECs
// compute 16 output channels in parallel (8 output channels in
// deconvolution, where PECs 2k and 2k+1 pair up for one output channel and
// produce output rows 2y and 2y+1 respectively; see nnp_pe).
//
// Datapath per window (pix valid in cycle T):
//   T+3  the eight PE results (20 bit) are summed by a tree of two-input
//        32-bit adders and added to the old partial sum read from PS memory
//        (16 bit, scaled back by <<< ps_shift; zero on the first pass):
//        ACC0 in convolution; ACC1 (out0 of the PEs) and ACC2 (out1) in
//        deconvolution.  ACC0 and ACC1 share one adder tree.
//   T+4  acc_a / acc_b registered; ps_a_out / ps_b_out = sat16(acc >>> ps_shift)
//        is the renewed partial sum for PS memory (ps_valid).
//   T+5  on the last pass, the BN MAC turns acc_a into an 8-bit activation
//        (act_valid, act_sel = 0); in deconvolution acc_b follows a cycle
//        later (act_sel = 1), as there is one BN MAC per PEC.  The controller
//        therefore issues deconvolution windows every other cycle on the
//        last pass.
// Weights: load pops one W buffer entry into the weight registers, which
// stay fixed for the pass (weight-stationary).
// Organisation, widths and the four-multiplier BN MAC follow the processor
// description; the timing above, the shared ACC0/ACC1 tree and the single-BN
// serialisation of deconvolution outputs are this design's choices.
module nnp_pec
  import nnp_pkg::*;
#(
  parameter int unsigned WB_DEPTH = 4
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // configuration (constant during a pass)
  input  op_e                               op,
  input  logic                              half,
  input  logic                              in_signed,
  input  logic [3:0]                        ps_shift,
  input  logic [3:0]                        b_shift,
  input  logic [4:0]                        bn_shift,
  input  logic                              bn_en,
  input  logic                              relu_en,
  // W buffer
  input  logic                              wb_push,
  input  wentry_t                           wb_data,
  output logic                              wb_empty,
  output logic                              wb_full,
  input  logic                              load,
  // datapath
  input  logic [N_PE-1:0][N_TAP-1:0][7:0]   pix,
  input  logic                              acc_en,    // PE results valid (T+3)
  input  logic                              first,
  input  logic                              last,
  input  logic signed [PS_W-1:0]            ps_a_in,
  input  logic signed [PS_W-1:0]            ps_b_in,
  output logic                              ps_valid,
  output logic signed [PS_W-1:0]            ps_a_out,
  output logic signed [PS_W-1:0]            ps_b_out,
  output logic                              act_valid,
  output logic                              act_sel,
  output logic [7:0]                        act
);

  // ---------------- W buffer and weight registers ----------------
  wentry_t wb_head, w_q;
  nnp_w_buffer #(.DEPTH(WB_DEPTH)) u_wbuf (
    .clk(clk), .rst_n(rst_n), .push(wb_push), .wr_data(wb_data),
    .pop(load), .rd_data(wb_head), .empty(wb_empty), .full(wb_full));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 w_q <= '0;
    else if (load && !wb_empty) w_q <= wb_head;
  end

  // ---------------- PEs ----------------
  logic signed [PE_W-1:0] o0 [N_PE];
  logic signed [PE_W-1:0] o1 [N_PE];
  for (genvar j = 0; j < N_PE; j++) begin : g_pe
    nnp_pe u_pe (
      .clk(clk), .rst_n(rst_n), .en(1'b1), .op(op), .half(half), .in_signed(in_signed),
      .pix(pix[j]), .w(w_q.w[j]), .out0(o0[j]), .out1(o1[j]));
  end

  // ---------------- accumulators ----------------
  function automatic logic signed [ACC_W-1:0] tree8(input logic signed [PE_W-1:0] v [N_PE]);
    logic signed [ACC_W-1:0] l1 [4];
    logic signed [ACC_W-1:0] l2 [2];
    for (int i = 0; i < 4; i++) l1[i] = ACC_W'(v[2*i]) + ACC_W'(v[2*i+1]);
    for (int i = 0; i < 2; i++) l2[i] = l1[2*i] + l1[2*i+1];
    return l2[0] + l2[1];
  endfunction

  logic signed [ACC_W-1:0] sum_a, sum_b, old_a, old_b, acc_a, acc_b;
  logic                    last_q, dec_q, bn_second;

  always_comb begin
    sum_a = tree8(o0);
    sum_b = tree8(o1);
    old_a = first ? '0 : (ACC_W'(ps_a_in) <<< ps_shift);
    old_b = first ? '0 : (ACC_W'(ps_b_in) <<< ps_shift);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_a <= '0; acc_b <= '0; ps_valid <= 1'b0; last_q <= 1'b0; dec_q <= 1'b0;
      bn_second <= 1'b0;
    end else begin
      ps_valid  <= acc_en;
      bn_second <= ps_valid && last_q && dec_q;
      if (acc_en) begin
        acc_a  <= sum_a + old_a;
        acc_b  <= (op == OP_DECONV) ? sum_b + old_b : '0;
        last_q <= last;
        dec_q  <= (op == OP_DECONV);
      end
    end
  end

  assign ps_a_out = sat16(acc_a >>> ps_shift);
  assign ps_b_out = sat16(acc_b >>> ps_shift);

  // ---------------- batch normalisation ----------------
  logic bn_in_valid;
  assign bn_in_valid = (ps_valid && last_q) || bn_second;

  nnp_bn_mac u_bn (
    .clk(clk), .rst_n(rst_n), .in_valid(bn_in_valid),
    .acc(bn_second ? acc_b : acc_a), .ps_shift(ps_shift),
    .bn_a(w_q.bn_a), .bn_b(w_q.bn_b), .b_shift(b_shift), .bn_shift(bn_shift),
    .bn_en(bn_en), .relu_en(relu_en), .out_valid(act_valid), .act(act));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) act_sel <= 1'b0;
    else        act_sel <= bn_second;
  end

  a_deconv_bn_gap: assert property (@(posedge clk) disable iff (!rst_n)
                                    bn_second |-> !ps_valid);

endmodule
