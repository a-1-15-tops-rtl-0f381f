// nnp_top: CNN processor for multi-scale object detection with only three
// layer types - 3x3 convolution, 1x1 convolution and 4x4 deconvolution.
//
// Structure (data flow left to right):
//   IN memory (9 x 16 kB) -> IN aligner -> 16 PECs x 8 PEs x 9 MACs
//        -> accumulators <-> PS aligner <-> PS memory (8 pairs x 2 x 16 kB)
//        -> BN MAC -> 8-bit activations out
// 8 input channels (64 in 1x1 convolution) and 16 output channels (8 in
// deconvolution) are processed in parallel: 1152 multipliers, i.e. 1.15 TOPS
// at 500 MHz when every one is busy.  Partial sums of one input-channel group
// are kept in PS memory and accumulated pass by pass; the last pass applies
// batch normalisation and ReLU and streams activations out.
//
// Host interface (all synchronous to clk, active-low asynchronous reset):
//   in_wr_*  write one 64-bit word into IN bank in_wr_bank (layout: nnp_in_mem)
//   wb_push  push wb_data into the W buffer of each selected PEC
//   cfg, start, busy, done, stall: run one pass (see nnp_ctrl); cfg must stay
//            stable while busy
//   act_*    activations of 16 PECs for output position (act_y, act_x) of the
//            scan.  Convolution: PEC i = output channel i.  Deconvolution:
//            PECs 2k and 2k+1 = output channel k, rows 2*act_y and
//            2*act_y + 1; act_sel = 0 for column 2*act_x, 1 for 2*act_x + 1.
// Latency: the activation of a window issued in cycle t appears in cycle t+7
// (t+8 for the second deconvolution column).  The organisation follows the
// processor description; the host interface is this design's.
module nnp_top
  import nnp_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = MEM_WORDS,  // words per 16 kB bank
  parameter int unsigned WB_DEPTH  = 4           // W buffer entries per PEC
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // pass control
  input  cfg_t                          cfg,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  output logic                          stall,
  // IN memory loading
  input  logic                          in_wr_en,
  input  logic [3:0]                    in_wr_bank,
  input  logic [$clog2(MEM_DEPTH)-1:0]  in_wr_addr,
  input  logic [WORD_W-1:0]             in_wr_data,
  // W buffer loading
  input  logic [N_PEC-1:0]              wb_push,
  input  wentry_t                       wb_data,
  output logic [N_PEC-1:0]              wb_full,
  // activations
  output logic                          act_valid,
  output logic                          act_sel,
  output logic [9:0]                    act_y,
  output logic [9:0]                    act_x,
  output logic [N_PEC-1:0][7:0]         act
);
  localparam int unsigned AW = $clog2(MEM_DEPTH);

  // ---------------- controller ----------------
  logic [N_PEC-1:0]                  wb_empty;
  logic                              load, in_rd_en, ps_rd_en, ps_wr_en, acc_en;
  logic [N_INBANK-1:0][AW-1:0]       in_rd_addr;
  logic [1:0]                        ymod, xmod;
  logic [N_TAP-1:0]                  mask;
  logic [AW-1:0]                     ps_rd_addr, ps_wr_addr;
  logic                              pos_valid;
  logic [9:0]                        pos_y, pos_x, pos_y_q, pos_x_q;

  nnp_ctrl #(.AW(AW)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .cfg(cfg), .start(start), .busy(busy), .done(done),
    .stall(stall), .wb_empty(wb_empty), .load(load),
    .in_rd_en(in_rd_en), .in_rd_addr(in_rd_addr),
    .aln_ymod(ymod), .aln_xmod(xmod), .aln_mask(mask),
    .ps_rd_en(ps_rd_en), .ps_rd_addr(ps_rd_addr), .acc_en(acc_en),
    .ps_wr_en(ps_wr_en), .ps_wr_addr(ps_wr_addr),
    .act_pos_valid(pos_valid), .act_y(pos_y), .act_x(pos_x));

  // ---------------- IN memory and aligner ----------------
  logic [N_INBANK-1:0][WORD_W-1:0]   in_rd_data;
  logic [N_PE-1:0][N_TAP-1:0][7:0]   pix;

  nnp_in_mem #(.WORDS(MEM_DEPTH)) u_in_mem (
    .clk(clk), .rd_en(in_rd_en), .rd_addr(in_rd_addr), .rd_data(in_rd_data),
    .wr_en(in_wr_en), .wr_bank(in_wr_bank), .wr_addr(in_wr_addr), .wr_data(in_wr_data));

  nnp_in_aligner u_in_aln (
    .clk(clk), .rst_n(rst_n), .en(1'b1), .op(cfg.op), .ymod(ymod), .xmod(xmod),
    .mask(mask), .bank(in_rd_data), .pix(pix));

  // ---------------- PECs ----------------
  logic [N_PEC-1:0][PS_W-1:0]        ps_a_in, ps_b_in, ps_a_out, ps_b_out;
  logic [N_PEC-1:0]                  ps_valid, act_v, act_s;

  for (genvar i = 0; i < N_PEC; i++) begin : g_pec
    nnp_pec #(.WB_DEPTH(WB_DEPTH)) u_pec (
      .clk(clk), .rst_n(rst_n), .op(cfg.op), .half(1'(i % 2)), .in_signed(cfg.in_signed),
      .ps_shift(cfg.ps_shift), .b_shift(cfg.b_shift), .bn_shift(cfg.bn_shift),
      .bn_en(cfg.bn_en), .relu_en(cfg.relu_en),
      .wb_push(wb_push[i]), .wb_data(wb_data), .wb_empty(wb_empty[i]), .wb_full(wb_full[i]),
      .load(load), .pix(pix), .acc_en(acc_en), .first(cfg.first_pass), .last(cfg.last_pass),
      .ps_a_in(ps_a_in[i]), .ps_b_in(ps_b_in[i]),
      .ps_valid(ps_valid[i]), .ps_a_out(ps_a_out[i]), .ps_b_out(ps_b_out[i]),
      .act_valid(act_v[i]), .act_sel(act_s[i]), .act(act[i]));
  end

  // ---------------- PS aligner and memory ----------------
  logic [N_PSPAIR-1:0]                  pm_en, pm_we;
  logic [N_PSPAIR-1:0][AW-1:0]          pm_addr;
  logic [N_PSPAIR-1:0][7:0][PS_W-1:0]   pm_wdata, pm_rdata;

  nnp_ps_aligner #(.AW(AW)) u_ps_aln (
    .clk(clk), .rst_n(rst_n), .op(cfg.op), .rd_pair(cfg.rd_pair), .wr_pair(cfg.wr_pair),
    .rd_en(ps_rd_en), .rd_addr(ps_rd_addr), .ps_a(ps_a_in), .ps_b(ps_b_in),
    .wr_en(ps_wr_en), .wr_addr(ps_wr_addr), .wr_a(ps_a_out), .wr_b(ps_b_out),
    .mem_en(pm_en), .mem_we(pm_we), .mem_addr(pm_addr), .mem_wdata(pm_wdata),
    .mem_rdata(pm_rdata));

  nnp_ps_mem #(.WORDS(MEM_DEPTH)) u_ps_mem (
    .clk(clk), .en(pm_en), .we(pm_we), .addr(pm_addr), .wdata(pm_wdata), .rdata(pm_rdata));

  // ---------------- activation output ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_y_q <= '0; pos_x_q <= '0;
    end else if (pos_valid) begin
      pos_y_q <= pos_y; pos_x_q <= pos_x;
    end
  end

  assign act_valid = act_v[0];
  assign act_sel   = act_s[0];
  assign act_y     = pos_valid ? pos_y : pos_y_q;
  assign act_x     = pos_valid ? pos_x : pos_x_q;

  // all PECs run in lock-step; the write strobe must match the PEC pipeline
  a_ps_write_aligned: assert property (@(posedge clk) disable iff (!rst_n)
                                       ps_wr_en |-> ps_valid[0]);
  a_pecs_lockstep:    assert property (@(posedge clk) disable iff (!rst_n)
                                       (act_v == '0) || (act_v == '1));

endmodule
