// nnp_ps_aligner: PS memory aligner - routes partial sums between the eight
// PS memory pairs A..H and the accumulators of the 16 PECs.
//
// PECs 0-7 use pairs A-D, PECs 8-15 use pairs E-H; lane p of a pair word
// belongs to PEC p (or 8 + p).  Every pass reads the old partial sums from one
// set of pairs and writes the renewed ones to another set, so each
// single-ported pair does at most one access per cycle.
//   Convolution  : ACC0 reads pair rd_pair and writes pair wr_pair of each
//                  half (one read and one write pair per half per cycle).
//   Deconvolution: each PEC has two results (ACC1, ACC2); ACC1 uses pair
//                  2*rd_pair[1] and ACC2 pair 2*rd_pair[1] + 1 for reading, and
//                  likewise 2*wr_pair[1] (+1) for writing, so all four pairs
//                  of a half are busy: twice the convolution bandwidth.
// Pass to pass the host swaps rd_pair and wr_pair (ping-pong).  Reads are
// issued with rd_en/rd_addr and their data appear on ps_a/ps_b one cycle
// later; the read routing is registered with the request.  Writes take
// wr_a/wr_b in the same cycle as wr_en.  A read and a write of the same pair
// in one cycle is a programming error and is asserted against.
// The pair split A-D / E-H, the ACC0 vs ACC1/ACC2 usage and the doubled
// deconvolution bandwidth follow the processor description; the exact pair
// numbering per pass is this design's choice.
module nnp_ps_aligner
  import nnp_pkg::*;
#(
  parameter int unsigned AW = $clog2(MEM_WORDS)
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  op_e                                    op,
  input  logic [1:0]                             rd_pair,
  input  logic [1:0]                             wr_pair,
  // accumulator side
  input  logic                                   rd_en,
  input  logic [AW-1:0]                          rd_addr,
  output logic [N_PEC-1:0][PS_W-1:0]             ps_a,
  output logic [N_PEC-1:0][PS_W-1:0]             ps_b,
  input  logic                                   wr_en,
  input  logic [AW-1:0]                          wr_addr,
  input  logic [N_PEC-1:0][PS_W-1:0]             wr_a,
  input  logic [N_PEC-1:0][PS_W-1:0]             wr_b,
  // memory side
  output logic [N_PSPAIR-1:0]                    mem_en,
  output logic [N_PSPAIR-1:0]                    mem_we,
  output logic [N_PSPAIR-1:0][AW-1:0]            mem_addr,
  output logic [N_PSPAIR-1:0][7:0][PS_W-1:0]     mem_wdata,
  input  logic [N_PSPAIR-1:0][7:0][PS_W-1:0]     mem_rdata
);
  logic       dec;
  logic [1:0] ra, rb, wa, wb;      // pair index within a half for ACC a/b
  logic [3:0] rd_mask, wr_mask;    // pairs used within a half

  always_comb begin
    dec = (op == OP_DECONV);
    ra  = dec ? {rd_pair[1], 1'b0} : rd_pair;
    rb  = {rd_pair[1], 1'b1};
    wa  = dec ? {wr_pair[1], 1'b0} : wr_pair;
    wb  = {wr_pair[1], 1'b1};
    rd_mask = '0;
    wr_mask = '0;
    rd_mask[ra] = 1'b1;
    wr_mask[wa] = 1'b1;
    if (dec) begin
      rd_mask[rb] = 1'b1;
      wr_mask[wb] = 1'b1;
    end
    for (int h = 0; h < 2; h++) begin
      for (int q = 0; q < 4; q++) begin
        mem_en  [4*h + q] = (rd_en && rd_mask[q]) || (wr_en && wr_mask[q]);
        mem_we  [4*h + q] = wr_en && wr_mask[q];
        mem_addr[4*h + q] = (wr_en && wr_mask[q]) ? wr_addr : rd_addr;
        for (int p = 0; p < 8; p++)
          mem_wdata[4*h + q][p] = (dec && q == int'(wb)) ? wr_b[8*h + p] : wr_a[8*h + p];
      end
    end
  end

  // read routing, registered with the request
  logic [1:0] ra_q, rb_q;
  logic       dec_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ra_q <= '0; rb_q <= '0; dec_q <= 1'b0;
    end else if (rd_en) begin
      ra_q <= ra; rb_q <= rb; dec_q <= dec;
    end
  end

  always_comb begin
    for (int h = 0; h < 2; h++)
      for (int p = 0; p < 8; p++) begin
        ps_a[8*h + p] = mem_rdata[4*h + int'(ra_q)][p];
        ps_b[8*h + p] = dec_q ? mem_rdata[4*h + int'(rb_q)][p] : '0;
      end
  end

  a_no_pair_conflict: assert property (@(posedge clk) disable iff (!rst_n)
                                       (rd_en && wr_en) |-> ((rd_mask & wr_mask) == 4'b0));

endmodule
