// nnp_ps_mem: PS memory - sixteen 16 kB banks (256 kB) for 16-bit partial sums.
//
// A bank word is 64 bit, i.e. 8 bits of 8 output channels, so a 16-bit
// partial sum is split over a pair of banks: X0 holds the upper bytes and X1
// the lower bytes of the same 8 channels (pairs A..H).  This module presents
// each pair as one 8 x 16-bit port; both banks of a pair are accessed
// together.  Each pair is single ported: per cycle it is either read (data
// one cycle later) or written.  The pairing and sizes follow the processor
// description; which byte goes to which bank of a pair is this design's
// choice.
module nnp_ps_mem
  import nnp_pkg::*;
#(
  parameter int unsigned WORDS = MEM_WORDS
) (
  input  logic                                          clk,
  input  logic [N_PSPAIR-1:0]                           en,
  input  logic [N_PSPAIR-1:0]                           we,
  input  logic [N_PSPAIR-1:0][$clog2(WORDS)-1:0]        addr,
  input  logic [N_PSPAIR-1:0][7:0][PS_W-1:0]            wdata,
  output logic [N_PSPAIR-1:0][7:0][PS_W-1:0]            rdata
);
  for (genvar p = 0; p < N_PSPAIR; p++) begin : g_pair
    logic [WORD_W-1:0] whi, wlo, rhi, rlo;
    always_comb begin
      for (int c = 0; c < 8; c++) begin
        whi[8*c +: 8] = wdata[p][c][15:8];
        wlo[8*c +: 8] = wdata[p][c][7:0];
        rdata[p][c]   = {rhi[8*c +: 8], rlo[8*c +: 8]};
      end
    end
    nnp_sram #(.WORDS(WORDS), .W(WORD_W)) u_hi (
      .clk(clk), .en(en[p]), .we(we[p]), .addr(addr[p]), .wdata(whi), .rdata(rhi));
    nnp_sram #(.WORDS(WORDS), .W(WORD_W)) u_lo (
      .clk(clk), .en(en[p]), .we(we[p]), .addr(addr[p]), .wdata(wlo), .rdata(rlo));
  end
endmodule
