// nnp_in_mem: IN memory - nine 16 kB banks a..i (144 kB) holding feature maps.
//
// Each 64-bit word holds one pixel of eight channels.  For 3x3 convolution
// and deconvolution a feature map is spread over the banks so that any 3x3
// window touches every bank exactly once: pixel (y, x) of a channel group
// lives in bank 3*(y mod 3) + (x mod 3) at word base + (y div 3)*pitch +
// (x div 3).  For 1x1 convolution the 64 channels of one pixel are spread
// over banks a-d and f-i (bank e unused), all at the same word address.
// The layout is this design's choice; the bank count, size and word width
// follow the processor description.
// Read port: all nine banks are read in the same cycle, each at its own
// address; data arrive one cycle later.  Write port (host loading): one word
// per cycle into a chosen bank; it wins over a read of the same bank.
module nnp_in_mem
  import nnp_pkg::*;
#(
  parameter int unsigned WORDS = MEM_WORDS
) (
  input  logic                                     clk,
  input  logic                                     rd_en,
  input  logic [N_INBANK-1:0][$clog2(WORDS)-1:0]   rd_addr,
  output logic [N_INBANK-1:0][WORD_W-1:0]          rd_data,
  input  logic                                     wr_en,
  input  logic [3:0]                               wr_bank,
  input  logic [$clog2(WORDS)-1:0]                 wr_addr,
  input  logic [WORD_W-1:0]                        wr_data
);
  for (genvar b = 0; b < N_INBANK; b++) begin : g_bank
    logic wsel;
    assign wsel = wr_en && (wr_bank == 4'(b));
    nnp_sram #(.WORDS(WORDS), .W(WORD_W)) u_bank (
      .clk  (clk),
      .en   (rd_en || wsel),
      .we   (wsel),
      .addr (wsel ? wr_addr : rd_addr[b]),
      .wdata(wr_data),
      .rdata(rd_data[b])
    );
  end
endmodule
