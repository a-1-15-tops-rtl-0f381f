// nnp_sram: one 16 kB on-chip memory bank (2048 words x 64 bit).
//
// Single-port synchronous SRAM model: one read or one write per cycle.  A
// read returns the addressed word on rdata in the next cycle; rdata holds its
// value when the bank is not read.  The processor has 25 such banks (9 IN,
// 16 PS, 400 kB in all); in silicon they are SRAM macros, here the bank is a
// plain memory array that synthesis may map to a macro.  Contents are not
// reset.
module nnp_sram #(
  parameter int unsigned WORDS = 2048,
  parameter int unsigned W     = 64
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
