// nnp_w_buffer: W buffer of a PEC - a FIFO of kernel weights and BN parameters.
//
// Each entry holds everything one PEC needs for one pass: 8 PEs x 9 signed
// 8-bit weights, the 16-bit BN scale A_c and the 8-bit BN offset B_c
// (nnp_pkg::wentry_t).  The host pushes entries ahead of time; the PEC pops
// one when a pass starts and keeps it in its weight registers for the whole
// pass (weight-stationary), so the next pass's weights can be loaded while
// the current one runs.  Synchronous FIFO, first-word-fall-through: rd_data
// shows the head entry whenever empty = 0; push and pop may happen in the
// same cycle.  A push when full or a pop when empty is ignored (asserted).
// That the weights and BN parameters live in per-PEC FIFOs follows the
// processor description; the depth and entry format are this design's.
module nnp_w_buffer
  import nnp_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    push,
  input  wentry_t wr_data,
  input  logic    pop,
  output wentry_t rd_data,
  output logic    empty,
  output logic    full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  wentry_t           mem [DEPTH];
  logic [AW-1:0]     wp, rp;
  logic [AW:0]       cnt;

  assign empty   = (cnt == 0);
  assign full    = (cnt == (AW+1)'(DEPTH));
  assign rd_data = mem[rp];

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
