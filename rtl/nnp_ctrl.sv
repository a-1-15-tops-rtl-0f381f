// nnp_ctrl: pass controller - scans the kernel over the feature map and
// sequences the memories and the PEC pipeline for one pass.
//
// A pass computes one group of input channels (8 for 3x3 convolution and
// deconvolution, 64 for 1x1 convolution) for all output channels and all
// output positions, accumulating into the partial sums of earlier passes.
// The host sets cfg and pulses start; the controller
//   1. waits until every PEC's W buffer holds an entry (a weight stall),
//   2. pops one entry into every PEC (load),
//   3. scans the window from the top-left corner downwards by the stride;
//      at the bottom it continues at the top of the next column, reading all
//      needed inputs again from the IN memory,
//   4. waits for the pipeline to drain and pulses done.
// One window is issued per cycle, except on the last pass of a
// deconvolution, where a window is issued every second cycle because the
// single BN MAC of a PEC must process two results per window.
// For each issued window (cycle t) it drives the nine IN bank addresses and
// then, delayed to match the datapath: aligner rotation and padding mask
// (t+1), PS read (t+4, not on the first pass), PEC accumulate enable (t+5),
// PS write (t+6, not on the last pass) and the output position of the
// activation (t+7).  The PS word address of a window is ps_base + its scan
// index.
// The column-wise scan order follows the processor description; the IN
// memory layout (see nnp_in_mem), the timing and the start/done handshake
// are this design's choices.
module nnp_ctrl
  import nnp_pkg::*;
#(
  parameter int unsigned AW = $clog2(MEM_WORDS)
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  cfg_t                                 cfg,
  input  logic                                 start,
  output logic                                 busy,
  output logic                                 done,
  output logic                                 stall,     // waiting for weights
  // W buffers
  input  logic [N_PEC-1:0]                     wb_empty,
  output logic                                 load,
  // IN memory (cycle t)
  output logic                                 in_rd_en,
  output logic [N_INBANK-1:0][AW-1:0]          in_rd_addr,
  // IN aligner (cycle t+1)
  output logic [1:0]                           aln_ymod,
  output logic [1:0]                           aln_xmod,
  output logic [N_TAP-1:0]                     aln_mask,
  // PS memory and PECs
  output logic                                 ps_rd_en,
  output logic [AW-1:0]                        ps_rd_addr,
  output logic                                 acc_en,
  output logic                                 ps_wr_en,
  output logic [AW-1:0]                        ps_wr_addr,
  output logic                                 act_pos_valid,
  output logic [9:0]                           act_y,
  output logic [9:0]                           act_x
);

  typedef enum logic [2:0] {S_IDLE, S_WAITW, S_LOAD, S_RUN, S_DRAIN} state_e;
  state_e state;

  // output map size and scan step, latched at start
  logic [9:0]        oh, ow, oy, ox;
  logic              dec, c1, slow, phase;
  logic [3:0]        drain;

  // window origin: row ty = tyd*3 + tym (floor division), column likewise
  logic signed [11:0] ty, tx;
  logic signed [11:0] tyd, txd;
  logic [1:0]         tym, txm;
  logic signed [AW+1:0] rowbase;   // tyd*pitch (3x3) or ty*pitch (1x1)
  logic [AW-1:0]      pos;

  logic [1:0] ystep;
  assign ystep = dec ? 2'd1 : (cfg.stride2 ? 2'd2 : 2'd1);

  function automatic logic [9:0] out_dim(input logic [9:0] n, input op_e op,
                                         input logic s2, input logic pad);
    logic [10:0] span;
    if (op == OP_DECONV) return n;
    span = (op == OP_CONV3) ? 11'(n) + (pad ? 11'd2 : 11'd0) - 11'd3 : 11'(n) - 11'd1;
    return 10'(s2 ? (span >> 1) + 11'd1 : span + 11'd1);
  endfunction

  logic issue;
  assign issue = (state == S_RUN) && (!slow || !phase);

  logic signed [11:0] t0;     // first row/column of the window origin
  assign t0 = (cfg.op == OP_DECONV || (cfg.op == OP_CONV3 && cfg.pad)) ? -12'sd1 : 12'sd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; oh <= '0; ow <= '0; oy <= '0; ox <= '0; dec <= 1'b0; c1 <= 1'b0;
      slow <= 1'b0; phase <= 1'b0; drain <= '0; ty <= '0; tx <= '0; tyd <= '0; txd <= '0;
      tym <= '0; txm <= '0; rowbase <= '0; pos <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          oh    <= out_dim(cfg.in_h, cfg.op, cfg.stride2, cfg.pad);
          ow    <= out_dim(cfg.in_w, cfg.op, cfg.stride2, cfg.pad);
          dec   <= (cfg.op == OP_DECONV);
          c1    <= (cfg.op == OP_CONV1);
          slow  <= (cfg.op == OP_DECONV) && cfg.last_pass;
          state <= S_WAITW;
        end
        S_WAITW: if (wb_empty == '0) state <= S_LOAD;
        S_LOAD: begin
          oy <= '0; ox <= '0; pos <= cfg.ps_base; phase <= 1'b0;
          ty <= t0; tx <= t0;
          tyd <= (t0 < 0) ? -12'sd1 : 12'sd0; tym <= (t0 < 0) ? 2'd2 : 2'd0;
          txd <= (t0 < 0) ? -12'sd1 : 12'sd0; txm <= (t0 < 0) ? 2'd2 : 2'd0;
          rowbase <= (t0 < 0) ? -(AW+2)'(cfg.in_pitch) : '0;
          state <= S_RUN;
        end
        S_RUN: begin
          phase <= slow ? !phase : 1'b0;
          if (issue) begin
            pos <= pos + 1'b1;
            if (oy == oh - 1'b1) begin
              // next column, back to the top
              oy  <= '0;
              ty  <= t0;
              tyd <= (t0 < 0) ? -12'sd1 : 12'sd0; tym <= (t0 < 0) ? 2'd2 : 2'd0;
              rowbase <= (t0 < 0) ? -(AW+2)'(cfg.in_pitch) : '0;
              tx  <= tx + 12'(ystep);
              if (32'(txm) + 32'(ystep) >= 3) begin
                txm <= 2'(txm + ystep - 2'd3); txd <= txd + 1'b1;
              end else txm <= txm + ystep;
              if (ox == ow - 1'b1) begin
                state <= S_DRAIN;
                drain <= 4'd9;
              end
              ox <= ox + 1'b1;
            end else begin
              oy <= oy + 1'b1;
              ty <= ty + 12'(ystep);
              if (c1) rowbase <= rowbase + ((AW+2)'(cfg.in_pitch) << (ystep - 1'b1));
              if (32'(tym) + 32'(ystep) >= 3) begin
                tym <= 2'(tym + ystep - 2'd3); tyd <= tyd + 1'b1;
                if (!c1) rowbase <= rowbase + (AW+2)'(cfg.in_pitch);
              end else tym <= tym + ystep;
            end
          end
        end
        S_DRAIN: begin
          drain <= drain - 1'b1;
          if (drain == 0) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy  = (state != S_IDLE);
  assign stall = (state == S_WAITW) && (wb_empty != '0);
  assign load  = (state == S_LOAD);
  assign done  = (state == S_DRAIN) && (drain == 0);

  // ---- IN addresses and padding mask for the window issued now ----
  logic [N_TAP-1:0] mask_d;
  always_comb begin
    in_rd_en = issue;
    mask_d   = '0;
    for (int br = 0; br < 3; br++) begin
      for (int bc = 0; bc < 3; bc++) begin
        int unsigned r, c;
        logic signed [AW+1:0] a;
        r = (br + 3 - int'(tym)) % 3;
        c = (bc + 3 - int'(txm)) % 3;
        a = (AW+2)'(cfg.in_base) + rowbase
          + ((int'(tym) + r >= 3) ? (AW+2)'(cfg.in_pitch) : '0)
          + (AW+2)'(txd) + ((int'(txm) + c >= 3) ? (AW+2)'(1) : '0);
        if (c1) a = (AW+2)'(cfg.in_base) + rowbase + (AW+2)'(tx);
        in_rd_addr[3*br + bc] = a[AW-1:0];
      end
    end
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        mask_d[3*r + c] = (ty + 12'(r) >= 0) && (ty + 12'(r) < 12'(cfg.in_h)) &&
                          (tx + 12'(c) >= 0) && (tx + 12'(c) < 12'(cfg.in_w));
    if (c1) mask_d = '1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aln_ymod <= '0; aln_xmod <= '0; aln_mask <= '0;
    end else if (issue) begin
      aln_ymod <= tym; aln_xmod <= txm; aln_mask <= mask_d;
    end
  end

  // ---- delay line for the datapath stages ----
  typedef struct packed {
    logic          v;
    logic [AW-1:0] pos;
    logic [9:0]    y;
    logic [9:0]    x;
  } tag_t;
  tag_t dl [1:7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= 7; i++) dl[i] <= '0;
    end else begin
      dl[1] <= '{v: issue, pos: pos, y: oy, x: ox};
      for (int i = 2; i <= 7; i++) dl[i] <= dl[i-1];
    end
  end

  assign ps_rd_en      = dl[4].v && !cfg.first_pass;
  assign ps_rd_addr    = dl[4].pos;
  assign acc_en        = dl[5].v;
  assign ps_wr_en      = dl[6].v && !cfg.last_pass;
  assign ps_wr_addr    = dl[6].pos;
  assign act_pos_valid = dl[7].v && cfg.last_pass;
  assign act_y         = dl[7].y;
  assign act_x         = dl[7].x;

endmodule
