// tb_nnp_ctrl: runs the pass controller over several layer shapes (3x3 conv
// with and without padding, stride 2, 1x1 conv, deconvolution, and a last
// deconvolution pass at half rate) with W buffers that start empty.  For
// every issued window it checks, against a column-major scan computed here,
// the nine IN bank addresses of all in-map pixels, the padding mask and bank
// rotation one cycle later, and the PS read / accumulate / PS write /
// activation-position strobes at +4 / +5 / +6 / +7 cycles with their
// addresses; it also checks the weight stall, the single load pulse, the
// number of windows and the issue rate.
module tb_nnp_ctrl;
  import nnp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t cfg;
  logic start, busy, done, stall, load, in_rd_en, ps_rd_en, acc_en, ps_wr_en, act_pos_valid;
  logic [15:0] wb_empty;
  logic [8:0][10:0] in_rd_addr;
  logic [1:0] aln_ymod, aln_xmod;
  logic [8:0] aln_mask;
  logic [10:0] ps_rd_addr, ps_wr_addr;
  logic [9:0] act_y, act_x;
  int checks = 0, failures = 0;

  nnp_ctrl dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // expected windows
  int wy [$], wx [$], oyq [$], oxq [$];
  int icyc [$];
  int nissue, nload, nstall;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // monitor: everything is checked against the window issued k cycles earlier
  always @(negedge clk) if (rst_n) begin
    if (load) nload++;
    if (stall) nstall++;
    if (in_rd_en) begin
      int k, ty, tx;
      k = nissue; nissue++;
      icyc.push_back(cyc);
      ty = wy[k]; tx = wx[k];
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          int y, x;
          y = ty + r; x = tx + c;
          if (cfg.op == OP_CONV1) begin
            if (r == 0 && c == 0)
              for (int b = 0; b < 9; b++)
                chk(in_rd_addr[b] == 11'(cfg.in_base + y * cfg.in_pitch + x), "conv1 addr");
          end else if (y >= 0 && x >= 0 && y < cfg.in_h && x < cfg.in_w)
            chk(in_rd_addr[3 * (y % 3) + (x % 3)] == 11'(cfg.in_base + (y / 3) * cfg.in_pitch + x / 3),
                "IN addr");
        end
    end
    // aligner controls for the window issued one cycle ago
    if (icyc.size() > 0) begin
      for (int k = 0; k < icyc.size(); k++) begin
        int d, idx, ty, tx;
        d = cyc - icyc[k];
        idx = nissue - icyc.size() + k;
        ty = wy[idx]; tx = wx[idx];
        if (d == 1 && cfg.op != OP_CONV1) begin
          logic [8:0] m;
          for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++)
            m[3*r + c] = (ty + r >= 0) && (tx + c >= 0) && (ty + r < cfg.in_h) && (tx + c < cfg.in_w);
          chk(aln_mask == m && aln_ymod == 2'((ty + 3) % 3) && aln_xmod == 2'((tx + 3) % 3), "aligner ctl");
        end
        if (d == 4) chk(ps_rd_en == !cfg.first_pass && (cfg.first_pass || ps_rd_addr == 11'(cfg.ps_base + idx)), "ps rd");
        if (d == 5) chk(acc_en, "acc_en");
        if (d == 6) chk(ps_wr_en == !cfg.last_pass && (cfg.last_pass || ps_wr_addr == 11'(cfg.ps_base + idx)), "ps wr");
        if (d == 7) chk(act_pos_valid == cfg.last_pass &&
                        (!cfg.last_pass || (int'(act_y) == oyq[idx] && int'(act_x) == oxq[idx])), "act pos");
      end
      while (icyc.size() > 0 && cyc - icyc[0] >= 7) void'(icyc.pop_front());
    end
  end

  task automatic run(input op_e op, input int h, input int w, input bit s2, input bit pad,
                     input bit last, input int base);
    int oh, ow, s, t0, first_issue, last_issue;
    cfg = '0;
    cfg.op = op; cfg.stride2 = s2; cfg.pad = pad; cfg.in_h = 10'(h); cfg.in_w = 10'(w);
    cfg.first_pass = !last; cfg.last_pass = last;
    cfg.in_pitch = 11'((op == OP_CONV1) ? w : (w + 2) / 3); cfg.in_base = 11'(base);
    cfg.ps_base = 11'(base * 2);
    s = s2 ? 2 : 1;
    if (op == OP_CONV3) begin oh = (h + 2*pad - 3) / s + 1; ow = (w + 2*pad - 3) / s + 1; t0 = -pad; end
    else if (op == OP_CONV1) begin oh = (h - 1) / s + 1; ow = (w - 1) / s + 1; t0 = 0; end
    else begin oh = h; ow = w; s = 1; t0 = -1; end
    wy.delete(); wx.delete(); oyq.delete(); oxq.delete();
    for (int ox = 0; ox < ow; ox++)
      for (int oy = 0; oy < oh; oy++) begin
        wy.push_back(t0 + oy * s); wx.push_back(t0 + ox * s); oyq.push_back(oy); oxq.push_back(ox);
      end
    nissue = 0; nload = 0; nstall = 0;
    wb_empty = '1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (4) @(negedge clk);
    wb_empty = 16'h0001;
    @(negedge clk);
    wb_empty = '0;
    first_issue = -1;
    while (!done) begin
      @(negedge clk);
      if (in_rd_en && first_issue < 0) first_issue = cyc;
      if (in_rd_en) last_issue = cyc;
    end
    @(negedge clk);
    chk(nissue == oh * ow, "window count");
    chk(nload == 1, "one load");
    chk(nstall >= 5, "stall");
    chk(last_issue - first_issue == ((op == OP_DECONV && last) ? 2 : 1) * (oh * ow - 1), "issue rate");
    chk(!busy, "idle after done");
  endtask

  initial begin
    cfg = '0; start = 0; wb_empty = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(OP_CONV3, 7, 8, 0, 1, 0, 0);
    run(OP_CONV3, 9, 7, 1, 0, 1, 40);
    run(OP_CONV3, 8, 10, 1, 1, 0, 3);
    run(OP_CONV1, 5, 6, 0, 0, 0, 17);
    run(OP_CONV1, 7, 5, 1, 0, 1, 0);
    run(OP_DECONV, 5, 7, 0, 0, 0, 9);
    run(OP_DECONV, 4, 5, 0, 0, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
