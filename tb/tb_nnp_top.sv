// tb_nnp_top: end-to-end test of the processor at its default sizes.
//
// Runs six small layers through the whole chip - IN memory, aligner, 16 PECs,
// PS memory and BN - and compares every activation with a reference model
// written here directly from the layer definitions (plain convolution and
// scatter-form transposed convolution, with the same dynamic fixed-point
// rules: 16-bit partial sums between passes, 16 x 16 BN, 8-bit output).
// Layers cover: 3x3 conv with padding and signed input over three passes
// (ping-pong of PS pairs, partial-sum saturation), 3x3 conv stride 2 without
// padding, 1x1 conv over 128 channels (two passes) and stride 2, 4x4
// deconvolution over two passes, a prediction layer without BN/ReLU, and a
// pass started before its weights are loaded (weight stall).  Each pass's
// start-to-done time is checked against one window per cycle (one per two
// cycles on the last deconvolution pass).  Every mechanism is counted and
// must occur at least once.
module tb_nnp_top;
  import nnp_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  cfg_t                    cfg;
  logic                    start = 1'b0, busy, done, stall;
  logic                    in_wr_en = 1'b0;
  logic [3:0]              in_wr_bank = '0;
  logic [10:0]             in_wr_addr = '0;
  logic [63:0]             in_wr_data = '0;
  logic [N_PEC-1:0]        wb_push = '0, wb_full;
  wentry_t                 wb_data;
  logic                    act_valid, act_sel;
  logic [9:0]              act_y, act_x;
  logic [N_PEC-1:0][7:0]   act;

  nnp_top dut (.*);

  int checks = 0, failures = 0;

  // ---------------- test data ----------------
  localparam int MAXC = 128, MAXH = 12, MAXO = 24;
  int fin  [MAXC][MAXH][MAXH];
  int wt   [16][MAXC][4][4];     // [oc][ic][ky][kx]
  int bna  [16], bnb [16];
  int expv [16][MAXO][MAXO];
  int gotv [16][MAXO][MAXO];
  bit seen [16][MAXO][MAXO];

  // mechanism counters
  int n_conv3, n_conv1, n_deconv, n_stride2, n_pad, n_signed, n_midpass,
      n_sat, n_stall, n_relu0, n_nobn, n_deconv_serial, n_linear;

  op_e   cur_op;

  // collect activations
  always @(posedge clk) begin
    if (act_valid) begin
      for (int i = 0; i < N_PEC; i++) begin
        int oc, oy, ox;
        if (cur_op == OP_DECONV) begin
          oc = i / 2; oy = 2 * int'(act_y) + (i % 2); ox = 2 * int'(act_x) + int'(act_sel);
          if (act_sel) n_deconv_serial++;
        end else begin
          oc = i; oy = int'(act_y); ox = int'(act_x);
        end
        if (oy < MAXO && ox < MAXO) begin
          gotv[oc][oy][ox] = int'(act[i]);
          seen[oc][oy][ox] = 1'b1;
        end
      end
    end
  end

  function automatic int sat16i(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int s8(input int v);  // as the hardware reads an 8-bit field
    return (v > 127) ? v - 256 : v;
  endfunction

  task automatic wr_in(input int bank, input int addr, input logic [63:0] d);
    @(negedge clk);
    in_wr_en = 1'b1; in_wr_bank = 4'(bank); in_wr_addr = 11'(addr); in_wr_data = d;
    @(negedge clk);
    in_wr_en = 1'b0;
  endtask

  // one layer: nin input channels, H x W input, nout output channels
  task automatic run_layer(input op_e op, input int nin, input int H, input int W,
                           input bit s2, input bit pad, input bit sgn, input int psh,
                           input bit bn, input bit relu, input int bsh, input int bnsh,
                           input bit late_weights);
    int gsize, npass, pitch, wpg, oh, ow, nout, s, npos, t0, cyc, exp_cyc;
    gsize = (op == OP_CONV1) ? 64 : 8;
    npass = (nin + gsize - 1) / gsize;
    s     = s2 ? 2 : 1;
    nout  = (op == OP_DECONV) ? 8 : 16;
    cur_op = op;
    // ---- random data ----
    for (int c = 0; c < MAXC; c++)
      for (int y = 0; y < MAXH; y++)
        for (int x = 0; x < MAXH; x++)
          fin[c][y][x] = (c < nin && y < H && x < W)
                         ? (sgn ? int'($urandom_range(0, 255)) - 128 : int'($urandom_range(0, 255))) : 0;
    for (int o = 0; o < 16; o++) begin
      for (int c = 0; c < MAXC; c++)
        for (int ky = 0; ky < 4; ky++)
          for (int kx = 0; kx < 4; kx++)
            wt[o][c][ky][kx] = (c < nin) ? int'($urandom_range(0, 255)) - 128 : 0;
      bna[o] = int'($urandom_range(0, 2047));
      bnb[o] = int'($urandom_range(0, 255)) - 128;
    end
    // ---- IN memory ----
    pitch = (op == OP_CONV1) ? W : (W + 2) / 3;
    wpg   = (op == OP_CONV1) ? H * W : ((H + 2) / 3) * pitch;
    for (int p = 0; p < npass; p++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          if (op == OP_CONV1) begin
            for (int j = 0; j < 8; j++) begin
              logic [63:0] d;
              for (int k = 0; k < 8; k++) d[8*k +: 8] = 8'(fin[64*p + 8*j + k][y][x]);
              wr_in((j < 4) ? j : j + 1, p * wpg + y * W + x, d);
            end
          end else begin
            logic [63:0] d;
            for (int k = 0; k < 8; k++) d[8*k +: 8] = 8'(fin[8*p + k][y][x]);
            wr_in(3 * (y % 3) + (x % 3), p * wpg + (y / 3) * pitch + (x / 3), d);
          end
        end
    // ---- reference ----
    if (op == OP_CONV3) begin
      oh = (H + (pad ? 2 : 0) - 3) / s + 1; ow = (W + (pad ? 2 : 0) - 3) / s + 1;
    end else if (op == OP_CONV1) begin
      oh = (H - 1) / s + 1; ow = (W - 1) / s + 1;
    end else begin
      oh = 2 * H; ow = 2 * W;
    end
    npos = (op == OP_DECONV) ? H * W : oh * ow;
    for (int o = 0; o < nout; o++)
      for (int oy = 0; oy < oh; oy++)
        for (int ox = 0; ox < ow; ox++) begin
          longint acc, old, part, y;
          int xq, a;
          old = 0;
          for (int p = 0; p < npass; p++) begin
            part = 0;
            for (int c = gsize * p; c < gsize * (p + 1); c++) begin
              if (op == OP_CONV3) begin
                for (int r = 0; r < 3; r++)
                  for (int q = 0; q < 3; q++) begin
                    int iy, ix;
                    iy = oy * s - (pad ? 1 : 0) + r; ix = ox * s - (pad ? 1 : 0) + q;
                    if (iy >= 0 && iy < H && ix >= 0 && ix < W)
                      part += longint'(fin[c][iy][ix]) * wt[o][c][r][q];
                    else if (c == 0 && o == 0) n_pad++;
                  end
              end else if (op == OP_CONV1) begin
                part += longint'(fin[c][oy * s][ox * s]) * wt[o][c][0][0];
              end else begin
                // transposed convolution, stride 2, pad 1: oy = 2*iy - 1 + ky
                for (int ky = 0; ky < 4; ky++)
                  for (int kx = 0; kx < 4; kx++) begin
                    int iy2, ix2;
                    iy2 = oy + 1 - ky; ix2 = ox + 1 - kx;
                    if (iy2 % 2 == 0 && ix2 % 2 == 0 && iy2 >= 0 && ix2 >= 0 &&
                        iy2 / 2 < H && ix2 / 2 < W)
                      part += longint'(fin[c][iy2 / 2][ix2 / 2]) * wt[o][c][ky][kx];
                  end
              end
            end
            acc = part + old;
            xq  = sat16i(acc >>> psh);
            if (xq != (acc >>> psh)) n_sat++;
            old = longint'(xq) <<< psh;
          end
          if (bn) y = longint'(bna[o]) * xq + (longint'(bnb[o]) <<< bsh);
          else    y = xq;
          y = y >>> bnsh;
          if (relu) a = (y < 0) ? 0 : (y > 255) ? 255 : int'(y);
          else      a = (y < -128) ? 128 : (y > 127) ? 127 : int'(y) & 255;
          if (relu && a == 0) n_relu0++;
          if (relu && a > 0 && a < 255) n_linear++;
          expv[o][oy][ox] = a;
          seen[o][oy][ox] = 1'b0;
        end
    // ---- passes ----
    for (int p = 0; p < npass; p++) begin
      wentry_t e;
      cfg.op = op; cfg.in_signed = sgn; cfg.stride2 = s2; cfg.pad = pad;
      cfg.first_pass = (p == 0); cfg.last_pass = (p == npass - 1);
      cfg.bn_en = bn; cfg.relu_en = relu; cfg.ps_shift = 4'(psh); cfg.bn_shift = 5'(bnsh);
      cfg.b_shift = 4'(bsh);
      cfg.wr_pair = (op == OP_DECONV) ? ((p % 2) ? 2'd2 : 2'd0) : ((p % 2) ? 2'd3 : 2'd1);
      cfg.rd_pair = (op == OP_DECONV) ? ((p % 2) ? 2'd0 : 2'd2) : ((p % 2) ? 2'd1 : 2'd3);
      cfg.in_h = 10'(H); cfg.in_w = 10'(W); cfg.in_pitch = 11'(pitch);
      cfg.in_base = 11'(p * wpg); cfg.ps_base = '0;
      if (p > 0 && p < npass - 1) n_midpass++;
      // weights, in the order each PE expects
      for (int i = 0; i < N_PEC; i++) begin
        e = '0;
        e.bn_a = 16'(bna[(op == OP_DECONV) ? i / 2 : i]);
        e.bn_b = 8'(bnb[(op == OP_DECONV) ? i / 2 : i]);
        for (int j = 0; j < N_PE; j++)
          for (int k = 0; k < N_TAP; k++) begin
            int v;
            v = 0;
            if (op == OP_CONV3) v = wt[i][8*p + j][k / 3][k % 3];
            else if (op == OP_CONV1) v = (k < 8) ? wt[i][64*p + 8*j + k][0][0] : 0;
            else if (k < 4) v = wt[i/2][8*p + j][3 - (i % 2) - 2*(k/2)][3 - 2*(k%2)];
            else if (k < 8) v = wt[i/2][8*p + j][3 - (i % 2) - 2*((k-4)/2)][2 - 2*((k-4)%2)];
            e.w[j][k] = 8'(v);
          end
        if (!late_weights) begin
          @(negedge clk); wb_data = e; wb_push = '0; wb_push[i] = 1'b1;
          @(negedge clk); wb_push = '0;
        end
      end
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0;
      cyc = 1;
      if (late_weights) begin
        // push after the controller is already waiting
        repeat (5) begin @(negedge clk); cyc++; if (stall) n_stall++; end
        for (int i = 0; i < N_PEC; i++) begin
          e = '0;
          e.bn_a = 16'(bna[i]); e.bn_b = 8'(bnb[i]);
          for (int j = 0; j < N_PE; j++)
            for (int k = 0; k < N_TAP; k++) e.w[j][k] = 8'(wt[i][8*p + j][k / 3][k % 3]);
          wb_data = e; wb_push = '0; wb_push[i] = 1'b1;
          @(negedge clk); cyc++;
        end
        wb_push = '0;
      end
      while (!done) begin @(negedge clk); cyc++; end
      exp_cyc = ((op == OP_DECONV && p == npass - 1) ? 2 * npos - 1 : npos) + 12;
      if (!late_weights) begin
        checks++;
        if (cyc != exp_cyc) begin
          failures++;
          $display("FAIL cycles op=%0d pass=%0d: %0d, expected %0d", op, p, cyc, exp_cyc);
        end
      end
      @(negedge clk);
    end
    repeat (3) @(negedge clk);
    // ---- compare ----
    for (int o = 0; o < nout; o++)
      for (int oy = 0; oy < oh; oy++)
        for (int ox = 0; ox < ow; ox++) begin
          checks++;
          if (!seen[o][oy][ox] || gotv[o][oy][ox] != expv[o][oy][ox]) begin
            failures++;
            if (failures < 20)
              $display("FAIL op=%0d oc=%0d (%0d,%0d): got %0d seen %0d, expected %0d",
                       op, o, oy, ox, gotv[o][oy][ox], seen[o][oy][ox], expv[o][oy][ox]);
          end
        end
    case (op)
      OP_CONV3:  n_conv3++;
      OP_CONV1:  n_conv1++;
      default:   n_deconv++;
    endcase
    if (s2) n_stride2++;
    if (sgn) n_signed++;
    if (!bn) n_nobn++;
  endtask

  task automatic need(input string name, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", name);
    end else $display("mechanism %-22s %0d", name, n);
  endtask

  initial begin
    n_conv3 = 0; n_conv1 = 0; n_deconv = 0; n_stride2 = 0; n_pad = 0; n_signed = 0;
    n_midpass = 0; n_sat = 0; n_stall = 0; n_relu0 = 0; n_nobn = 0; n_deconv_serial = 0; n_linear = 0;
    cfg = '0; wb_data = '0; cur_op = OP_CONV3;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    //        op         nin  H  W  s2 pad sgn psh bn relu bsh bnsh late
    run_layer(OP_CONV3,   20, 5, 7, 0, 1,  1,  2,  1, 1,   8,  15,  0);
    run_layer(OP_CONV3,    8, 7, 9, 1, 0,  0,  4,  1, 1,   8,  15,  0);
    run_layer(OP_CONV1,  128, 3, 4, 0, 0,  0,  4,  1, 1,   8,  16,  0);
    run_layer(OP_CONV1,   64, 5, 5, 1, 0,  0,  4,  1, 1,   8,  16,  0);
    run_layer(OP_DECONV,  16, 3, 4, 0, 0,  0,  4,  1, 1,   8,  15,  0);
    run_layer(OP_CONV3,    8, 4, 4, 0, 1,  0,  6,  0, 0,   0,   6,  1);
    need("conv3x3", n_conv3);
    need("conv1x1", n_conv1);
    need("deconv4x4", n_deconv);
    need("deconv_second_column", n_deconv_serial);
    need("stride2", n_stride2);
    need("zero_padding", n_pad);
    need("signed_input", n_signed);
    need("middle_pass_rd_wr", n_midpass);
    need("psum_saturation", n_sat);
    need("weight_stall", n_stall);
    need("relu_zero", n_relu0);
    need("no_bn_layer", n_nobn);
    need("unclipped_activation", n_linear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
