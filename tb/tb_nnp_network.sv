// tb_nnp_network: a scaled-down slice of the detection network run layer after
// layer on the processor at its default sizes, with the testbench acting as
// host: it writes each layer's activations back into the IN memory as the
// next layer's input, exactly as a host moving tiles through DRAM would.
//   L1  3x3 conv, stride 2, pad 1, 3 -> 16 channels, signed 12x16 image
//   L2  3x3 conv, stride 2, pad 1, 16 -> 16 (two passes)          6x8 -> 3x4
//   L3  4x4 deconv, stride 2, 16 -> 8 (two passes)                3x4 -> 6x8
//   L4  concatenation of L3 (8 ch) and L1 (16 ch), then a 1x1 prediction
//       layer 24 -> 16 without BN (signed outputs)
// Every layer's output is compared with a reference chain computed here from
// the layer definitions with the same fixed-point rules.  The testbench also
// reports the compute cycles and MAC utilisation of the slice.
module tb_nnp_network;
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
  localparam int MC = 32, MH = 12, MW = 16;
  // feature maps: 0 = image, 1..4 = layer outputs; ref = model, hw = hardware
  int ref_fm [5][MC][MH][MW];
  int hw_fm  [5][MC][MH][MW];
  int wt  [16][MC][4][4];
  int bna [16], bnb [16];
  int busy_cycles = 0, macs = 0;
  op_e cur_op;
  int  cur_out;

  always @(posedge clk) if (busy) busy_cycles++;

  always @(posedge clk) begin
    if (act_valid)
      for (int i = 0; i < N_PEC; i++) begin
        int oc, oy, ox, v;
        v = int'(act[i]);
        if (cur_op == OP_DECONV) begin
          oc = i / 2; oy = 2 * int'(act_y) + (i % 2); ox = 2 * int'(act_x) + int'(act_sel);
        end else begin
          oc = i; oy = int'(act_y); ox = int'(act_x);
        end
        if (oy < MH && ox < MW) hw_fm[cur_out][oc][oy][ox] = v;
      end
  end

  task automatic wr_in(input int bank, input int addr, input logic [63:0] d);
    @(negedge clk);
    in_wr_en = 1'b1; in_wr_bank = 4'(bank); in_wr_addr = 11'(addr); in_wr_data = d;
    @(negedge clk);
    in_wr_en = 1'b0;
  endtask

  function automatic int sat16i(input longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  // input channel c of layer input "src" list: channels of map a first, then map b
  function automatic int ref_in(input int a, input int na, input int b, input int c,
                                input int y, input int x);
    return (c < na) ? ref_fm[a][c][y][x] : ref_fm[b][c - na][y][x];
  endfunction
  function automatic int hw_in(input int a, input int na, input int b, input int c,
                               input int y, input int x);
    return (c < na) ? hw_fm[a][c][y][x] : hw_fm[b][c - na][y][x];
  endfunction

  task automatic layer(input int outm, input op_e op, input int srca, input int na,
                       input int srcb, input int nb, input int H, input int W, input bit s2,
                       input bit pad, input bit sgn, input int psh, input bit bn,
                       input int bsh, input int bnsh);
    int nin, gsize, npass, pitch, wpg, oh, ow, nout, s;
    nin = na + nb;
    gsize = (op == OP_CONV1) ? 64 : 8;
    npass = (nin + gsize - 1) / gsize;
    s = s2 ? 2 : 1;
    nout = (op == OP_DECONV) ? 8 : 16;
    cur_op = op; cur_out = outm;
    for (int o = 0; o < 16; o++) begin
      for (int c = 0; c < MC; c++)
        for (int ky = 0; ky < 4; ky++)
          for (int kx = 0; kx < 4; kx++)
            wt[o][c][ky][kx] = (c < nin) ? int'($urandom_range(0, 255)) - 128 : 0;
      bna[o] = int'($urandom_range(64, 1023));
      bnb[o] = int'($urandom_range(0, 255)) - 128;
    end
    // IN memory from the hardware's previous outputs
    pitch = (op == OP_CONV1) ? W : (W + 2) / 3;
    wpg   = (op == OP_CONV1) ? H * W : ((H + 2) / 3) * pitch;
    for (int p = 0; p < npass; p++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          if (op == OP_CONV1) begin
            for (int j = 0; j < 8; j++) begin
              logic [63:0] d;
              for (int k = 0; k < 8; k++) begin
                int c;
                c = 64*p + 8*j + k;
                d[8*k +: 8] = (c < nin) ? 8'(hw_in(srca, na, srcb, c, y, x)) : 8'd0;
              end
              wr_in((j < 4) ? j : j + 1, p * wpg + y * W + x, d);
            end
          end else begin
            logic [63:0] d;
            for (int k = 0; k < 8; k++) begin
              int c;
              c = 8*p + k;
              d[8*k +: 8] = (c < nin) ? 8'(hw_in(srca, na, srcb, c, y, x)) : 8'd0;
            end
            wr_in(3 * (y % 3) + (x % 3), p * wpg + (y / 3) * pitch + (x / 3), d);
          end
    // reference
    if (op == OP_CONV3) begin
      oh = (H + (pad ? 2 : 0) - 3) / s + 1; ow = (W + (pad ? 2 : 0) - 3) / s + 1;
    end else if (op == OP_CONV1) begin
      oh = (H - 1) / s + 1; ow = (W - 1) / s + 1;
    end else begin
      oh = 2 * H; ow = 2 * W;
    end
    for (int o = 0; o < nout; o++)
      for (int oy = 0; oy < oh; oy++)
        for (int ox = 0; ox < ow; ox++) begin
          longint acc, old, part, y;
          int xq;
          old = 0;
          for (int p = 0; p < npass; p++) begin
            part = 0;
            for (int c = gsize * p; c < gsize * (p + 1) && c < nin; c++) begin
              if (op == OP_CONV3) begin
                for (int r = 0; r < 3; r++)
                  for (int q = 0; q < 3; q++) begin
                    int iy, ix;
                    iy = oy * s - (pad ? 1 : 0) + r; ix = ox * s - (pad ? 1 : 0) + q;
                    if (iy >= 0 && iy < H && ix >= 0 && ix < W)
                      part += longint'(ref_in(srca, na, srcb, c, iy, ix)) * wt[o][c][r][q];
                  end
              end else if (op == OP_CONV1) begin
                part += longint'(ref_in(srca, na, srcb, c, oy * s, ox * s)) * wt[o][c][0][0];
              end else begin
                for (int ky = 0; ky < 4; ky++)
                  for (int kx = 0; kx < 4; kx++) begin
                    int iy2, ix2;
                    iy2 = oy + 1 - ky; ix2 = ox + 1 - kx;
                    if (iy2 % 2 == 0 && ix2 % 2 == 0 && iy2 >= 0 && ix2 >= 0 &&
                        iy2 / 2 < H && ix2 / 2 < W)
                      part += longint'(ref_in(srca, na, srcb, c, iy2 / 2, ix2 / 2)) * wt[o][c][ky][kx];
                  end
              end
            end
            acc = part + old;
            xq  = sat16i(acc >>> psh);
            old = longint'(xq) <<< psh;
          end
          y = bn ? longint'(bna[o]) * xq + (longint'(bnb[o]) <<< bsh) : longint'(xq);
          y = y >>> bnsh;
          if (bn) ref_fm[outm][o][oy][ox] = (y < 0) ? 0 : (y > 255) ? 255 : int'(y);
          else    ref_fm[outm][o][oy][ox] = ((y < -128) ? -128 : (y > 127) ? 127 : int'(y)) & 255;
          hw_fm[outm][o][oy][ox] = -1;
        end
    // passes
    for (int p = 0; p < npass; p++) begin
      cfg = '0;
      cfg.op = op; cfg.in_signed = sgn; cfg.stride2 = s2; cfg.pad = pad;
      cfg.first_pass = (p == 0); cfg.last_pass = (p == npass - 1);
      cfg.bn_en = bn; cfg.relu_en = bn; cfg.ps_shift = 4'(psh); cfg.bn_shift = 5'(bnsh);
      cfg.b_shift = 4'(bsh);
      cfg.wr_pair = (op == OP_DECONV) ? ((p % 2) ? 2'd2 : 2'd0) : ((p % 2) ? 2'd1 : 2'd0);
      cfg.rd_pair = (op == OP_DECONV) ? ((p % 2) ? 2'd0 : 2'd2) : ((p % 2) ? 2'd0 : 2'd1);
      cfg.in_h = 10'(H); cfg.in_w = 10'(W); cfg.in_pitch = 11'(pitch);
      cfg.in_base = 11'(p * wpg); cfg.ps_base = '0;
      for (int i = 0; i < N_PEC; i++) begin
        wentry_t e;
        int oc;
        e = '0;
        oc = (op == OP_DECONV) ? i / 2 : i;
        e.bn_a = 16'(bna[oc]); e.bn_b = 8'(bnb[oc]);
        for (int j = 0; j < N_PE; j++)
          for (int k = 0; k < N_TAP; k++) begin
            int v;
            v = 0;
            if (op == OP_CONV3) v = wt[i][8*p + j][k / 3][k % 3];
            else if (op == OP_CONV1) v = (k < 8) ? wt[i][64*p + 8*j + k][0][0] : 0;
            else if (k < 4) v = wt[oc][8*p + j][3 - (i % 2) - 2*(k/2)][3 - 2*(k%2)];
            else if (k < 8) v = wt[oc][8*p + j][3 - (i % 2) - 2*((k-4)/2)][2 - 2*((k-4)%2)];
            e.w[j][k] = 8'(v);
          end
        @(negedge clk); wb_data = e; wb_push = '0; wb_push[i] = 1'b1;
      end
      @(negedge clk); wb_push = '0; start = 1'b1;
      @(negedge clk); start = 1'b0;
      while (!done) @(negedge clk);
      @(negedge clk);
    end
    repeat (3) @(negedge clk);
    macs += nout * oh * ow * nin * ((op == OP_CONV3) ? 9 : (op == OP_CONV1) ? 1 : 4);
    for (int o = 0; o < nout; o++)
      for (int oy = 0; oy < oh; oy++)
        for (int ox = 0; ox < ow; ox++) begin
          checks++;
          if (hw_fm[outm][o][oy][ox] != ref_fm[outm][o][oy][ox]) begin
            failures++;
            if (failures < 20)
              $display("FAIL layer %0d oc=%0d (%0d,%0d): got %0d expected %0d", outm, o, oy, ox,
                       hw_fm[outm][o][oy][ox], ref_fm[outm][o][oy][ox]);
          end
        end
  endtask

  initial begin
    int nz;
    cfg = '0; wb_data = '0; cur_op = OP_CONV3; cur_out = 1;
    for (int c = 0; c < MC; c++)
      for (int y = 0; y < MH; y++)
        for (int x = 0; x < MW; x++) begin
          int v;
          v = (c < 3) ? int'($urandom_range(0, 255)) - 128 : 0;
          ref_fm[0][c][y][x] = v; hw_fm[0][c][y][x] = v & 255;
        end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // the image is signed: the reference reads ref_fm (signed), the hardware hw_fm bytes
    //    out op         a  na  b  nb  H   W  s2 pad sgn psh bn bsh bnsh
    layer(1, OP_CONV3,  0, 3,  0, 0, 12, 16, 1, 1,  1,  2,  1, 6,  15);
    layer(2, OP_CONV3,  1, 16, 0, 0,  6,  8, 1, 1,  0,  3,  1, 6,  16);
    layer(3, OP_DECONV, 2, 16, 0, 0,  3,  4, 0, 0,  0,  3,  1, 6,  16);
    layer(4, OP_CONV1,  3, 8,  1, 16, 6,  8, 0, 0,  0,  2,  0, 0,   8);
    // the chain must carry information: some activations of every layer are non-zero
    for (int l = 1; l <= 4; l++) begin
      nz = 0;
      for (int c = 0; c < 16; c++) for (int y = 0; y < 6; y++) for (int x = 0; x < 8; x++)
        if (ref_fm[l][c][y][x] != 0) nz++;
      checks++;
      if (nz < 10) begin failures++; $display("FAIL layer %0d nearly all zero", l); end
    end
    $display("slice: %0d MACs in %0d busy cycles (%0d MACs/cycle of 1152)",
             macs, busy_cycles, macs / busy_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
