// tb_nnp_pec: one processor element cluster.  Pushes weight entries into the
// W buffer, loads them, streams random windows and old partial sums and
// checks (a) the renewed 16-bit partial sums one cycle after the
// accumulate strobe, in 3x3 and 1x1 convolution and in deconvolution (both
// accumulators), and (b) the BN/ReLU activations on a last pass, including
// the second deconvolution result a cycle after the first.  References are
// computed here from the weights and pixels.
module tb_nnp_pec;
  import nnp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  op_e op;
  logic half, in_signed, bn_en, relu_en, wb_push, wb_empty, wb_full, load, acc_en, first, last;
  logic [3:0] ps_shift, b_shift;
  logic [4:0] bn_shift;
  wentry_t wb_data;
  logic [N_PE-1:0][N_TAP-1:0][7:0] pix;
  logic signed [15:0] ps_a_in, ps_b_in, ps_a_out, ps_b_out;
  logic ps_valid, act_valid, act_sel;
  logic [7:0] act;
  int checks = 0, failures = 0;

  nnp_pec dut (.*);

  wentry_t ent;
  localparam int N = 400;
  int ea [N], eb [N];            // expected 16-bit partial sums per window
  int aa [N], ab [N];            // expected activations
  logic [N_PE-1:0][N_TAP-1:0][7:0] pv [N];
  int pa [N], pb [N];

  function automatic int sx(input int v, input bit sg);
    return (sg && v > 127) ? v - 256 : v;
  endfunction
  function automatic int bnref(input longint acc);
    longint x, y;
    x = acc >>> ps_shift;
    if (x > 32767) x = 32767; else if (x < -32768) x = -32768;
    y = bn_en ? longint'(ent.bn_a) * x + (longint'(ent.bn_b) <<< b_shift) : x;
    y = y >>> bn_shift;
    return (y < 0) ? 0 : (y > 255) ? 255 : int'(y);
  endfunction

  // one pass of N windows with issue interval gap; checks everything
  task automatic pass(input op_e o, input bit h, input bit f, input bit l, input int gap);
    op = o; half = h; first = f; last = l;
    ent = '0;
    for (int j = 0; j < N_PE; j++) for (int k = 0; k < N_TAP; k++) ent.w[j][k] = 8'($urandom);
    ent.bn_a = 16'($urandom_range(0, 4095)); ent.bn_b = 8'($urandom);
    @(negedge clk); wb_data = ent; wb_push = 1;
    @(negedge clk); wb_push = 0; load = 1;
    @(negedge clk); load = 0;
    for (int n = 0; n < N; n++) begin
      longint sa, sb, acc_a, acc_b;
      for (int j = 0; j < N_PE; j++) for (int k = 0; k < N_TAP; k++) pv[n][j][k] = 8'($urandom);
      pa[n] = int'($urandom_range(0, 65535)) - 32768; pb[n] = int'($urandom_range(0, 65535)) - 32768;
      sa = 0; sb = 0;
      for (int j = 0; j < N_PE; j++) begin
        if (o == OP_CONV3)
          for (int k = 0; k < 9; k++) sa += sx(pv[n][j][k], in_signed) * sx(ent.w[j][k], 1);
        else if (o == OP_CONV1)
          for (int k = 0; k < 8; k++) sa += sx(pv[n][j][k], in_signed) * sx(ent.w[j][k], 1);
        else
          for (int d = 0; d < 4; d++) begin
            sa += sx(pv[n][j][3*(h + d/2) + d%2], in_signed) * sx(ent.w[j][d], 1);
            sb += sx(pv[n][j][3*(h + d/2) + 1 + d%2], in_signed) * sx(ent.w[j][4 + d], 1);
          end
      end
      acc_a = sa + (f ? 0 : longint'(pa[n]) <<< ps_shift);
      acc_b = (o == OP_DECONV) ? sb + (f ? 0 : longint'(pb[n]) <<< ps_shift) : 0;
      ea[n] = ((acc_a >>> ps_shift) > 32767) ? 32767 : ((acc_a >>> ps_shift) < -32768) ? -32768 : int'(acc_a >>> ps_shift);
      eb[n] = ((acc_b >>> ps_shift) > 32767) ? 32767 : ((acc_b >>> ps_shift) < -32768) ? -32768 : int'(acc_b >>> ps_shift);
      aa[n] = bnref(acc_a); ab[n] = bnref(acc_b);
    end
    // drive: window n's pixels at cycle c_n = n*gap, accumulate at c_n + 3
    fork
      for (int n = 0; n < N; n++) begin
        pix = pv[n];
        repeat (gap) @(negedge clk);
      end
      begin
        repeat (3) @(negedge clk);
        for (int n = 0; n < N; n++) begin
          acc_en = 1; ps_a_in = 16'(pa[n]); ps_b_in = 16'(pb[n]);
          @(negedge clk); acc_en = 0;
          // cycle T+4: partial sums
          checks++;
          if (!ps_valid || int'(ps_a_out) != ea[n] || (o == OP_DECONV && int'(ps_b_out) != eb[n])) begin
            failures++;
            if (failures < 10) $display("FAIL ps op=%0d n=%0d got %0d %0d exp %0d %0d", o, n, ps_a_out, ps_b_out, ea[n], eb[n]);
          end
          if (gap > 1) repeat (gap - 1) @(negedge clk);
        end
      end
      if (l) begin
        repeat (5) @(negedge clk);
        for (int n = 0; n < N; n++) begin
          checks++;
          if (!act_valid || act_sel || int'(act) != aa[n]) begin
            failures++;
            if (failures < 10) $display("FAIL act op=%0d n=%0d got %0d exp %0d", o, n, act, aa[n]);
          end
          if (o == OP_DECONV) begin
            @(negedge clk);
            checks++;
            if (!act_valid || !act_sel || int'(act) != ab[n]) begin
              failures++;
              if (failures < 10) $display("FAIL act_b n=%0d got %0d exp %0d", n, act, ab[n]);
            end
          end
          repeat (gap - ((o == OP_DECONV) ? 1 : 0)) @(negedge clk);
        end
      end
    join
    repeat (6) @(negedge clk);
  endtask

  initial begin
    op = OP_CONV3; half = 0; in_signed = 0; bn_en = 1; relu_en = 1; wb_push = 0; load = 0;
    acc_en = 0; first = 1; last = 0; ps_shift = 4; b_shift = 6; bn_shift = 16; wb_data = '0;
    pix = '0; ps_a_in = 0; ps_b_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    in_signed = 1; pass(OP_CONV3, 0, 1, 0, 1);
    in_signed = 0; pass(OP_CONV3, 1, 0, 0, 1);
    ps_shift = 0;  pass(OP_CONV1, 0, 0, 0, 1);
    ps_shift = 3;  pass(OP_DECONV, 0, 0, 0, 1);
                   pass(OP_DECONV, 1, 1, 0, 1);
    ps_shift = 4;  pass(OP_CONV3, 0, 0, 1, 1);
                   pass(OP_DECONV, 1, 0, 1, 2);
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
