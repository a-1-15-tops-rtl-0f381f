// tb_nnp_pe: streams random windows through one PE in all three modes, one
// per cycle, and checks both outputs exactly three cycles later against sums
// of products computed here (deconvolution outputs from the 2x2 input blocks
// of each output phase).
module tb_nnp_pe;
  import nnp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  op_e                   op;
  logic                  half, in_signed;
  logic [N_TAP-1:0][7:0] pix, w;
  logic signed [19:0]    out0, out1;
  int checks = 0, failures = 0;

  nnp_pe dut (.clk(clk), .rst_n(rst_n), .en(1'b1), .op(op), .half(half), .in_signed(in_signed),
              .pix(pix), .w(w), .out0(out0), .out1(out1));

  int e0 [$], e1 [$];

  function automatic int px(input int v, input bit sg);
    return (sg && v > 127) ? v - 256 : v;
  endfunction

  initial begin
    op = OP_CONV3; half = 0; in_signed = 0; pix = '0; w = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      int s0, s1;
      @(negedge clk);
      // check what was issued three cycles ago
      if (e0.size() == 3) begin
        int x0, x1;
        x0 = e0.pop_front(); x1 = e1.pop_front();
        checks++;
        if (int'(out0) != x0 || int'(out1) != x1) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d out %0d %0d exp %0d %0d", n, out0, out1, x0, x1);
        end
      end
      op = (n % 3 == 0) ? OP_CONV3 : (n % 3 == 1) ? OP_CONV1 : OP_DECONV;
      half = $urandom_range(0, 1); in_signed = $urandom_range(0, 1);
      for (int k = 0; k < 9; k++) begin
        pix[k] = 8'($urandom); w[k] = 8'($urandom);
      end
      if (n < 20) begin  // extremes first
        for (int k = 0; k < 9; k++) begin
          pix[k] = in_signed ? 8'h80 : 8'hff; w[k] = 8'h80;
        end
      end
      s0 = 0; s1 = 0;
      if (op == OP_CONV3)
        for (int k = 0; k < 9; k++) s0 += px(pix[k], in_signed) * px(w[k], 1);
      else if (op == OP_CONV1)
        for (int k = 0; k < 8; k++) s0 += px(pix[k], in_signed) * px(w[k], 1);
      else
        for (int dr = 0; dr < 2; dr++)
          for (int dc = 0; dc < 2; dc++) begin
            // phase (half, 0) uses window columns 0..1, phase (half, 1) columns 1..2
            s0 += px(pix[3*(half + dr) + dc],     in_signed) * px(w[2*dr + dc], 1);
            s1 += px(pix[3*(half + dr) + 1 + dc], in_signed) * px(w[4 + 2*dr + dc], 1);
          end
      e0.push_back(s0); e1.push_back(s1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
