// tb_nnp_mul8: exhaustive test of the 8x8 multiplier in all four sign modes
// (signed/unsigned input x signed/unsigned weight), against integer products.
module tb_nnp_mul8;
  logic [7:0]         a, b;
  logic               as, bs;
  logic signed [17:0] p;
  int checks = 0, failures = 0;

  nnp_mul8 dut (.a(a), .a_signed(as), .b(b), .b_signed(bs), .p(p));

  initial begin
    for (int m = 0; m < 4; m++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          int ai, bi;
          as = m[0]; bs = m[1]; a = 8'(i); b = 8'(j);
          ai = (as && i > 127) ? i - 256 : i;
          bi = (bs && j > 127) ? j - 256 : j;
          #1;
          checks++;
          if (int'(p) != ai * bi) begin
            failures++;
            if (failures < 10) $display("FAIL %0d x %0d = %0d", ai, bi, p);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
