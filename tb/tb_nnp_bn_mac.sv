// tb_nnp_bn_mac: random accumulators, BN parameters and shifts through the
// batch-normalisation MAC; each result, one cycle after the input, is
// compared with y = A * sat16(acc >>> ps_shift) + (B <<< b_shift) reduced to
// 8 bit with ReLU or signed clamping, computed here with 64-bit integers.
module tb_nnp_bn_mac;
  import nnp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               in_valid, bn_en, relu_en, out_valid;
  logic signed [31:0] acc;
  logic [3:0]         ps_shift, b_shift;
  logic [4:0]         bn_shift;
  logic signed [15:0] bn_a;
  logic signed [7:0]  bn_b;
  logic [7:0]         act;
  int checks = 0, failures = 0, n_clip = 0, n_mid = 0;

  nnp_bn_mac dut (.*);

  initial begin
    in_valid = 0; acc = 0; ps_shift = 0; b_shift = 0; bn_shift = 0; bn_a = 0; bn_b = 0;
    bn_en = 0; relu_en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      longint x, y;
      int e;
      @(negedge clk);
      in_valid = 1'b1;
      acc = $urandom; if (n % 2) acc = acc >>> $urandom_range(0, 24);
      ps_shift = 4'($urandom); b_shift = 4'($urandom); bn_shift = 5'($urandom_range(0, 31));
      bn_a = 16'($urandom); bn_b = 8'($urandom);
      bn_en = ($urandom_range(0, 3) != 0); relu_en = $urandom_range(0, 1);
      x = longint'(acc) >>> ps_shift;
      if (x > 32767) x = 32767; else if (x < -32768) x = -32768;
      y = bn_en ? longint'(bn_a) * x + (longint'(bn_b) <<< b_shift) : x;
      y = y >>> bn_shift;
      if (relu_en) e = (y < 0) ? 0 : (y > 255) ? 255 : int'(y);
      else         e = (y < -128) ? 128 : (y > 127) ? 127 : (int'(y) & 255);
      if (e == 0 || e == 255 || e == 127 || e == 128) n_clip++; else n_mid++;
      @(posedge clk); #1;
      checks++;
      if (!out_valid || int'(act) != e) begin
        failures++;
        if (failures < 10) $display("FAIL acc=%0d A=%0d B=%0d: got %0d exp %0d", acc, bn_a, bn_b, act, e);
      end
    end
    @(negedge clk); in_valid = 0;
    @(posedge clk); #1;
    checks++; if (out_valid) failures++;
    if (n_mid == 0 || n_clip == 0) failures++;
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
