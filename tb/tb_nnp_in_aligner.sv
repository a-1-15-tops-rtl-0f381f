// tb_nnp_in_aligner: builds bank contents from a random window position (each
// pixel put in the bank its coordinates select) plus a random padding mask,
// and checks that every PE gets the right channel of every window pixel; in
// 1x1 mode checks that PE j gets the eight channels of bank j (skipping bank e)
// and zero on tap 8.  Output is checked one cycle after the input.
module tb_nnp_in_aligner;
  import nnp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  op_e op;
  logic [1:0] ymod, xmod;
  logic [8:0] mask;
  logic [8:0][63:0] bank;
  logic [7:0][8:0][7:0] pix;
  int checks = 0, failures = 0;

  nnp_in_aligner dut (.clk(clk), .rst_n(rst_n), .en(1'b1), .op(op), .ymod(ymod), .xmod(xmod),
                      .mask(mask), .bank(bank), .pix(pix));

  initial begin
    op = OP_CONV3; ymod = 0; xmod = 0; mask = '0; bank = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int ty, tx;
      logic [7:0] val [3][3][8];
      logic [7:0][8:0][7:0] exp_pix;
      op = (n % 3 == 2) ? OP_CONV1 : (n % 3 == 1) ? OP_DECONV : OP_CONV3;
      ty = $urandom_range(0, 50); tx = $urandom_range(0, 50);
      mask = 9'($urandom); if (n % 4 == 0) mask = '1;
      ymod = 2'(ty % 3); xmod = 2'(tx % 3);
      for (int b = 0; b < 9; b++) bank[b] = {$urandom, $urandom};
      exp_pix = '0;
      if (op == OP_CONV1) begin
        for (int j = 0; j < 8; j++)
          for (int k = 0; k < 8; k++)
            exp_pix[j][k] = mask[0] ? bank[(j < 4) ? j : j + 1][8*k +: 8] : 8'd0;
      end else begin
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            for (int ch = 0; ch < 8; ch++) begin
              val[r][c][ch] = 8'($urandom);
              bank[3 * ((ty + r) % 3) + ((tx + c) % 3)][8*ch +: 8] = val[r][c][ch];
              exp_pix[ch][3*r + c] = mask[3*r + c] ? val[r][c][ch] : 8'd0;
            end
      end
      @(negedge clk);
      checks++;
      if (pix != exp_pix) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d op=%0d ty=%0d tx=%0d", n, op, ty, tx);
      end
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
