// tb_nnp_in_mem: writes random words into all nine IN banks through the host
// port, then reads nine independent addresses per cycle and checks every bank
// against a model, one cycle after the request.
module tb_nnp_in_mem;
  import nnp_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rd_en, wr_en;
  logic [8:0][10:0] rd_addr;
  logic [8:0][63:0] rd_data;
  logic [3:0] wr_bank;
  logic [10:0] wr_addr;
  logic [63:0] wr_data;
  logic [63:0] model [9][256];
  int checks = 0, failures = 0;

  nnp_in_mem dut (.*);

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = '0; wr_bank = 0; wr_addr = 0; wr_data = 0;
    for (int b = 0; b < 9; b++)
      for (int i = 0; i < 256; i++) begin
        @(negedge clk);
        wr_en = 1; wr_bank = 4'(b); wr_addr = 11'(i); wr_data = {$urandom, $urandom};
        model[b][i] = wr_data;
      end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 2000; n++) begin
      int a [9];
      @(negedge clk);
      rd_en = 1;
      for (int b = 0; b < 9; b++) begin a[b] = $urandom_range(0, 255); rd_addr[b] = 11'(a[b]); end
      @(negedge clk);
      rd_en = 0;
      for (int b = 0; b < 9; b++) begin
        checks++;
        if (rd_data[b] != model[b][a[b]]) begin
          failures++;
          if (failures < 10) $display("FAIL bank %0d addr %0d", b, a[b]);
        end
      end
    end
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
