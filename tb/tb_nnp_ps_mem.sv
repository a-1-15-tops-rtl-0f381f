// tb_nnp_ps_mem: writes random 8 x 16-bit words into the eight PS pairs (each
// pair at its own address), reads them back and checks each 16-bit partial
// sum, so a swapped upper/lower byte or a cross-talk between pairs shows up.
module tb_nnp_ps_mem;
  import nnp_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic [7:0] en, we;
  logic [7:0][10:0] addr;
  logic [7:0][7:0][15:0] wdata, rdata;
  logic [7:0][15:0] model [8][128];
  int checks = 0, failures = 0;

  nnp_ps_mem dut (.*);

  initial begin
    en = 0; we = 0; addr = '0; wdata = '0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      en = '1; we = '1;
      for (int p = 0; p < 8; p++) begin
        addr[p] = 11'((i * 7 + p * 13) % 128);
        for (int c = 0; c < 8; c++) wdata[p][c] = 16'($urandom);
        model[p][addr[p]] = wdata[p];
      end
    end
    for (int n = 0; n < 2000; n++) begin
      int a [8];
      @(negedge clk);
      en = 8'($urandom); we = '0;
      for (int p = 0; p < 8; p++) begin a[p] = $urandom_range(0, 127); addr[p] = 11'(a[p]); end
      @(negedge clk);
      for (int p = 0; p < 8; p++)
        if (en[p]) begin
          checks++;
          if (rdata[p] != model[p][a[p]]) begin
            failures++;
            if (failures < 10) $display("FAIL pair %0d addr %0d", p, a[p]);
          end
        end
      en = '0;
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
