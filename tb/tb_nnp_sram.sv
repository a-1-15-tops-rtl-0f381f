// tb_nnp_sram: fills a 16 kB bank with random words, reads them back in random
// order with one cycle of read latency, and checks that rdata holds while the
// bank is idle and that a write does not disturb rdata.
module tb_nnp_sram;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic en, we;
  logic [10:0] addr;
  logic [63:0] wdata, rdata;
  logic [63:0] model [2048];
  int checks = 0, failures = 0;

  nnp_sram dut (.*);

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 11'(i); wdata = {$urandom, $urandom}; model[i] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      int a;
      @(negedge clk);
      a = $urandom_range(0, 2047);
      en = 1; we = 0; addr = 11'(a);
      @(negedge clk);
      en = 0;
      checks++;
      if (rdata != model[a]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d", a);
      end
      // idle cycle and a write elsewhere must keep rdata
      @(negedge clk);
      en = 1; we = 1; addr = 11'((a + 1) % 2048); wdata = {$urandom, $urandom};
      model[(a + 1) % 2048] = wdata;
      @(negedge clk);
      en = 0; we = 0;
      checks++;
      if (rdata != model[a]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
