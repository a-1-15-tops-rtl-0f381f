// tb_nnp_w_buffer: random pushes and pops (never into a full or from an empty
// FIFO) against a queue model; checks head data, empty and full every cycle.
module tb_nnp_w_buffer;
  import nnp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic    push, pop, empty, full;
  wentry_t wr_data, rd_data;
  wentry_t model [$];
  int checks = 0, failures = 0, n_full = 0;

  nnp_w_buffer dut (.*);

  initial begin
    push = 0; pop = 0; wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == 4) ||
          (model.size() > 0 && rd_data != model[0])) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d size=%0d empty=%0d full=%0d", n, model.size(), empty, full);
      end
      if (full) n_full++;
      push = ($urandom_range(0, 2) != 0) && model.size() < 4;
      pop  = ($urandom_range(0, 2) == 0) && model.size() > 0;
      if (n > 2000) begin push = !push && model.size() < 4; end
      wr_data = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                 $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                 $urandom, $urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wr_data);
    end
    checks++; if (n_full == 0) failures++;
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
