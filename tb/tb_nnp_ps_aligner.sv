// tb_nnp_ps_aligner: drives the PS aligner against a behavioural pair memory
// kept in this testbench.  For convolution and deconvolution it writes
// renewed partial sums through the aligner while reading back earlier ones
// from the other pairs in the same cycle, and checks (a) which pairs are
// enabled and written each cycle (one read and one write pair per half in
// convolution, two and two in deconvolution) and (b) that every partial sum
// read back reaches the right PEC lane and accumulator.
module tb_nnp_ps_aligner;
  import nnp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  op_e op;
  logic [1:0] rd_pair, wr_pair;
  logic rd_en, wr_en;
  logic [10:0] rd_addr, wr_addr;
  logic [15:0][15:0] ps_a, ps_b, wr_a, wr_b;
  logic [7:0] mem_en, mem_we;
  logic [7:0][10:0] mem_addr;
  logic [7:0][7:0][15:0] mem_wdata, mem_rdata;
  int checks = 0, failures = 0;

  nnp_ps_aligner dut (.*);

  // behavioural pair memory
  logic [7:0][15:0] store [8][64];
  always @(posedge clk)
    for (int p = 0; p < 8; p++)
      if (mem_en[p]) begin
        if (mem_we[p]) store[p][mem_addr[p][5:0]] <= mem_wdata[p];
        else           mem_rdata[p] <= store[p][mem_addr[p][5:0]];
      end

  logic [15:0][15:0] wa_hist [64], wb_hist [64];

  task automatic run(input op_e o, input logic [1:0] wp, input logic [1:0] rp);
    logic [7:0] exp_en, exp_we;
    op = o; wr_pair = wp; rd_pair = rp;
    for (int i = 0; i < 64 + 1; i++) begin
      @(negedge clk);
      // check data of the read issued last cycle
      if (i > 0 && rd_en) begin
        checks++;
        if (ps_a != wa_hist[i-1] || (o == OP_DECONV && ps_b != wb_hist[i-1]) ||
            (o != OP_DECONV && ps_b != '0)) begin
          failures++;
          if (failures < 10) $display("FAIL read op=%0d i=%0d", o, i);
        end
      end
      if (i == 64) begin rd_en = 0; wr_en = 0; break; end
      rd_en = 1; rd_addr = 11'(i);
      wr_en = 1; wr_addr = 11'(i);
      for (int l = 0; l < 16; l++) begin wr_a[l] = 16'($urandom); wr_b[l] = 16'($urandom); end
      exp_en = '0; exp_we = '0;
      for (int h = 0; h < 2; h++) begin
        if (o == OP_DECONV) begin
          exp_en[4*h + 2*rp[1]] = 1; exp_en[4*h + 2*rp[1] + 1] = 1;
          exp_en[4*h + 2*wp[1]] = 1; exp_en[4*h + 2*wp[1] + 1] = 1;
          exp_we[4*h + 2*wp[1]] = 1; exp_we[4*h + 2*wp[1] + 1] = 1;
        end else begin
          exp_en[4*h + rp] = 1; exp_en[4*h + wp] = 1; exp_we[4*h + wp] = 1;
        end
      end
      #1;
      checks++;
      if (mem_en != exp_en || mem_we != exp_we) begin
        failures++;
        if (failures < 10) $display("FAIL en %b/%b exp %b/%b", mem_en, mem_we, exp_en, exp_we);
      end
      wa_hist[i] = ps_hist_a(i); wb_hist[i] = ps_hist_b(i);
      new_a[i] = wr_a; new_b[i] = wr_b;
    end
  endtask

  // what the previous run wrote (to be read in this run)
  logic [15:0][15:0] new_a [64], new_b [64], old_a [64], old_b [64];
  function automatic logic [15:0][15:0] ps_hist_a(input int i); return old_a[i]; endfunction
  function automatic logic [15:0][15:0] ps_hist_b(input int i); return old_b[i]; endfunction

  task automatic flip();
    for (int i = 0; i < 64; i++) begin old_a[i] = new_a[i]; old_b[i] = new_b[i]; end
  endtask

  initial begin
    op = OP_CONV3; rd_pair = 0; wr_pair = 0; rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0;
    wr_a = '0; wr_b = '0;
    for (int p = 0; p < 8; p++) for (int i = 0; i < 64; i++) store[p][i] = '0;
    for (int i = 0; i < 64; i++) begin old_a[i] = '0; old_b[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // convolution ping-pong: 2 -> 0 -> 3 -> 1 (pairs 0 and 2 start at zero)
    run(OP_CONV3, 2'd0, 2'd2); flip();
    run(OP_CONV3, 2'd3, 2'd0); flip();
    run(OP_CONV1, 2'd1, 2'd3); flip();
    // deconvolution: write pairs 0/1, then read them while writing 2/3
    for (int i = 0; i < 64; i++) begin old_a[i] = '0; old_b[i] = '0; end
    for (int p = 0; p < 8; p++) for (int i = 0; i < 64; i++) store[p][i] = '0;
    run(OP_DECONV, 2'd0, 2'd2); flip();
    run(OP_DECONV, 2'd2, 2'd0); flip();
    run(OP_DECONV, 2'd0, 2'd2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
