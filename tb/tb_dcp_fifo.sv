// tb_dcp_fifo: random pushes and pops against a queue model, including
// runs that fill the FIFO (15 entries must fit, the 16th is dropped) and
// empty it; checks rdata, count, empty and full every clock.
module tb_dcp_fifo;
  logic clk = 0, rst = 1, wr = 0, rd = 0, empty, full;
  logic [7:0] wdata = 0, rdata;
  logic [4:0] count;
  int checks = 0, failures = 0;
  dcp_fifo dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [7:0] q [$];
    int pw, pr;
    bit cw, cr;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      pw = ((n / 300) % 2 != 0) ? 30 : 70;        // alternate filling / draining
      pr = 100 - pw;
      @(negedge clk);
      checks++;
      if (count != 5'(q.size()) || empty != (q.size() == 0) || full != (q.size() == 15) ||
          (q.size() > 0 && rdata != q[0])) begin
        failures++;
        if (failures < 10) $display("n=%0d count %0d model %0d", n, count, q.size());
      end
      wr = ($urandom_range(99, 0) < pw); rd = ($urandom_range(99, 0) < pr);
      wdata = 8'($urandom);
      cw = wr && q.size() < 15;
      cr = rd && q.size() > 0;
      if (cr) void'(q.pop_front());
      if (cw) q.push_back(wdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
