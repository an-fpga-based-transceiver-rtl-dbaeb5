// tb_dcp_noise_blanker: random samples with occasional impulses; each output
// is compared with the input three samples earlier, zeroed when that pair's
// top-8-bit magnitude exceeded the limit.
module tb_dcp_noise_blanker;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [17:0] in_i, in_q, out_i, out_q;
  logic [7:0] limit;
  logic blanked;
  int checks = 0, failures = 0, nblank = 0;
  dcp_noise_blanker dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int a8(logic signed [17:0] v);
    int t = int'(v) >>> 10;
    return t < 0 ? -t : t;
  endfunction
  initial begin
    logic signed [17:0] qi [$], qq [$];
    logic hq [$];
    logic signed [17:0] ei, eq;
    logic h;
    in_i = 0; in_q = 0; limit = 8'd40;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = (n % 3 != 1);
      if (in_valid) begin
        in_i = 18'($signed($urandom_range(60000, 0)) - 30000);
        in_q = 18'($signed($urandom_range(60000, 0)) - 30000);
        if ($urandom_range(19, 0) == 0) in_i = ($urandom_range(1, 0) != 0) ? 18'sd120000 : -18'sd120000;
        if ($urandom_range(29, 0) == 0) in_q = -18'sd60000;
        qi.push_back(in_i); qq.push_back(in_q);
        hq.push_back(a8(in_i) > limit || a8(in_q) > limit);
      end
      @(posedge clk); #1;
      if (in_valid && qi.size() > 3) begin
        ei = qi.pop_front(); eq = qq.pop_front(); h = hq.pop_front();
        if (h) begin ei = 0; eq = 0; nblank++; end
        checks++;
        if (out_i != ei || out_q != eq || blanked != h) begin
          failures++;
          if (failures < 10) $display("n=%0d out %0d %0d exp %0d %0d", n, out_i, out_q, ei, eq);
        end
      end
    end
    checks++;
    if (nblank == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
