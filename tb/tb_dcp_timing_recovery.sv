// tb_dcp_timing_recovery: random symbols of three samples (early, nominal,
// late). After each symbol the two error outputs are compared with the
// averages over the last 8 symbols of |nominal - early| and |late - nominal|
// (8-bit wrap-around differences), `data` with the nominal sample, and `ov`
// with its two-clock delay after the final sample.
module tb_dcp_timing_recovery;
  logic clk = 0, rst = 1, iv = 0, final_s = 0, ov;
  logic [7:0] din, data, err_early, err_late;
  int checks = 0, failures = 0;
  dcp_timing_recovery dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int mabs(int a, int b);
    int d = (a - b) & 255;
    if (d >= 128) d = 256 - d;
    return d;
  endfunction
  initial begin
    int e [$], l [$];
    int s [3], se, sl, base, lat;
    din = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int sym = 0; sym < 200; sym++) begin
      base = $urandom_range(255, 0);
      s[0] = (base + $urandom_range(60, 0) - 30) & 255;
      s[1] = base;
      s[2] = (base + $urandom_range(100, 0) - 50) & 255;
      if (sym % 17 == 3) s[2] = (base + 128) & 255;
      for (int k = 0; k < 3; k++) begin
        @(negedge clk); iv = 1; din = 8'(s[k]); final_s = (k == 2);
        @(negedge clk); iv = 0; final_s = 0;
      end
      e.push_back(mabs(s[1], s[0])); l.push_back(mabs(s[2], s[1]));
      if (e.size() > 8) begin void'(e.pop_front()); void'(l.pop_front()); end
      se = 0; sl = 0;
      foreach (e[k]) begin se += e[k]; sl += l[k]; end
      lat = 1;
      while (!ov && lat < 5) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 2) begin failures++; $display("ov latency %0d", lat); end
      checks++;
      if (int'(err_early) != (se & 1023) / 8 || int'(err_late) != (sl & 1023) / 8 || int'(data) != s[1]) begin
        failures++;
        if (failures < 10) $display("sym %0d: err %0d %0d exp %0d %0d data %0d/%0d", sym, err_early, err_late, se/8, sl/8, data, s[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
