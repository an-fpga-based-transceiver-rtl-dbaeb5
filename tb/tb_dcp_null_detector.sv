// tb_dcp_null_detector: a carrier with noisy magnitude, a null symbol and
// the carrier again. The RSSI is compared every sample (after the delay
// line has filled) with the moving sum of the last L magnitudes computed
// here from the running 24-bit sum; dcd must drop during the null; once the
// detector is armed with ini, sof must
// pulse exactly once, `delay` samples (+/- 2) after the end of the null.
// Both threshold settings (h = 0 and h = 1) are run.
module tb_dcp_null_detector;
  logic clk = 0, rst = 1, valid = 0, h = 0, ini = 0, dcd, sof;
  logic [15:0] mag;
  logic [8:0] sym_len;
  logic [5:0] delay;
  logic [17:0] rssi, max_rssi;
  int checks = 0, failures = 0;
  dcp_null_detector dut (.*);
  always #5 clk = ~clk;
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic frame(input int L, input int dl, input bit hh);
    longint S [$];
    longint s = 0;
    int nsof = 0, sof_at = -1, low_seen = 0, null_end;
    sym_len = 9'(L); delay = 6'(dl); h = hh;
    rst = 1; @(posedge clk); #1 rst = 0;
    null_end = 4 * L;
    for (int n = 0; n < 6 * L; n++) begin
      @(negedge clk);
      valid = 1;
      mag = (n >= 3 * L && n < 4 * L) ? 16'($urandom_range(200, 100)) : 16'($urandom_range(24000, 16000));
      s = (s + longint'(mag)) & 64'hFFFFFF;
      S.push_back(s);
      ini = (n == L + 5);
      @(negedge clk); valid = 0; ini = 0;
      if (n >= L) begin
        longint e = ((S[n] >> 6) - (S[n - L] >> 6)) & 64'h3FFFF;
        checks++;
        if (longint'(rssi) != e) begin failures++; if (failures < 10) $display("n=%0d rssi %0d exp %0d", n, rssi, e); end
      end
      if (n > L + 5 && !dcd) low_seen++;
      if (sof && n > L + 5) begin nsof++; sof_at = n; end
    end
    checks += 3;
    if (nsof != 1) begin failures++; $display("sof count %0d", nsof); end
    if (sof_at < null_end + dl - 2 || sof_at > null_end + dl + 2) begin failures++; $display("sof at %0d, null end %0d", sof_at, null_end); end
    if (low_seen == 0) begin failures++; $display("dcd never low"); end
  endtask
  initial begin
    mag = 0; sym_len = 64; delay = 8;
    repeat (2) @(posedge clk); #1 rst = 0;
    frame(64, 8, 0);
    frame(128, 16, 1);
    frame(40, 3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
