// tb_dcp_polar_to_rect: drives all 256 phase/magnitude codes through the
// polar-to-rectangular converter and compares each output pair with a
// reference built from real-valued cosine and sine. Also checks the one-clock
// latency, that magnitude code 0/1 switches the subcarrier off, and that the
// output length grows by 6 dB per shifter step.
module tb_dcp_polar_to_rect;
  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic [3:0] phs = 0, mag = 0;
  logic out_valid;
  logic signed [13:0] x, y;
  int checks = 0, failures = 0;

  dcp_polar_to_rect dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int ref_val(int p, int m, bit use_sin);
    real a;
    int t, s;
    a = 2.0 * 3.14159265358979 * p / 16.0;
    t = int'($floor(31.0 * (use_sin ? $sin(a) : $cos(a)) + 0.5));
    s = t + (((m & 1) != 0) ? (t >>> 1) : 0);
    if ((m >> 1) == 0) return 0;
    return s * (1 << (m >> 1));
  endfunction

  initial begin
    real len;
    int lat;
    @(posedge clk); #1 rst = 0;
    // latency
    @(negedge clk); phs = 4'd0; mag = 4'd15; in_valid = 1;
    @(negedge clk); in_valid = 0;
    lat = 1;
    while (!out_valid && lat < 10) begin @(negedge clk); lat++; end
    check(out_valid && lat == 1, $sformatf("latency %0d", lat));
    // every code
    for (int m = 0; m < 16; m++)
      for (int p = 0; p < 16; p++) begin
        @(negedge clk); phs = 4'(p); mag = 4'(m); in_valid = 1;
        @(negedge clk); in_valid = 0;
        check(out_valid, "valid");
        check(int'(x) == ref_val(p, m, 0) && int'(y) == ref_val(p, m, 1),
              $sformatf("phs %0d mag %0d: got %0d,%0d want %0d,%0d", p, m, x, y,
                        ref_val(p, m, 0), ref_val(p, m, 1)));
        if (m >= 2 && m[0] == 0) begin
          len = $sqrt(real'(x) ** 2 + real'(y) ** 2);
          check(len > 0.95 * 31.0 * (1 << (m >> 1)) && len < 1.05 * 31.0 * (1 << (m >> 1)),
                $sformatf("length %0f at mag %0d", len, m));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
