// tb_dcp_rect_to_polar: streams random and hand-picked X/Y pairs through the
// rectangular-to-polar converter, one per clock, and compares each result
// with real-valued atan2 and log2 of the same input: the phase must be within
// one 11.25 degree step (modulo 32) and the magnitude within two 1.5 dB steps
// of 4*log2(|v|) - 12, for inputs whose larger component is at least 64.
// Also checks the 6-clock latency, full throughput, the four axis directions
// and that every quadrant is reached.
module tb_dcp_rect_to_polar;
  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic signed [15:0] x = 0, y = 0;
  logic out_valid;
  logic [4:0] phs;
  logic [6:0] mag;
  int checks = 0, failures = 0;

  dcp_rect_to_polar dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam int N = 2000;
  logic signed [15:0] xs [N], ys [N];
  int sent = 0, got = 0, quad_hits [4];

  function automatic int want_phs(int a, int b);
    real t;
    t = $atan2(real'(b), real'(a)) / (2.0 * 3.14159265358979) * 32.0;
    return int'($floor(t + 0.5)) & 31;
  endfunction

  function automatic int want_mag(int a, int b);
    real m;
    m = 4.0 * $ln($sqrt(real'(a) ** 2 + real'(b) ** 2)) / $ln(2.0) - 12.0;
    return int'($floor(m + 0.5));
  endfunction

  // compare the outputs in order with the inputs sent
  always @(negedge clk) if (!rst && out_valid) begin
    int dp, wm;
    dp = (int'(phs) - want_phs(int'(xs[got]), int'(ys[got]))) & 31;
    wm = want_mag(int'(xs[got]), int'(ys[got]));
    check(dp == 0 || dp == 1 || dp == 31,
          $sformatf("phase of (%0d,%0d): %0d want %0d", xs[got], ys[got], phs,
                    want_phs(int'(xs[got]), int'(ys[got]))));
    check(int'(mag) >= wm - 2 && int'(mag) <= wm + 2,
          $sformatf("magnitude of (%0d,%0d): %0d want %0d", xs[got], ys[got], mag, wm));
    quad_hits[phs[4:3]]++;
    got++;
  end

  initial begin
    int lat, r, sx, sy;
    // test vectors: the four axes, the diagonal extremes, then random sizes
    xs[0] = 16'sd1000;   ys[0] = 16'sd0;
    xs[1] = 16'sd0;      ys[1] = 16'sd1000;
    xs[2] = -16'sd1000;  ys[2] = 16'sd0;
    xs[3] = 16'sd0;      ys[3] = -16'sd1000;
    xs[4] = 16'sd32767;  ys[4] = 16'sd32767;
    xs[5] = -16'sd32768; ys[5] = -16'sd32768;
    for (int i = 6; i < N; i++) begin
      r = 6 + ($urandom % 10);                 // component size 2^6 .. 2^15
      do begin
        sx = int'($urandom % (1 << r)) - (1 << (r - 1)) * int'($urandom % 2) * 2;
        sy = int'($urandom % (1 << r)) - (1 << (r - 1)) * int'($urandom % 2) * 2;
      end while ((sx < 0 ? -sx : sx) < 64 && (sy < 0 ? -sy : sy) < 64);
      xs[i] = 16'(sx); ys[i] = 16'(sy);
    end
    @(posedge clk); #1 rst = 0;
    // latency of one isolated pair
    @(negedge clk); x = xs[0]; y = ys[0]; in_valid = 1;
    @(negedge clk); in_valid = 0;
    lat = 1;
    while (!out_valid && lat < 20) begin @(negedge clk); lat++; end
    check(lat == 6, $sformatf("latency %0d", lat));
    @(negedge clk);
    // full rate stream
    for (int i = 1; i < N; i++) begin
      x = xs[i]; y = ys[i]; in_valid = 1;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (10) @(negedge clk);
    check(got == N, $sformatf("%0d results for %0d inputs", got, N));
    check(quad_hits[0] > 0 && quad_hits[1] > 0 && quad_hits[2] > 0 && quad_hits[3] > 0,
          "all quadrants");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
