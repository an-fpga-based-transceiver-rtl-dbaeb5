// tb_dcp_phase_correlator: a stream of OFDM-like symbols whose cyclic
// prefix repeats the last CP samples of the symbol body (random phases, with
// a little noise on the copy). `avg` is compared every sample with the sum
// over the last CP samples of |phase - phase N samples earlier| (12-bit
// wrap-around), and `sync` must pulse once per symbol, `delay` samples
// (+/- 2) after the end of the symbol, once the delay line has filled.
// The cyclic prefixes are long enough (24 and 32 samples) for the summed
// error of random phases to exceed the quarter-scale limit between symbols.
module tb_dcp_phase_correlator;
  logic clk = 0, rst = 1, valid = 0, sync;
  logic [7:0] phase;
  logic [9:0] fft_len;
  logic [5:0] cp_len_m1, delay;
  logic [11:0] avg;
  int checks = 0, failures = 0;
  dcp_phase_correlator dut (.*);
  always #5 clk = ~clk;
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int mabs(int a, int b);
    int d = (a - b) & 255;
    if (d >= 128) d = 256 - d;
    return d;
  endfunction
  task automatic run(input int N, input int CP, input int dl, input int nsym);
    int p [$];
    int body [];
    int ad [$];
    int n = 0, nsync = 0, bad = 0, sum;
    int ends [$];
    fft_len = 10'(N); cp_len_m1 = 6'(CP - 1); delay = 6'(dl);
    rst = 1; @(posedge clk); #1 rst = 0;
    for (int s = 0; s < nsym; s++) begin
      body = new[N];
      foreach (body[k]) body[k] = $urandom_range(255, 0);
      for (int k = 0; k < CP; k++) p.push_back((body[N - CP + k] + $urandom_range(4, 0) - 2) & 255);
      foreach (body[k]) p.push_back(body[k]);
      ends.push_back(p.size() - 1);
    end
    foreach (p[i]) begin
      @(negedge clk); valid = 1; phase = 8'(p[i]);
      @(negedge clk); valid = 0;
      ad.push_back(i >= N ? mabs(p[i], p[i - N]) : 0);
      if (i >= N + CP) begin
        sum = 0;
        for (int k = 0; k < CP; k++) sum += ad[i - k];
        checks++;
        if (int'(avg) != (sum & 4095)) begin failures++; if (failures < 10) $display("i=%0d avg %0d exp %0d", i, avg, sum); end
      end
      if (sync && i >= N + CP) begin
        bit ok = 0;
        nsync++;
        foreach (ends[k]) if (i >= ends[k] + dl - 2 && i <= ends[k] + dl + 2) ok = 1;
        if (!ok) bad++;
      end
    end
    checks += 2;
    if (bad != 0) begin failures++; $display("misplaced sync pulses %0d", bad); end
    if (nsync < nsym - 2) begin failures++; $display("only %0d sync pulses for %0d symbols", nsync, nsym); end
  endtask
  initial begin
    phase = 0; fft_len = 64; cp_len_m1 = 7; delay = 4;
    repeat (2) @(posedge clk); #1 rst = 0;
    run(64, 24, 4, 12);
    run(256, 32, 10, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
