// tb_dcp_cic: checks the CIC filter against a direct-form reference.
// Receive: random input, every output compared (within 1 LSB) with the
// convolution of the input with the fourth power of an R-sample boxcar,
// scaled by frac * 2**exp / 2**38; the output rate (one per R inputs) is
// checked too. Transmit: the DC gain and the sum of an impulse response are
// compared with ratio**3 and ratio**4 scaled by mult * 2**exp / 2**28.
module tb_dcp_cic;
  logic clk = 0, rst = 1, ce = 0, xmt = 0;
  logic [9:0] ratio;
  logic [10:0] gain_frac;
  logic [3:0] tx_mult, gain_exp;
  logic signed [17:0] rdi, rdo, tdi, tdo;
  logic rdo_valid, tdi_req;
  int checks = 0, failures = 0;

  dcp_cic dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint h [0:4*640];
  longint xs [$];

  function automatic void make_h(int r);
    longint t [0:4*640];
    for (int i = 0; i <= 4*640; i++) h[i] = (i < r) ? 1 : 0;
    for (int st = 1; st < 4; st++) begin
      for (int i = 0; i <= 4*640; i++) begin
        t[i] = 0;
        for (int k = 0; k < r; k++) if (i - k >= 0) t[i] += h[i-k];
      end
      for (int i = 0; i <= 4*640; i++) h[i] = t[i];
    end
  endfunction

  task automatic rx_test(input int r, input int frac, input int ex, input int amp);
    int outs = 0, last_in = 0, nin = 0, good = 0, tried = 0;
    longint ref_v [$];
    longint got [$];
    int in_idx [$];
    xmt = 0; ratio = 10'(r); gain_frac = 11'(frac); gain_exp = 4'(ex);
    make_h(r);
    rst = 1; @(posedge clk); #1 rst = 0;
    xs.delete();
    for (int n = 0; n < 30 * r; n++) begin
      rdi = 18'($signed($urandom_range(2*amp, 0)) - amp);
      ce = 1;
      xs.push_back(longint'(rdi));
      @(posedge clk); #1;
      nin++;
      if (rdo_valid) begin
        got.push_back(longint'(rdo));
        in_idx.push_back(nin);
        if (outs > 0) begin
          checks++;
          if (nin - last_in != r) begin failures++; $display("rate: %0d", nin - last_in); end
        end
        last_in = nin; outs++;
      end
    end
    ce = 0;
    // find the pipeline delay d, then compare all settled outputs
    for (int d = 0; d < 8; d++) begin
      int ok = 0, cnt = 0;
      for (int m = 0; m < got.size(); m++) begin
        longint acc = 0;
        int endi = in_idx[m] - 1 - d;
        if (endi < 4 * r) continue;
        for (int k = 0; k < 4 * r; k++) acc += h[k] * xs[endi - k];
        acc = (acc * frac) <<< ex;
        acc = acc >>> 38;
        cnt++;
        if (got[m] - acc <= 1 && acc - got[m] <= 1) ok++;
      end
      if (cnt > 0 && ok == cnt) begin good = 1; tried = cnt; end
    end
    checks++;
    if (!good) begin failures++; $display("rx r=%0d: no alignment matches", r); end
    else $display("rx r=%0d: %0d outputs match", r, tried);
    checks += tried;
  endtask

  task automatic tx_test(input int r, input int m, input int ex, input int amp);
    longint s, expdc;
    int nreq = 0;
    xmt = 1; ratio = 10'(r); tx_mult = 4'(m); gain_exp = 4'(ex);
    rst = 1; @(posedge clk); #1 rst = 0;
    tdi = 18'(amp); ce = 1;
    repeat (10 * r) begin @(posedge clk); #1; if (tdi_req) nreq++; end
    expdc = ((longint'(amp) * m * r * r * r) <<< ex) >>> 28;
    checks++;
    if (tdo - expdc > 1 || expdc - tdo > 1) begin failures++; $display("tx dc %0d exp %0d", tdo, expdc); end
    checks++;
    if (nreq != 10) begin failures++; $display("tx req count %0d", nreq); end
    // impulse: one nonzero low-rate sample
    rst = 1; @(posedge clk); #1 rst = 0;
    s = 0; tdi = 18'(amp);
    for (int n = 0; n < 8 * r; n++) begin
      @(posedge clk); #1;
      if (tdi_req) tdi = 0;
      s += longint'(tdo);
    end
    expdc = ((longint'(amp) * m * r * r * r * r) <<< ex) >>> 28;
    checks++;
    if (s - expdc > 4 * r || expdc - s > 4 * r) begin failures++; $display("tx impulse sum %0d exp %0d", s, expdc); end
    ce = 0;
  endtask

  initial begin
    ratio = 10; gain_frac = 0; tx_mult = 0; gain_exp = 0; rdi = 0; tdi = 0;
    @(negedge clk);
    rx_test(10, 1000, 15, 100000);
    rx_test(13, 517, 9, 131071);
    rx_test(40, 700, 4, 50000);
    tx_test(10, 8, 15, 100000);
    tx_test(25, 3, 11, -70000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
