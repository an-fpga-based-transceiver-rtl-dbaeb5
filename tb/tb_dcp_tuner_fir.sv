// tb_dcp_tuner_fir: loads filter programs through the 9-bit port and checks
// every output against a direct evaluation of the program on the sample
// history: a decimating single-output program, an interpolating program with
// two W instructions, and saturation with the overflow flag. The number of
// clock edges from the last input sample to the first output is checked:
// position of the first W instruction + 5 (request, start, fetch, data
// read, multiply-accumulate).
module tb_dcp_tuner_fir;
  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic signed [17:0] in_i, in_q;
  logic [5:0] dec;
  logic dec_wr = 0;
  logic ld_rst = 0, ld_we = 0;
  logic [8:0] ld_data;
  logic out_valid, ovf, busy;
  logic signed [17:0] out_i, out_q;
  int checks = 0, failures = 0;

  dcp_tuner_fir dut (.*);
  always #5 clk = ~clk;

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [35:0] prog [$];
  longint hi [$], hq [$];
  int outs_i [$], outs_q [$], ovfs;

  always @(posedge clk) if (out_valid) begin
    outs_i.push_back(int'(out_i)); outs_q.push_back(int'(out_q));
    if (ovf) ovfs++;
  end

  task automatic load(input logic [35:0] p [$]);
    @(negedge clk); ld_rst = 1;
    foreach (p[k]) for (int s = 0; s < 4; s++) begin
      @(negedge clk); ld_we = 1; ld_data = p[k][9*s +: 9];
      @(negedge clk); ld_we = 0;
    end
    @(negedge clk); ld_rst = 0;
  endtask

  function automatic logic [35:0] ins(int idx, int coef, bit w, bit e);
    return {e, 1'b0, w, 9'(idx), 24'(coef)};
  endfunction

  function automatic int expect_out(longint h [$], int first, int last_k, longint sat);
    longint acc = 0, r, c;
    logic signed [23:0] cf;
    int n, ix;
    n = h.size();
    for (int k = first; k <= last_k; k++) begin
      cf = prog[k][23:0];
      c = longint'(cf);
      ix = n - 1 - int'(prog[k][32:24]);
      acc += c * h[ix];
    end
    r = (acc + (64'sd1 << 22)) >>> 23;
    if (r > sat - 1) r = sat - 1;
    if (r < -sat) r = -sat;
    return int'(r);
  endfunction

  task automatic run(input int d, input int nburst, input int amp, input int wpos [$]);
    int t0, lat;
    dec = 6'(d);
    @(negedge clk); dec_wr = 1; @(negedge clk); dec_wr = 0;
    for (int b = 0; b < nburst; b++) begin
      outs_i.delete(); outs_q.delete();
      for (int n = 0; n < d; n++) begin
        @(negedge clk);
        in_valid = 1;
        in_i = 18'($signed($urandom_range(2*amp, 0)) - amp);
        in_q = 18'($signed($urandom_range(2*amp, 0)) - amp);
        hi.push_back(longint'(in_i)); hq.push_back(longint'(in_q));
      end
      @(negedge clk); in_valid = 0;
      t0 = 0;
      while (outs_i.size() == 0) begin @(negedge clk); t0++; end
      while (busy) @(negedge clk);
      @(negedge clk);
      lat = t0;
      begin
        checks++;
        if (lat != wpos[0] + 5) begin failures++; $display("latency %0d", lat); end
        checks++;
        if (outs_i.size() != wpos.size()) begin failures++; $display("outputs %0d", outs_i.size()); end
        else foreach (wpos[j]) begin
          int first = (j == 0) ? 0 : wpos[j-1] + 1;
          int ei = expect_out(hi, first, wpos[j], 131072);
          int eq = expect_out(hq, first, wpos[j], 131072);
          checks++;
          if (ei != outs_i[j] || eq != outs_q[j]) begin
            failures++; $display("out %0d: %0d %0d exp %0d %0d", j, outs_i[j], outs_q[j], ei, eq);
          end
        end
      end
    end
  endtask

  initial begin
    int wp [$];
    in_i = 0; in_q = 0; dec = 0; ld_data = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    // prime the sample history so every index is valid
    dec = 0;
    repeat (300) begin
      @(negedge clk); in_valid = 1; in_i = 18'($urandom); in_q = 18'($urandom);
      hi.push_back(longint'(in_i)); hq.push_back(longint'(in_q));
    end
    @(negedge clk); in_valid = 0;
    // 1) 24-tap decimating filter, single output
    prog.delete();
    for (int k = 0; k < 24; k++)
      prog.push_back(ins(k * 3 % 37, $signed($urandom_range(800000, 0)) - 400000, k == 23, k == 22));
    load(prog);
    wp = {23};
    run(4, 6, 131071, wp);
    // 2) interpolating program: two outputs, 10 and 14 taps
    prog.delete();
    for (int k = 0; k < 24; k++)
      prog.push_back(ins(k + (k >= 10 ? 100 : 0), $signed($urandom_range(2000000, 0)) - 1000000,
                         k == 9 || k == 23, k == 22));
    load(prog);
    wp = {9, 23};
    run(1, 5, 131071, wp);
    // 3) saturation
    ovfs = 0;
    prog.delete();
    for (int k = 0; k < 2; k++) prog.push_back(ins(0, 24'sh7FFFFF, k == 1, k == 0));
    load(prog);
    wp = {1};
    run(2, 3, 131071, wp);
    checks++;
    if (ovfs == 0) begin failures++; $display("no overflow flag"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
