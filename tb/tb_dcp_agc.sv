// tb_dcp_agc: (1) every output is checked against the gain the block
// reports: out = sat16(in * 2**e * (1 + m/4096) / 16). (2) A steady carrier
// far below the set point makes the gain rise (release) until the output
// magnitude settles near the set point; a step up by 24 dB makes it fall
// (attack). (3) When the carrier disappears the gain is held for the hang
// time (hang_time * 256 samples) and then rises again. Each of the three
// loop modes is counted and must occur.
module tb_dcp_agc;
  logic clk = 0, rst = 1, in_valid = 0, out_valid, hanging, ovf;
  logic signed [19:0] in_i, in_q;
  logic [3:0] attack, release_g;
  logic [7:0] setpoint, hang_thresh, hang_time, gain_limit;
  logic signed [15:0] out_i, out_q;
  logic [15:0] gain;
  int checks = 0, failures = 0;
  int n_attack = 0, n_release = 0, n_hang = 0;
  dcp_agc dut (.*);
  always #5 clk = ~clk;
  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int sat(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction
  function automatic int mag8(logic signed [15:0] a, logic signed [15:0] b);
    int x = int'(a) >>> 8, y = int'(b) >>> 8, mx, mn, s;
    x = x < 0 ? -x : x; y = y < 0 ? -y : y;
    mx = x > y ? x : y; mn = x > y ? y : x;
    s = mx + mn / 2;
    return s - s / 8;
  endfunction

  // one sample every 8 clocks; phase rotates so I and Q both vary
  task automatic feed(input int amp, input int n, output int last_mag);
    logic [15:0] g;
    longint ei, eq;
    real ph;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      ph = real'(k) * 0.37;
      in_i = 20'($rtoi(real'(amp) * $cos(ph)));
      in_q = 20'($rtoi(real'(amp) * $sin(ph)));
      in_valid = 1; g = gain;
      @(negedge clk); in_valid = 0;
      ei = ((longint'(in_i) * (4096 + longint'(g[11:0]))) <<< g[15:12]) >>> 16;
      eq = ((longint'(in_q) * (4096 + longint'(g[11:0]))) <<< g[15:12]) >>> 16;
      checks++;
      if (int'(out_i) != sat(ei) || int'(out_q) != sat(eq)) begin
        failures++;
        if (failures < 10) $display("gain %h in %0d out %0d exp %0d", g, in_i, out_i, sat(ei));
      end
      @(negedge clk);
      if (hanging) n_hang++;
      else if (mag8(out_i, out_q) > int'(setpoint)) n_attack++;
      else n_release++;
      repeat (5) @(negedge clk);
      last_mag = mag8(out_i, out_q);
    end
  endtask

  initial begin
    int m;
    logic [15:0] g0;
    in_i = 0; in_q = 0;
    attack = 4'd8; release_g = 4'd6; setpoint = 8'd80; hang_thresh = 8'd20;
    hang_time = 8'd2; gain_limit = 8'hFF;
    repeat (2) @(posedge clk); #1 rst = 0;
    feed(3000, 3000, m);
    checks++;
    if (m < 70 || m > 90) begin failures++; $display("release: settled at %0d", m); end
    feed(48000, 1500, m);
    checks++;
    if (m < 70 || m > 90) begin failures++; $display("attack: settled at %0d", m); end
    // carrier disappears: gain is held for 2*256 samples
    g0 = gain;
    feed(0, 400, m);
    checks++;
    if (gain != g0) begin failures++; $display("hang: gain moved %h -> %h", g0, gain); end
    feed(0, 300, m);
    checks++;
    if (gain <= g0) begin failures++; $display("after hang: gain did not rise"); end
    checks += 3;
    if (n_attack == 0) failures++;
    if (n_release == 0) failures++;
    if (n_hang == 0) failures++;
    $display("attack %0d release %0d hang %0d samples", n_attack, n_release, n_hang);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
