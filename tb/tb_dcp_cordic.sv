// tb_dcp_cordic: random vectors in all four quadrants. Vector mode: the
// magnitude and angle are compared with sqrt(x*x+y*y) and z + atan2(y, x)
// (2**15 = 180 degrees). Rotate mode: the outputs are compared with the
// rotation of (x, y) by z. Tolerance 4 LSB. The start-to-done time is
// checked to be 18 clocks.
module tb_dcp_cordic;
  logic clk = 0, rst = 1, start = 0, mode = 0, busy, done;
  logic signed [15:0] x_in, y_in, z_in, x_out, y_out, z_out;
  int checks = 0, failures = 0;
  dcp_cordic dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic real absr(real v); return v < 0 ? -v : v; endfunction
  localparam real PI = 3.14159265358979;
  initial begin
    real ex, ey, ez, a, d;
    int cyc;
    x_in = 0; y_in = 0; z_in = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      mode = n[0];
      x_in = 16'($signed($urandom_range(44000, 0)) - 22000);
      y_in = 16'($signed($urandom_range(44000, 0)) - 22000);
      z_in = 16'($urandom);
      start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 18) begin failures++; $display("latency %0d", cyc); end
      if (!mode) begin
        ex = $sqrt(real'(x_in) * real'(x_in) + real'(y_in) * real'(y_in));
        ez = real'(z_in) + $atan2(real'(y_in), real'(x_in)) / PI * 32768.0;
        d = real'(z_out) - ez;
        if (d > 32768.0) d -= 65536.0;
        if (d < -32768.0) d += 65536.0;
        checks++;
        if (absr(real'(x_out) - ex) > 4.0 || absr(d) > 4.0 || absr(real'(y_out)) > 4.0) begin
          failures++;
          if (failures < 10) $display("vec (%0d,%0d): mag %0d (%f) ang %0d (%f)", x_in, y_in, x_out, ex, z_out, ez);
        end
      end else begin
        a = real'(z_in) / 32768.0 * PI;
        ex = real'(x_in) * $cos(a) - real'(y_in) * $sin(a);
        ey = real'(x_in) * $sin(a) + real'(y_in) * $cos(a);
        checks++;
        if (absr(real'(x_out) - ex) > 4.0 || absr(real'(y_out) - ey) > 4.0) begin
          failures++;
          if (failures < 10) $display("rot (%0d,%0d) by %0d: (%0d,%0d) exp (%f,%f)", x_in, y_in, z_in, x_out, y_out, ex, ey);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
