// tb_dcp_dds: checks the synthesizer's cosine and sine outputs against
// real-valued cos/sin of the accumulator phase, for several tuning words,
// and checks the 4-sample latency and the accumulator step.
module tb_dcp_dds;
  logic clk = 0, rst = 1, ce = 0;
  logic [31:0] freq;
  logic signed [17:0] cos_o, sin_o;
  logic [31:0] phase;
  int checks = 0, failures = 0;
  logic [31:0] hist [$];

  dcp_dds dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] f, input int n);
    real a, ec, es;
    logic [31:0] p;
    freq = f;
    hist.delete();
    repeat (n) begin
      @(negedge clk);
      hist.push_back(phase);
      if (hist.size() > 4) begin
        p = hist.pop_front();
        a = 2.0 * 3.14159265358979 * real'(p) / 4294967296.0;
        ec = 131071.0 * $cos(a);
        es = 131071.0 * $sin(a);
        checks++;
        if ((real'(cos_o) - ec > 2.0) || (ec - real'(cos_o) > 2.0) ||
            (real'(sin_o) - es > 2.0) || (es - real'(sin_o) > 2.0)) begin
          failures++;
          if (failures < 10) $display("mismatch phase=%h cos=%0d (%f) sin=%0d (%f)", p, cos_o, ec, sin_o, es);
        end
      end
    end
  endtask

  initial begin
    logic [31:0] p0;
    freq = 0;
    repeat (3) @(posedge clk);
    rst = 0; ce = 1;
    run(32'h0123_4567, 300);
    run(32'h0800_0000, 100);
    run(32'hF3A1_0F01, 300);
    run(32'h0000_3F11, 50);
    // accumulator step
    @(negedge clk); p0 = phase;
    @(negedge clk); checks++;
    if (phase != p0 + freq) failures++;
    // hold when not enabled
    ce = 0; p0 = phase;
    @(negedge clk); @(negedge clk); checks++;
    if (phase != p0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
