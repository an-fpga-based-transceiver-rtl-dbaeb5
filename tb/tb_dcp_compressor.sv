// tb_dcp_compressor: loads a random gain table in reverse order, then
// checks each output pair against the table entry picked by the magnitude
// estimate 7/8*(max + min/2) (computed here from its definition) and
// against saturation at 16 bits.
module tb_dcp_compressor;
  logic clk = 0, rst = 1, tbl_we = 0, in_valid = 0, out_valid;
  logic [7:0] tbl_data;
  logic signed [15:0] in_i, in_q, out_i, out_q;
  logic [5:0] index;
  int checks = 0, failures = 0, nsat = 0;
  logic [7:0] table_v [64];
  dcp_compressor dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int ab(logic signed [15:0] v);
    int t = int'(v) >>> 8;
    return t < 0 ? -t : t;
  endfunction
  function automatic int sat(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction
  initial begin
    int a, b, mx, mn, s, m, g, ei, eq;
    tbl_data = 0; in_i = 0; in_q = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 64; k++) table_v[k] = 8'($urandom);
    for (int k = 63; k >= 0; k--) begin
      @(negedge clk); tbl_we = 1; tbl_data = table_v[k];
    end
    @(negedge clk); tbl_we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_i = 16'($urandom); in_q = 16'($urandom);
      if (n % 2 == 0) begin in_i = in_i >>> ($urandom_range(7, 0)); in_q = in_q >>> ($urandom_range(7, 0)); end
      a = ab(in_i); b = ab(in_q);
      mx = a > b ? a : b; mn = a > b ? b : a;
      s = mx + mn / 2;
      m = s - s / 8;
      g = int'(table_v[m / 4]);
      ei = sat((longint'(in_i) * g) >>> 4);
      eq = sat((longint'(in_q) * g) >>> 4);
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid || int'(out_i) != ei || int'(out_q) != eq || int'(index) != m / 4) begin
        failures++;
        if (failures < 10) $display("in %0d %0d out %0d %0d exp %0d %0d idx %0d/%0d", in_i, in_q, out_i, out_q, ei, eq, index, m/4);
      end
      if (ei == 32767 || ei == -32768) nsat++;
    end
    checks++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
