// tb_dcp_crc: feeds "123456789" byte by byte and checks the standard check
// values (CRC-32 0xCBF43926, CRC-16/X.25 0x906E after inversion), checks
// that each byte keeps busy high for exactly 4 clocks, then feeds the same
// string as 16-bit words (low byte first) with a random ninth byte and
// compares with a bit-by-bit reference model; the word cycle count must be 8.
module tb_dcp_crc;
  logic clk = 0, rst = 1, init = 0, byte_we = 0, word_we = 0, busy;
  logic [15:0] data = 0, crc16;
  logic [31:0] crc32;
  int checks = 0, failures = 0;
  dcp_crc dut (.*);
  always #5 clk = ~clk;
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [31:0] r32;
  logic [15:0] r16;
  task automatic ref_byte(input logic [7:0] b);
    for (int i = 0; i < 8; i++) begin
      r32 = (r32[0] ^ b[i]) ? ((r32 >> 1) ^ 32'hEDB88320) : (r32 >> 1);
      r16 = (r16[0] ^ b[i]) ? ((r16 >> 1) ^ 16'h8408) : (r16 >> 1);
    end
  endtask
  task automatic send(input bit word, input logic [15:0] d, input int expect_cycles);
    int n = 0;
    @(negedge clk); data = d; byte_we = !word; word_we = word;
    @(negedge clk); byte_we = 0; word_we = 0;
    while (busy) begin n++; @(negedge clk); end
    checks++;
    if (n != expect_cycles) begin failures++; $display("busy for %0d clocks, expected %0d", n, expect_cycles); end
  endtask
  initial begin
    static string s = "123456789";
    logic [7:0] extra;
    repeat (2) @(posedge clk); #1 rst = 0;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    for (int i = 0; i < 9; i++) send(0, {8'h00, s[i]}, 4);
    checks += 2;
    if (~crc32 != 32'hCBF43926) begin failures++; $display("crc32 %h", ~crc32); end
    if (~crc16 != 16'h906E) begin failures++; $display("crc16 %h", ~crc16); end
    for (int t = 0; t < 20; t++) begin
      @(negedge clk); init = 1; @(negedge clk); init = 0;
      r32 = '1; r16 = '1;
      for (int i = 0; i < 8; i += 2) begin
        send(1, {s[i + 1], s[i]}, 8);
        ref_byte(s[i]); ref_byte(s[i + 1]);
      end
      extra = 8'($urandom);
      send(0, {8'hA5, extra}, 4);
      ref_byte(extra);
      checks += 2;
      if (crc32 != r32) begin failures++; $display("word crc32 %h ref %h", crc32, r32); end
      if (crc16 != r16) begin failures++; $display("word crc16 %h ref %h", crc16, r16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
