// tb_dcp_spi: a mode-0 SPI slave model checks byte transfers in both
// directions (MOSI sampled on rising SCK, MISO changed after falling SCK),
// the 32-clock transfer time for 8 bits and the SCK period of 4 clocks, and
// the slave-select set/clear commands; a second instance with 16 bits and
// automatic select checks the 64-clock DAC word transfer.
module tb_dcp_spi;
  logic clk = 0, rst = 1;
  logic start = 0, ss_on = 0, ss_off = 0;
  logic [7:0] tx = 0, rx;
  logic busy, sck, mosi, ss_n;
  logic miso;
  logic start2 = 0;
  logic [15:0] tx2 = 0, rx2;
  logic busy2, sck2, mosi2, ss2_n;
  int checks = 0, failures = 0;
  dcp_spi #(.NBITS(8)) dut (.clk, .rst, .start, .tx, .ss_on, .ss_off, .rx, .busy, .sck, .mosi, .miso, .ss_n);
  dcp_spi #(.NBITS(16), .AUTO_SS(1'b1)) dut2 (.clk, .rst, .start(start2), .tx(tx2), .ss_on(1'b0),
    .ss_off(1'b0), .rx(rx2), .busy(busy2), .sck(sck2), .mosi(mosi2), .miso(1'b0), .ss_n(ss2_n));
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // slave: shift register, MISO = MSB, updated on falling edges
  logic [7:0] srx, stx;
  logic [15:0] srx2;
  int rises;
  always @(posedge sck) begin srx <= {srx[6:0], mosi}; rises++; end
  always @(negedge sck) stx <= {stx[6:0], 1'b0};
  assign miso = stx[7];
  always @(posedge sck2) srx2 <= {srx2[14:0], mosi2};
  // SCK period: time between rising edges must be 40 ns
  realtime last_rise = 0;
  always @(posedge sck) begin
    if (last_rise != 0 && busy && $realtime - last_rise != 40.0) begin
      failures++; $display("sck period %0t", $realtime - last_rise);
    end
    last_rise = $realtime;
  end
  initial begin
    int n;
    logic [7:0] sb;
    repeat (2) @(posedge clk); #1 rst = 0;
    @(negedge clk); ss_on = 1; @(negedge clk); ss_on = 0;
    checks++; if (ss_n !== 1'b0) begin failures++; $display("ss_n not active"); end
    for (int t = 0; t < 30; t++) begin
      tx = 8'($urandom); sb = 8'($urandom); stx = sb; rises = 0; last_rise = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      n = 0;
      while (busy) begin n++; @(negedge clk); end
      checks += 4;
      if (n != 32) begin failures++; $display("busy %0d clocks", n); end
      if (srx != tx) begin failures++; $display("slave got %h sent %h", srx, tx); end
      if (rx != sb) begin failures++; $display("master got %h slave sent %h", rx, sb); end
      if (rises != 8) begin failures++; $display("%0d sck edges", rises); end
    end
    @(negedge clk); ss_off = 1; @(negedge clk); ss_off = 0;
    checks++; if (ss_n !== 1'b1) begin failures++; $display("ss_n still active"); end
    for (int t = 0; t < 10; t++) begin
      tx2 = {4'h0, 12'($urandom)};
      @(negedge clk); start2 = 1; @(negedge clk); start2 = 0;
      checks++; if (ss2_n !== 1'b0) begin failures++; $display("auto select not active"); end
      n = 0;
      while (busy2) begin n++; @(negedge clk); end
      checks += 3;
      if (n != 64) begin failures++; $display("dac busy %0d clocks", n); end
      if (srx2 != tx2) begin failures++; $display("dac got %h sent %h", srx2, tx2); end
      if (ss2_n !== 1'b1) begin failures++; $display("auto select stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
