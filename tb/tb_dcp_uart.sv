// tb_dcp_uart: the transmitter is looped back to the receiver. 40 random
// bytes are sent in bursts that fill the 15-entry transmit FIFO (TXR must
// drop when it is full and TXE must be high only when everything is sent);
// every byte must come back in order with FE clear, and every low run on
// the line must last a whole number of bit times, 16 * (divisor + 1) clocks. A byte with a low stop bit, driven by a
// model transmitter, must be received with FE set.
module tb_dcp_uart;
  logic clk = 0, rst = 1;
  logic div_we = 0, tx_we = 0, rx_re = 0;
  logic [15:0] div_data = 0;
  logic [7:0] tx_data = 0;
  logic [8:0] rx_data;
  logic txe, txr, rxf, rxr, txd, rxd;
  logic use_model = 0, model = 1;
  int checks = 0, failures = 0;
  localparam int DIV = 4;
  localparam int BIT = 16 * (DIV + 1);
  assign rxd = use_model ? model : txd;
  dcp_uart dut (.*);
  always #5 clk = ~clk;
  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // start-bit length
  int bad_len = 0, nstarts = 0;
  logic txd_d = 1;
  int run = 0;
  always @(posedge clk) begin
    txd_d <= txd;
    if (!txd) run <= run + 1;
    else run <= 0;
    // every low run (start bit plus any low data bits after it) must be a
    // whole number of bit times
    if (txd && !txd_d) begin
      nstarts++;
      if (run % BIT != 0) bad_len++;
    end
  end
  logic [8:0] got [$];
  always @(negedge clk) begin
    rx_re = 0;
    if (rxr) begin got.push_back(rx_data); rx_re = 1; end
  end
  initial begin
    logic [7:0] sent [$];
    int k = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    @(negedge clk); div_we = 1; div_data = DIV; @(negedge clk); div_we = 0;
    checks++; if (!txe) begin failures++; $display("TXE low at start"); end
    for (int b = 0; b < 3; b++) begin
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        if (txr) begin tx_we = 1; tx_data = 8'($urandom); sent.push_back(tx_data); end
        else begin
          checks++;
          if (i < 15) begin failures++; $display("TXR low with %0d bytes queued", i); end
        end
        @(negedge clk); tx_we = 0;
      end
      checks++; if (txe) begin failures++; $display("TXE high while sending"); end
      while (!txe) @(negedge clk);
      repeat (2 * BIT) @(negedge clk);
    end
    checks++;
    if (got.size() != sent.size()) begin failures++; $display("got %0d bytes of %0d", got.size(), sent.size()); end
    foreach (sent[i]) if (i < got.size()) begin
      checks++;
      if (got[i] != {1'b0, sent[i]}) begin failures++; $display("byte %0d: %h sent %h", i, got[i], sent[i]); end
    end
    checks++;
    if (bad_len != 0 || nstarts < 20) begin failures++; $display("%0d bad low-run lengths of %0d", bad_len, nstarts); end
    // framing error from the model transmitter
    got.delete();
    use_model = 1;
    begin
      logic [9:0] fr = {1'b0, 8'h5A, 1'b0};
      for (int i = 0; i < 10; i++) begin model = fr[i]; repeat (BIT) @(negedge clk); end
      model = 1; repeat (2 * BIT) @(negedge clk);
    end
    checks++;
    if (got.size() < 1 || got[0] != 9'h15A) begin failures++; $display("framing error not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
