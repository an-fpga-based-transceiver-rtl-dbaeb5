// tb_dcp_i2s: I2S port with its data output looped back to its input.
// Writes left and right samples (low byte first, then the upper 16 bits)
// and expects them back from the receive FIFO with the right channel flag,
// checks that the low byte is zeroed by the MSW write, measures the bit
// clock (50 clocks) and the frame rate (2500 clocks, 32 ksps at 80 MHz),
// checks the serial bit order against the written word, and fills the
// receive FIFO to see the full flag.
module tb_dcp_i2s;
  logic clk = 0, rst = 1;
  logic lsb_we = 0, msw_we = 0, left_sel = 0, rx_re = 0;
  logic [15:0] wdata = 0, rx_msw;
  logic [7:0] rx_lsb;
  logic rx_left, txe, txr, rxf, rxr, bclk, lrclk, sdout, sdin;
  int checks = 0, failures = 0;
  assign sdin = sdout;

  dcp_i2s dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put(input bit left, input logic [23:0] v, input bit with_lsb);
    if (with_lsb) begin
      @(negedge clk); left_sel = left; wdata = {8'h00, v[7:0]}; lsb_we = 1;
      @(negedge clk); lsb_we = 0;
    end
    @(negedge clk); left_sel = left; wdata = v[23:8]; msw_we = 1;
    @(negedge clk); msw_we = 0;
  endtask

  task automatic pop(output bit left, output logic [23:0] v);
    @(negedge clk); left = rx_left; v = {rx_msw, rx_lsb}; rx_re = 1;
    @(negedge clk); rx_re = 0;
  endtask

  // bit clock and frame periods
  longint t_b = -1, t_l = -1, per_b = 0, per_l = 0;
  always @(posedge bclk) begin if (t_b >= 0) per_b = $time - t_b; t_b = $time; end
  always @(posedge lrclk) begin if (t_l >= 0) per_l = $time - t_l; t_l = $time; end

  // capture the serial word of each left slot (bits 1..24 after lrclk falls)
  logic [23:0] ser;
  int nb = -1;
  bit ser_seen = 0;
  always @(posedge bclk) begin
    if (nb >= 1 && nb <= 24) ser = {ser[22:0], sdout};
    if (nb == 24 && !lrclk && ser == 24'hC3A501) ser_seen = 1;
    if (nb >= 0) nb++;
  end
  always @(negedge lrclk) nb = 0;

  initial begin
    bit l;
    logic [23:0] v;
    int found_l, found_r, n;
    @(posedge clk); #1 rst = 0;
    check(txe && txr && !rxf, "idle flags");
    // drain start-up words
    repeat (3000) @(negedge clk);
    while (rxr) pop(l, v);
    put(1, 24'hABCDEF, 1);
    put(0, 24'h123456, 1);
    check(!txe, "TXE clear after writes");
    put(1, 24'h778899, 0);            // no LSB write: low byte must be 0
    put(0, 24'h001122, 1);
    repeat (3 * 2500) @(negedge clk);
    check(txe, "transmit FIFO drained");
    check(per_b == 500 && per_l == 25000, $sformatf("bit period %0d, frame %0d (x10 ns)", per_b, per_l));
    // the samples come back in order with their channel flags
    found_l = 0; found_r = 0; n = 0;
    while (rxr) begin
      pop(l, v);
      n++;
      if (l && v == 24'hABCDEF && found_l == 0) found_l = 1;
      else if (l && v == 24'h778800 && found_l == 1) found_l = 2;
      if (!l && v == 24'h123456 && found_r == 0) found_r = 1;
      else if (!l && v == 24'h001122 && found_r == 1) found_r = 2;
    end
    check(found_l == 2, $sformatf("left samples back (%0d)", found_l));
    check(found_r == 2, $sformatf("right samples back (%0d)", found_r));
    check(n >= 4 && n <= 8, $sformatf("%0d received words", n));
    // serial order: MSB first after the delay bit
    put(1, 24'hC3A501, 1);
    repeat (2 * 2500) @(negedge clk);
    check(ser_seen, "serial word C3A501 seen on sdout, MSB first");
    while (!rxf) @(negedge clk);
    check(rxf && rxr, "receive FIFO full after 15 half frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
