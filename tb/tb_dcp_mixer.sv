// tb_dcp_mixer: random ADC, sine and baseband values; checks the receive
// products, the transmit sum in offset binary, saturation and the flags.
module tb_dcp_mixer;
  logic clk = 0, rst = 1, ce = 1;
  logic signed [11:0] adc;
  logic adc_or = 0;
  logic signed [17:0] cos_i, sin_i, rx_i, rx_q, tx_i, tx_q;
  logic [13:0] dac;
  logic adc_ovf, mix_ovf, dac_ovf;
  int checks = 0, failures = 0, sat_seen = 0;

  dcp_mixer dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ei, eq, s, d;
    logic [13:0] edac;
    logic eovf;
    adc = 0; cos_i = 0; sin_i = 0; tx_i = 0; tx_q = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      adc = 12'($urandom); cos_i = 18'($urandom); sin_i = 18'($urandom);
      if (cos_i == -18'sd131072) cos_i = -18'sd131071;
      if (sin_i == -18'sd131072) sin_i = -18'sd131071;
      tx_i = 18'($urandom); tx_q = 18'($urandom);
      if (n % 3 == 0) begin tx_i = tx_i >>> 2; tx_q = tx_q >>> 2; end
      ei = (longint'(adc) * longint'(cos_i)) >>> 11;
      eq = (longint'(adc) * longint'(sin_i)) >>> 11;
      s = ((longint'(tx_i) * longint'(cos_i)) >>> 17) + ((longint'(tx_q) * longint'(sin_i)) >>> 17);
      d = s >>> 4;
      eovf = 1'b0;
      if (d > 8191) begin d = 8191; eovf = 1'b1; end
      if (d < -8192) begin d = -8192; eovf = 1'b1; end
      edac = 14'(d + 8192);
      @(negedge clk);
      checks++;
      if (rx_i != 18'(ei) || rx_q != 18'(eq)) begin
        failures++; $display("rx mismatch %0d %0d exp %0d %0d", rx_i, rx_q, ei, eq);
      end
      @(negedge clk);
      checks++;
      if (dac != edac || dac_ovf != eovf) begin
        failures++; $display("dac mismatch %h exp %h ovf %b", dac, edac, dac_ovf);
      end
      if (eovf) sat_seen++;
    end
    adc_or = 1;
    @(negedge clk); adc_or = 0; @(negedge clk); checks++;
    if (!adc_ovf) failures++;
    checks++;
    if (sat_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
