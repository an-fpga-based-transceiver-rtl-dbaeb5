// tb_dcp3_top_full: the top at its default (document-size) parameters,
// driven at the limits the document names: the CIC at its minimum (10) and
// maximum (640) decimation factors, and a 256-instruction FIR program (a
// 256-tap moving average reaching 255 samples back) at ratio 640. Checks:
// the receive FIFO delivers ADC rate / ratio samples, the long program
// finishes between samples (FIR never busy when a new sample arrives), and
// the filtered level of a tone at the DDS frequency is non-zero.
// The CORDIC busy time (18 clocks) and the CRC byte time (4 clocks) are
// also measured through the status port.
module tb_dcp3_top_full;
  logic clk = 0, rst = 1;
  logic [7:0] io_addr = 0;
  logic io_wr = 0, io_rd = 0;
  logic [15:0] io_wdata = 0, io_rdata;
  logic [11:0] adc = 0;
  logic adc_or = 0;
  logic [13:0] dac;
  logic flash_sck, flash_mosi, flash_miso, flash_ss_n;
  logic lsdac_sck, lsdac_mosi, lsdac_cs_n;
  logic uart_txd, uart_rxd;
  logic fft_out_valid = 0, ifft_polar_valid = 0;
  logic [15:0] fft_out_x = 0, fft_out_y = 0;
  logic fft_polar_valid, ifft_in_valid;
  logic [4:0] fft_polar_phs;
  logic [6:0] fft_polar_mag;
  logic [3:0] ifft_polar_phs = 0, ifft_polar_mag = 0;
  logic [13:0] ifft_in_x, ifft_in_y;
  assign uart_rxd = uart_txd;          // loop-back
  logic i2s_bclk, i2s_lrclk, i2s_sdout, i2s_sdin;
  assign i2s_sdin = i2s_sdout;         // loop-back
  int checks = 0, failures = 0;
  assign flash_miso = 1'b0;
  dcp3_top dut (.*);
  always #5 clk = ~clk;
  initial begin
    #50000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic iow(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk); io_addr = a; io_wdata = d; io_wr = 1;
    @(negedge clk); io_wr = 0;
  endtask
  task automatic ior(input logic [7:0] a, output logic [15:0] d);
    @(negedge clk); io_addr = a; io_rd = 1; #1 d = io_rdata;
    @(negedge clk); io_rd = 0;
  endtask
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  longint adc_n = 0;
  always @(posedge clk) begin
    adc <= 12'(int'(1800.0 * $cos(2.0 * 3.14159265358979 * adc_n / 80.0)));
    adc_n <= adc_n + 1;
  end

  // FIR busy must never be high when the blanker hands over a new sample
  int busy_hits = 0;
  always @(posedge clk) if (!rst && dut.nb_v && dut.fir_busy) busy_hits++;

  task automatic load_fir(input int ntaps, input int coef);
    iow(8'h5F, 1);
    for (int k = 0; k < ntaps; k++) begin
      logic [35:0] ins;
      ins = {k == ntaps - 2, 1'b0, k == ntaps - 1, 9'(k), 24'(coef)};
      for (int s = 0; s < 4; s++) iow(8'h5E, {7'd0, ins[9*s +: 9]});
    end
    iow(8'h5F, 0);
    iow(8'h5D, 1);
  endtask

  task automatic measure(input int ratio, input int clocks, input string name);
    logic [15:0] v, vi, vq;
    int got = 0, t = 0, ns;
    real m, mlast;
    ior(8'h62, v);
    while (v[4:0] != 0) begin ior(8'h61, v); ior(8'h62, v); end
    while (t < clocks) begin
      ior(8'h62, v); t += 2;
      if (v[4:0] != 0) begin
        ior(8'h60, vi); ior(8'h61, vq); t += 4;
        got++;
        m = $sqrt(real'(signed'(vi)) ** 2 + real'(signed'(vq)) ** 2);
        mlast = m;
      end
    end
    ns = clocks / ratio;
    check(got >= ns - 2 && got <= ns + 2, $sformatf("%s: %0d samples, expected %0d", name, got, ns));
    check(mlast > 50.0, $sformatf("%s: level %0f", name, mlast));
  endtask

  initial begin
    logic [15:0] v;
    int n;
    repeat (2) @(posedge clk); #1 rst = 0;
    iow(8'h58, 16'h3333); iow(8'h59, 16'h0333);   // DDS at 1/80 of the clock
    iow(8'h63, 16'h4440);                          // AGC: fast loop
    // minimum decimation, short program
    load_fir(2, 24'h400000);
    iow(8'h5A, 16'hF400);
    iow(8'h5B, 16'h100A);                          // ratio 10
    repeat (2000) @(negedge clk);
    measure(10, 4000, "ratio 10");
    // maximum decimation, 256-tap moving average
    load_fir(256, 24'h008000);                     // 1/256
    iow(8'h5A, 16'h5400);                          // gain 2^5 for R = 640
    iow(8'h5B, 16'h1280);                          // ratio 640
    repeat (80000) @(negedge clk);
    busy_hits = 0;                                 // count from here on
    measure(640, 64000, "ratio 640");
    check(busy_hits == 0, $sformatf("FIR busy at %0d sample arrivals", busy_hits));
    // CORDIC busy time
    iow(8'h40, 16'd1000);
    @(negedge clk); io_addr = 8'h41; io_wdata = 16'd1000; io_wr = 1;
    @(negedge clk); io_wr = 0; io_addr = 8'h59; #1;
    n = 1;
    while (io_rdata[13]) begin n++; @(negedge clk); #1; end
    check(n == 18, $sformatf("cordic busy %0d clocks", n));
    // CRC byte time
    iow(8'h38, 16'h0055);
    @(negedge clk); io_addr = 8'h59; #1;
    n = 1;
    while (io_rdata[3]) begin n++; @(negedge clk); #1; end
    check(n == 4, $sformatf("crc byte %0d clocks", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
