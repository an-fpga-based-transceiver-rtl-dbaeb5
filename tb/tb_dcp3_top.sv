// tb_dcp3_top: end-to-end test of the board through its CPU port bus and
// converter pins, with the default (document-size) parameters. Each
// mechanism is exercised and counted separately; the run ends with a
// per-mechanism summary line and the overall result.
//   crc     "123456789" through the byte port gives the CRC-32 and X.25 check
//           values
//   enc     the convolutional encoder status words for a known configuration
//   spi     a flash byte with MISO looped back to MOSI takes 32 clocks and
//           returns the byte; slave select follows ports A/B
//   lsdac   a DAC word is shifted out as 16 bits in 64 clocks
//   vector  CORDIC vector mode returns magnitude and phase, 18 clocks busy
//   rotate  transmit (rotate) mode turns magnitude/phase into I/Q
//   fm      FM receive returns the phase step between samples
//   null    a null symbol in the magnitude stream gives a start-of-frame
//   sync    cyclic-prefix symbols give phase-correlator sync pulses
//   rx      an ADC tone at the DDS frequency comes out of the receive FIFO
//           at ADC rate / CIC ratio with a steady, non-zero level
//   blank   a low noise-blanker limit blanks samples
//   tx      transmit samples drain from the FIFO at one per CIC ratio
//           clocks and make the DAC swing
//   ovf     ADC over-range sets the sticky flag, which a read clears
//   uart    bytes looped from TXD to RXD come back, with the status flags
//   bch     a 7-bit message encoded with the (15,7) BCH code gives the
//           parity of a polynomial division; the codeword's syndrome is 0
//   i2s     a left-channel sample written to 32/33 returns through the
//           looped codec pins with the Left flag
//   polar   FFT bins on the four axes come back as phase 0/8/16/24 and a
//           magnitude of 4*log2|v| - 12 six clocks later; an IFFT subcarrier
//           code comes out as the scaled cosine/sine pair one clock later
module tb_dcp3_top;
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
  int n_crc, n_enc, n_spi, n_lsdac, n_vec, n_rot, n_fm, n_null, n_sync, n_rx, n_blank, n_tx, n_ovf, n_uart, n_polar, n_bch, n_i2s;
  assign flash_miso = flash_mosi;      // loop-back
  dcp3_top dut (.*);
  always #5 clk = ~clk;
  initial begin
    #20000000; failures++;
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
  task automatic check(input bit ok, input string what, inout int cnt);
    checks++;
    if (ok) cnt++;
    else begin failures++; $display("FAIL %s", what); end
  endtask
  function automatic int sx(input logic [15:0] v);
    return int'(signed'(v));
  endfunction

  // ---------------- mechanisms ----------------
  task automatic t_crc();
    static string s = "123456789";
    logic [15:0] lo, hi, c16;
    iow(8'h3B, 0);
    for (int i = 0; i < 9; i++) begin iow(8'h38, {8'h00, s[i]}); repeat (4) @(negedge clk); end
    ior(8'h38, lo); ior(8'h39, hi); ior(8'h3A, c16);
    check(~{hi, lo} == 32'hCBF43926, "crc32", n_crc);
    check(~c16 == 16'h906E, "crc16", n_crc);
  endtask

  task automatic t_enc();
    logic [15:0] v;
    iow(8'h11, 16'h0080);                 // magnitude
    iow(8'h15, 16'h0010);                 // QPSK bit = current bit 0
    iow(8'h16, 16'h0008);                 // BPSK bit = previous bit 0
    iow(8'h17, 16'h0018);                 // channel 1 = current ^ previous
    iow(8'h10, 16'h0001);
    ior(8'h10, v); check(v == 16'h8040, "enc binary 1", n_enc);
    iow(8'h10, 16'h0000);
    ior(8'h10, v); check(v == 16'h8080, "enc binary 2", n_enc);
    ior(8'h12, v); check(v == 16'h80E0, "enc gray", n_enc);
    ior(8'h11, v); check(v == 16'h8080, "enc channel 1", n_enc);
  endtask

  task automatic t_spi();
    logic [15:0] v;
    int n = 0;
    iow(8'h0B, 0);
    check(flash_ss_n == 1'b0, "ss on", n_spi);
    iow(8'h08, 16'h00A5);
    // the write's second negedge is already one busy clock
    n = 1;
    forever begin
      @(negedge clk); io_addr = 8'h59; #1;
      if (!io_rdata[4]) break;
      n++;
    end
    check(n == 32, $sformatf("spi %0d clocks", n), n_spi);
    ior(8'h08, v); check(v == 16'h00A5, "spi loop-back", n_spi);
    iow(8'h0A, 0);
    check(flash_ss_n == 1'b1, "ss off", n_spi);
  endtask

  logic [15:0] lsd_sh;
  int lsd_bits;
  always @(posedge lsdac_sck) if (!lsdac_cs_n) begin lsd_sh <= {lsd_sh[14:0], lsdac_mosi}; lsd_bits++; end
  task automatic t_lsdac();
    int n = 1;
    lsd_bits = 0;
    iow(8'h68, 16'h0ABC);
    forever begin
      @(negedge clk); io_addr = 8'h59; #1;
      if (!io_rdata[5]) break;
      n++;
    end
    check(n == 64, $sformatf("ls dac %0d clocks", n), n_lsdac);
    check(lsd_bits == 16 && lsd_sh == 16'h0ABC, "ls dac word", n_lsdac);
  endtask

  // one modem sample: returns the X and Y outputs, waits while busy
  task automatic modem(input int x, input int y, output int xo, output int yo, output int busy_n);
    logic [15:0] v;
    iow(8'h40, 16'(x));
    @(negedge clk); io_addr = 8'h41; io_wdata = 16'(y); io_wr = 1;
    @(negedge clk); io_wr = 0; io_addr = 8'h59; #1;
    busy_n = 1;
    while (io_rdata[13]) begin busy_n++; @(negedge clk); #1; end
    ior(8'h40, v); xo = sx(v);
    ior(8'h41, v); yo = sx(v);
  endtask

  task automatic t_vector();
    int xo, yo, bn;
    real ph;
    iow(8'h47, 16'h0002);                 // flush the modem FIFO
    iow(8'h42, 16'h0000);
    modem(3000, 4000, xo, yo, bn);
    ph = $atan2(4000.0, 3000.0) / (2.0 * 3.14159265358979) * 65536.0;
    check(xo >= 4990 && xo <= 5010, $sformatf("magnitude %0d", xo), n_vec);
    check(yo >= int'(ph) - 8 && yo <= int'(ph) + 8, $sformatf("phase %0d exp %0f", yo, ph), n_vec);
    check(bn == 18, $sformatf("cordic busy %0d clocks", bn), n_vec);
    modem(-2000, -2000, xo, yo, bn);
    check(xo >= 2818 && xo <= 2838, $sformatf("magnitude 3rd quadrant %0d", xo), n_vec);
    check(yo >= -24584 && yo <= -24568, $sformatf("phase 3rd quadrant %0d", yo), n_vec);
  endtask

  task automatic t_rotate();
    int xo, yo, bn;
    iow(8'h47, 16'h0001);                 // transmit
    modem(10000, 16384, xo, yo, bn);      // 90 degrees
    check(xo >= -10 && xo <= 10 && yo >= 9990 && yo <= 10010, $sformatf("rotate 90: %0d %0d", xo, yo), n_rot);
    modem(10000, -8192, xo, yo, bn);      // -45 degrees
    check(xo >= 7061 && xo <= 7081 && yo >= -7081 && yo <= -7061, $sformatf("rotate -45: %0d %0d", xo, yo), n_rot);
    iow(8'h47, 16'h0002);                 // receive, flush
  endtask

  task automatic t_fm();
    int xo, yo, bn, ph;
    iow(8'h42, 16'h0001);                 // FM, delay 1
    for (int k = 0; k < 12; k++) begin
      ph = k * 1500;
      modem(int'(8000.0 * $cos(ph * 2.0 * 3.14159265358979 / 65536.0)),
            int'(8000.0 * $sin(ph * 2.0 * 3.14159265358979 / 65536.0)), xo, yo, bn);
      if (k > 0) check(yo >= 1490 && yo <= 1510, $sformatf("fm step %0d", yo), n_fm);
    end
    iow(8'h42, 16'h0000);
  endtask

  task automatic t_null_sync();
    logic [15:0] v;
    int xo, yo, bn, amp, nsync = 0, nsof = 0;
    int body [64];
    int p [$];
    real a;
    iow(8'h44, 16'h1706);                 // CP length 24, FFT 64
    iow(8'h45, 16'((4 << 10) | 88));      // SOF delay 4, -12 dB, 88 samples
    iow(8'h47, 16'h0002);
    for (int s = 0; s < 8; s++) begin
      foreach (body[k]) body[k] = $urandom_range(65535, 0);
      p.delete();
      for (int k = 0; k < 24; k++) p.push_back(body[40 + k]);
      foreach (body[k]) p.push_back(body[k]);
      amp = (s == 4) ? 60 : 8000;
      foreach (p[k]) begin
        a = p[k] * 2.0 * 3.14159265358979 / 65536.0;
        modem(int'(amp * $cos(a)), int'(amp * $sin(a)), xo, yo, bn);
        if (s == 1 && k == 10) iow(8'h47, 16'h0004);   // INI
        ior(8'h59, v);
        if (s >= 2 && v[7]) nsof++;
        if (s >= 1 && v[8]) nsync++;
      end
    end
    check(nsof == 1, $sformatf("sof count %0d", nsof), n_null);
    check(nsync >= 4, $sformatf("sync count %0d", nsync), n_sync);
  endtask

  // ADC tone at the DDS frequency (1 MHz at 80 MHz): a steady baseband level
  int adc_amp = 0;
  longint adc_n = 0;
  always @(posedge clk) begin
    adc <= 12'(int'(adc_amp * $cos(2.0 * 3.14159265358979 * adc_n / 80.0)));
    adc_n <= adc_n + 1;
  end

  task automatic t_rx();
    logic [15:0] v, vi, vq;
    int got = 0, t = 0;
    real m, mlast [$];
    // FIR: one tap of 0.5 then a write
    iow(8'h5F, 1);
    foreach (fir_prog[k]) for (int s = 0; s < 4; s++) iow(8'h5E, {7'd0, fir_prog[k][9*s +: 9]});
    iow(8'h5F, 0);
    iow(8'h5D, 1);
    iow(8'h5A, 16'hF400);                 // gain 2^15
    iow(8'h5B, 16'h1028);                 // ratio 40
    iow(8'h58, 16'h3333); iow(8'h59, 16'h0333);   // 2^32 / 80
    iow(8'h63, 16'h8840);                 // AGC
    adc_amp = 1500;
    repeat (400) @(negedge clk);
    // empty what accumulated while the chain was being set up
    ior(8'h62, v);
    while (v[4:0] != 0) begin ior(8'h61, v); ior(8'h62, v); end
    // drain the FIFO for 20000 clocks (the AGC settles in the first half)
    while (t < 20000) begin
      ior(8'h62, v); t += 2;
      if (v[4:0] != 0) begin
        ior(8'h60, vi); ior(8'h61, vq); t += 4;
        got++;
        m = $sqrt(real'(sx(vi)) ** 2 + real'(sx(vq)) ** 2);
        mlast.push_back(m);
        if (mlast.size() > 20) void'(mlast.pop_front());
      end
    end
    check(got >= 495 && got <= 505, $sformatf("rx samples %0d in 20000 clocks", got), n_rx);
    check(mlast[0] > 100.0, $sformatf("rx level %0f", mlast[0]), n_rx);
    check(mlast[19] > 0.9 * mlast[0] && mlast[19] < 1.1 * mlast[0],
          $sformatf("rx level not steady %0f %0f", mlast[0], mlast[19]), n_rx);
  endtask

  task automatic t_blank();
    logic [15:0] v;
    ior(8'h59, v);                        // clear
    ior(8'h59, v);
    check(v[0] == 1'b0, "blanked with limit 255", n_blank);
    iow(8'h5C, 16'h0001);
    repeat (400) @(negedge clk);
    ior(8'h59, v);
    check(v[0] == 1'b1, "no blanking with limit 1", n_blank);
    iow(8'h5C, 16'h00FF);
  endtask

  task automatic t_tx();
    logic [15:0] v;
    int c0, c1, dmin = 99999, dmax = -1;
    adc_amp = 0;
    iow(8'h47, 16'h0001);
    for (int k = 0; k < 15; k++) begin iow(8'h6A, 16'd8000); iow(8'h6B, 16'd0); end
    ior(8'h62, v); c0 = v[12:8];
    repeat (400) begin
      @(negedge clk);
      if (int'(dac) < dmin) dmin = int'(dac);
      if (int'(dac) > dmax) dmax = int'(dac);
    end
    ior(8'h62, v); c1 = v[12:8];
    check(c0 - c1 >= 9 && c0 - c1 <= 11, $sformatf("tx fifo drained %0d in 400 clocks", c0 - c1), n_tx);
    check(dmax - dmin > 2000, $sformatf("dac swing %0d", dmax - dmin), n_tx);
    ior(8'h66, v);
    check(v[5:0] != 0, "compressor index", n_tx);
    iow(8'h47, 16'h0000);
  endtask

  task automatic t_uart();
    logic [15:0] v;
    iow(8'h21, 16'd4);                    // bit = 80 clocks
    for (int i = 0; i < 3; i++) iow(8'h20, 16'h0041 + 16'(i));
    ior(8'h21, v); check(v[3] == 1'b0, "uart TXE while sending", n_uart);
    repeat (3 * 10 * 80 + 200) @(negedge clk);
    ior(8'h21, v); check(v[3] == 1'b1 && v[0] == 1'b1, $sformatf("uart status %h", v), n_uart);
    for (int i = 0; i < 3; i++) begin
      ior(8'h20, v); check(v == 16'h0041 + 16'(i), $sformatf("uart byte %h", v), n_uart);
    end
    ior(8'h21, v); check(v[0] == 1'b0, "uart RXR after reading", n_uart);
  endtask

  task automatic t_ovf();
    logic [15:0] v;
    ior(8'h58, v);
    @(negedge clk); adc_or = 1; @(negedge clk); adc_or = 0;
    repeat (3) @(negedge clk);
    ior(8'h58, v); check(v[0] == 1'b1, "adc overflow flag", n_ovf);
    ior(8'h58, v); check(v[0] == 1'b0, "flag cleared", n_ovf);
  endtask

  task automatic t_bch();
    logic [15:0] v;
    logic [6:0] msg;
    logic [7:0] par, want;
    logic [14:0] cw;
    msg = 7'b1011001;
    // x^8 * msg mod (x^8 + x^7 + x^6 + x^4 + 1)
    cw = {msg, 8'd0};
    for (int i = 14; i >= 8; i--) if (cw[i]) cw = cw ^ (15'h1D1 << (i - 8));
    want = cw[7:0];
    iow(8'h47, 16'h0001);                 // transmit: encode
    iow(8'h51, 16'hE340);                 // length 8, taps G7 G6 G4
    iow(8'h52, 16'h0000);                 // one stream
    iow(8'h53, 16'h8000);                 // ACC
    for (int b = 6; b >= 0; b--) begin iow(8'h50, {15'd0, msg[b]}); repeat (2) @(negedge clk); end
    iow(8'h53, 16'h0000);
    for (int b = 7; b >= 0; b--) begin
      iow(8'h50, 16'h0000); repeat (2) @(negedge clk);
      ior(8'h50, v); par[b] = v[0];
    end
    check(par == want, $sformatf("bch parity %h want %h", par, want), n_bch);
    iow(8'h47, 16'h0000);                 // receive: syndrome
    iow(8'h53, 16'h8000);
    cw = {msg, par};
    for (int b = 14; b >= 0; b--) begin iow(8'h50, {15'd0, cw[b]}); repeat (2) @(negedge clk); end
    ior(8'h51, v);
    check(v == 16'h0000, $sformatf("bch syndrome %h", v), n_bch);
  endtask

  task automatic t_i2s();
    logic [15:0] v, lo;
    int hits = 0;
    // drain start-up words
    ior(8'h33, v);
    while (v[0]) begin ior(8'h31, lo); ior(8'h33, v); end
    iow(8'h32, 16'h0042);
    iow(8'h33, 16'h5A5A);
    repeat (2 * 2500) @(negedge clk);
    ior(8'h33, v);
    check(v[5] && v[0], $sformatf("i2s status %h", v), n_i2s);
    while (v[0]) begin
      if (v[2]) begin
        ior(8'h30, lo);
        ior(8'h31, v);
        if (v == 16'h5A5A && lo == 16'h0042) hits++;
      end else ior(8'h31, v);
      ior(8'h33, v);
    end
    check(hits == 1, $sformatf("i2s sample came back %0d times", hits), n_i2s);
  endtask

  task automatic t_polar();
    logic signed [15:0] bx [4], by [4];
    int lat;
    bx = '{16'sd1000, 16'sd0, -16'sd1000, 16'sd0};
    by = '{16'sd0, 16'sd1000, 16'sd0, -16'sd1000};
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); fft_out_x = bx[k]; fft_out_y = by[k]; fft_out_valid = 1;
      @(negedge clk); fft_out_valid = 0;
      lat = 1;
      while (!fft_polar_valid && lat < 20) begin @(negedge clk); lat++; end
      // 4*log2(1000) - 12 = 27.9
      check(lat == 6 && fft_polar_phs == 5'(8 * k) && fft_polar_mag >= 7'd27 && fft_polar_mag <= 7'd29,
            $sformatf("bin %0d: phase %0d magnitude %0d after %0d clocks", k, fft_polar_phs,
                      fft_polar_mag, lat), n_polar);
    end
    // 90 degrees, top magnitude code: (0, 1.5 * 31 = 46) << 7
    @(negedge clk); ifft_polar_phs = 4'd4; ifft_polar_mag = 4'd15; ifft_polar_valid = 1;
    @(negedge clk); ifft_polar_valid = 0;
    check(ifft_in_valid && ifft_in_x == 14'd0 && ifft_in_y == 14'd5888,
          $sformatf("subcarrier %0d,%0d", signed'(ifft_in_x), signed'(ifft_in_y)), n_polar);
    // magnitude code 0 switches the subcarrier off
    @(negedge clk); ifft_polar_phs = 4'd1; ifft_polar_mag = 4'd1; ifft_polar_valid = 1;
    @(negedge clk); ifft_polar_valid = 0;
    check(ifft_in_valid && ifft_in_x == 14'd0 && ifft_in_y == 14'd0, "subcarrier off", n_polar);
  endtask

  logic [35:0] fir_prog [2];
  initial begin
    fir_prog[0] = {1'b1, 1'b0, 1'b0, 9'd0, 24'h400000};
    fir_prog[1] = {1'b0, 1'b0, 1'b1, 9'd0, 24'h000000};
    repeat (2) @(posedge clk); #1 rst = 0;
    t_crc();
    t_enc();
    t_spi();
    t_lsdac();
    t_vector();
    t_rotate();
    t_fm();
    t_null_sync();
    t_rx();
    t_blank();
    t_tx();
    t_ovf();
    t_uart();
    t_polar();
    t_bch();
    t_i2s();
    $display("mechanisms: crc=%0d enc=%0d spi=%0d lsdac=%0d vector=%0d rotate=%0d fm=%0d null=%0d sync=%0d rx=%0d blank=%0d tx=%0d ovf=%0d uart=%0d polar=%0d bch=%0d i2s=%0d",
             n_crc, n_enc, n_spi, n_lsdac, n_vec, n_rot, n_fm, n_null, n_sync, n_rx, n_blank, n_tx, n_ovf, n_uart, n_polar, n_bch, n_i2s);
    // a mechanism none of whose checks passed never happened
    if (n_crc == 0 || n_enc == 0 || n_spi == 0 || n_lsdac == 0 || n_vec == 0 || n_rot == 0 || n_fm == 0 ||
        n_null == 0 || n_sync == 0 || n_rx == 0 || n_blank == 0 || n_tx == 0 || n_ovf == 0 || n_uart == 0 || n_polar == 0 || n_bch == 0 || n_i2s == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
