// dcp3_top: the transceiver's FPGA peripherals behind the CPU's I/O port
// bus, with the ADC and DAC data paths.
// How: one 80 MHz clock runs everything; every block that the document
// places at a lower rate uses clock enables or valid strobes instead.
//   Receive:  ADC -> mixer (DDS local oscillator) -> two CIC decimators
//             (I, Q) -> noise blanker -> programmable FIR -> AGC -> 15-entry
//             receive sample FIFO read by the CPU.
//   Transmit: CPU samples -> compressor -> 15-entry transmit FIFO -> two
//             CIC interpolators -> mixer -> DAC.
//   Modem:    CPU X/Y writes -> CORDIC (vector or rotate mode, with BFO
//             phase or FM phase integration) -> output FIFO read as X/Y;
//             the magnitude feeds the null detector, the top 8 bits of the
//             phase feed the phase correlator and the timing recovery.
//   OFDM:     rectangular-to-polar converter for FFT results and
//             polar-to-rectangular converter for IFFT inputs; the FFT core
//             and its buffers are outside this design, so the converters'
//             inputs and outputs are top-level ports (fft_*, ifft_*).
//   Also:     I2S audio port, CRC unit, BCH codec, convolutional encoder, flash SPI port, the
//             low-speed DAC SPI port and the UART.
// Interface: io_addr/io_wr/io_wdata write a port; io_rd marks a read of
// io_addr (used only for read side effects: FIFO pops and clearing the
// sticky overflow flags), io_rdata shows the addressed status port
// combinationally. adc/adc_or come from the ADC, dac goes to the DAC.
// Port map (hex), following the document's register figures:
//   08 SPI transmit / received data, 0A SS off, 0B SS on, 68 LS DAC
//   20 UART data (read: {FE, byte}, pops), 21 baud divisor - 1 (read:
//      TXE TXR RXF RXR)
//   10 encoder data (read: binary ch. 0), 11 output magnitude (read:
//      binary ch. 1), 12/13 read Gray ch. 0/1, 14-17 encoder configuration
//   30/31 I2S right channel LSB/MSW, 32/33 left LSB/MSW (the MSW write
//      sends; read 30/31: received LSB/MSW, reading 31 pops; read 33:
//      TXE TXR 0 Left RXF RXR)
//   50 BCH data (read: parity word), 51 BCH configuration {length - 1
//      [15:13], G7..G1 [9:3]} (read: syndrome), 52 BCH width - 1 [3:0],
//      53 BCH ACC [15]
//   38 CRC byte (read CRC32L), 39 CRC word (read CRC32H), 3A read CRC16,
//      3B initialize CRC
//   40/41 modem X/Y input (read X/Y output; reading Y pops the FIFO),
//      42 modem configuration (read RSSI), 43 read modem FIFO status E,F,
//      44 phase correlator, 45 null detector, 46 BFO, 47 control INI RST XMT
//   58/59 centre frequency LSW/MSW (MSW write updates; read 58: sticky
//      overflow flags, cleared by the read), 5A CIC gain, 5B CIC ratio,
//      5C noise blanker limit, 5D FIR decimation, 5E FIR instruction load
//      (9 bits), 5F FIR select (bit 0: RST, hold the loader reset)
//   63 AGC configuration, 64 hang configuration, 65 AGC gain limit,
//   66 compressor gain table load
// This design's own choices (the document does not give them):
//   5A = {exponent[15:12], fraction[10:0]}; 5B = {transmit multiplier
//   [15:12], ratio[9:0]}; 44 = {CP length - 1 [13:8], log2 FFT size [3:0]};
//   45 = {SOF delay [15:10], H [9], symbol length [8:0]}; 42 = {TRE [8],
//   FM delay - 1 [7:4], SSB [1], FM [0]}; 64 = {time [15:8], threshold
//   [7:0]}; transmit samples are written to 6A (I) and 6B (Q, pushes the
//   pair) and receive samples are read from 60 (I) and 61 (Q, pops), with
//   the FIFO counts at 62 = {tx count [12:8], rx count [4:0]}, because the
//   resampler that normally carries them is not part of this design.
// Overflow flags (58): bit 0 ADC, 1 mixer, 2 DAC, 3 FIR, 4 AGC.
// Board status (59, this design's own port): bit 0 a sample was blanked,
// 1 FIR busy, 2 AGC hanging, 3 CRC busy, 4 flash SPI busy, 5 LS DAC busy,
// 6 DCD, 7 SOF seen, 8 phase-correlator sync seen, 9/10 receive FIFO
// empty/full, 11/12 transmit FIFO empty/full, 13 CORDIC busy, 14 BCH busy; bits 0, 7
// and 8 are sticky and cleared by reading 59. Further own read ports:
// 44 phase-correlator average, 45 maximum RSSI, 5A DDS phase (top 16
// bits), 65 AGC gain, 66 compressor table index of the last pair, and
// the modem FIFO count in bits 12:8 of 43.
// Timing: port writes take effect at the next clock; a CORDIC operation
// takes 18 clocks, so the CPU must not write Y again within 18 clocks.
module dcp3_top #(
  parameter int CIC_RATIO_W = 10,
  parameter int FIR_AW      = 9,
  parameter int NULL_AW     = 9
) (
  input  logic        clk,
  input  logic        rst,
  // CPU I/O port bus
  input  logic [7:0]  io_addr,
  input  logic        io_wr,
  input  logic [15:0] io_wdata,
  input  logic        io_rd,
  output logic [15:0] io_rdata,
  // converters
  input  logic [11:0] adc,
  input  logic        adc_or,
  output logic [13:0] dac,
  // serial flash
  output logic        flash_sck,
  output logic        flash_mosi,
  input  logic        flash_miso,
  output logic        flash_ss_n,
  // low-speed DAC
  output logic        lsdac_sck,
  output logic        lsdac_mosi,
  output logic        lsdac_cs_n,
  // RS-485 serial port
  output logic        uart_txd,
  input  logic        uart_rxd,
  // audio codec (I2S)
  output logic        i2s_bclk,          // codec bit clock (1.6 MHz)
  output logic        i2s_lrclk,         // codec channel select, 0 = left
  output logic        i2s_sdout,         // data to the codec
  input  logic        i2s_sdin,          // data from the codec
  // FFT side of the OFDM frequency buffer (the FFT core is external)
  input  logic        fft_out_valid,     // FFT result bin
  input  logic [15:0] fft_out_x,         // FFT bin, real part
  input  logic [15:0] fft_out_y,         // FFT bin, imaginary part
  output logic        fft_polar_valid,   // same bin in polar form, 6 clocks later
  output logic [4:0]  fft_polar_phs,     // bin phase, 11.25 degrees per step
  output logic [6:0]  fft_polar_mag,     // bin magnitude, 1.5 dB steps
  input  logic        ifft_polar_valid,  // subcarrier to transmit
  input  logic [3:0]  ifft_polar_phs,    // subcarrier phase, 22.5 degrees per step
  input  logic [3:0]  ifft_polar_mag,    // subcarrier level code
  output logic        ifft_in_valid,     // same subcarrier as an IFFT input
  output logic [13:0] ifft_in_x,         // IFFT input, real part
  output logic [13:0] ifft_in_y          // IFFT input, imaginary part
);
  function automatic logic w(input logic [7:0] a, input logic [7:0] io_a, input logic wr_s);
    return wr_s && (io_a == a);
  endfunction

  // ---------------- configuration registers ----------------
  logic [15:0] freq_lsw;
  logic [31:0] freq;
  logic [10:0] cic_frac;
  logic [3:0]  cic_exp, cic_mult;
  logic [CIC_RATIO_W-1:0] cic_ratio;
  logic [7:0]  nb_limit;
  logic [5:0]  fir_dec;
  logic        fir_ld_rst;
  logic [3:0]  agc_att, agc_rel;
  logic [7:0]  agc_set, hang_thr, hang_time, gain_lim;
  logic        tre, ssb, fm;
  logic [3:0]  fm_delay;
  logic [5:0]  cp_len_m1, sof_delay;
  logic [3:0]  fft_log2;
  logic        nd_h;
  logic [8:0]  sym_len;
  logic [15:0] bfo_freq;
  logic        xmt;
  logic [15:0] mx, txi_hold;
  logic [4:0]  ovf_flags;

  always_ff @(posedge clk) begin
    if (rst) begin
      freq_lsw <= '0; freq <= '0;
      cic_frac <= 11'd1024; cic_exp <= '0; cic_mult <= 4'd1; cic_ratio <= CIC_RATIO_W'(40);
      nb_limit <= 8'hFF; fir_dec <= 6'd1; fir_ld_rst <= 1'b0;
      agc_att <= 4'd8; agc_rel <= 4'd12; agc_set <= 8'd64; hang_thr <= 8'hFF; hang_time <= '0;
      gain_lim <= 8'hFF;
      tre <= 1'b0; ssb <= 1'b0; fm <= 1'b0; fm_delay <= '0;
      cp_len_m1 <= 6'd15; fft_log2 <= 4'd6; sof_delay <= 6'd4; nd_h <= 1'b0; sym_len <= 9'd80;
      bfo_freq <= '0; xmt <= 1'b0; mx <= '0; txi_hold <= '0;
    end else if (io_wr) begin
      case (io_addr)
        8'h58: freq_lsw <= io_wdata;
        8'h59: freq <= {io_wdata, freq_lsw};
        8'h5A: begin cic_exp <= io_wdata[15:12]; cic_frac <= io_wdata[10:0]; end
        8'h5B: begin cic_mult <= io_wdata[15:12]; cic_ratio <= io_wdata[CIC_RATIO_W-1:0]; end
        8'h5C: nb_limit <= io_wdata[7:0];
        8'h5D: fir_dec <= io_wdata[5:0];
        8'h5F: fir_ld_rst <= io_wdata[0];
        8'h63: begin agc_att <= io_wdata[15:12]; agc_rel <= io_wdata[11:8]; agc_set <= io_wdata[7:0]; end
        8'h64: begin hang_time <= io_wdata[15:8]; hang_thr <= io_wdata[7:0]; end
        8'h65: gain_lim <= io_wdata[7:0];
        8'h6A: txi_hold <= io_wdata;
        8'h40: mx <= io_wdata;
        8'h42: begin tre <= io_wdata[8]; fm_delay <= io_wdata[7:4]; ssb <= io_wdata[1]; fm <= io_wdata[0]; end
        8'h44: begin cp_len_m1 <= io_wdata[13:8]; fft_log2 <= io_wdata[3:0]; end
        8'h45: begin sof_delay <= io_wdata[15:10]; nd_h <= io_wdata[9]; sym_len <= io_wdata[8:0]; end
        8'h46: bfo_freq <= io_wdata;
        8'h47: xmt <= io_wdata[0];
        default: ;
      endcase
    end
  end

  // ---------------- tuner: DDS, mixer, CIC ----------------
  logic signed [17:0] lo_cos, lo_sin, rx_i, rx_q, cic_ri, cic_rq, tx_ci, tx_cq;
  logic [31:0] lo_phase;
  logic adc_ovf, mix_ovf, dac_ovf;
  logic cic_v, cic_vq, tdi_req, tdi_req_q;
  logic signed [17:0] tdi_i, tdi_q;

  dcp_dds u_dds (.clk, .rst, .ce(1'b1), .freq, .cos_o(lo_cos), .sin_o(lo_sin), .phase(lo_phase));

  dcp_mixer u_mixer (.clk, .rst, .ce(1'b1), .adc(signed'(adc)), .adc_or, .cos_i(lo_cos), .sin_i(lo_sin),
    .rx_i, .rx_q, .tx_i(tx_ci), .tx_q(tx_cq), .dac, .adc_ovf, .mix_ovf, .dac_ovf);

  dcp_cic #(.RATIO_W(CIC_RATIO_W)) u_cic_i (.clk, .rst, .ce(1'b1), .xmt, .ratio(cic_ratio),
    .gain_frac(cic_frac), .tx_mult(cic_mult), .gain_exp(cic_exp), .rdi(rx_i), .rdo(cic_ri),
    .rdo_valid(cic_v), .tdi(tdi_i), .tdi_req, .tdo(tx_ci));
  dcp_cic #(.RATIO_W(CIC_RATIO_W)) u_cic_q (.clk, .rst, .ce(1'b1), .xmt, .ratio(cic_ratio),
    .gain_frac(cic_frac), .tx_mult(cic_mult), .gain_exp(cic_exp), .rdi(rx_q), .rdo(cic_rq),
    .rdo_valid(cic_vq), .tdi(tdi_q), .tdi_req(tdi_req_q), .tdo(tx_cq));

  // ---------------- receive: noise blanker, FIR, AGC ----------------
  logic signed [17:0] nb_i, nb_q, fir_i, fir_q;
  logic nb_blanked, nb_v, fir_v, fir_ovf, fir_busy;
  logic signed [15:0] agc_i, agc_q;
  logic agc_v, agc_hang, agc_ovf;
  logic [15:0] agc_gain;

  dcp_noise_blanker u_nb (.clk, .rst, .in_valid(cic_v && cic_vq && !xmt), .in_i(cic_ri), .in_q(cic_rq),
    .limit(nb_limit), .out_i(nb_i), .out_q(nb_q), .blanked(nb_blanked));

  // the blanker output register changes on the clock after in_valid
  always_ff @(posedge clk) nb_v <= rst ? 1'b0 : (cic_v && cic_vq && !xmt);

  dcp_tuner_fir #(.AW(FIR_AW)) u_fir (.clk, .rst, .in_valid(nb_v), .in_i(nb_i), .in_q(nb_q),
    .dec(fir_dec), .dec_wr(w(8'h5D, io_addr, io_wr)), .ld_rst(fir_ld_rst),
    .ld_we(w(8'h5E, io_addr, io_wr)), .ld_data(io_wdata[8:0]),
    .out_valid(fir_v), .out_i(fir_i), .out_q(fir_q), .ovf(fir_ovf), .busy(fir_busy));

  dcp_agc u_agc (.clk, .rst, .in_valid(fir_v), .in_i(20'(fir_i)), .in_q(20'(fir_q)),
    .attack(agc_att), .release_g(agc_rel), .setpoint(agc_set), .hang_thresh(hang_thr),
    .hang_time, .gain_limit(gain_lim), .out_valid(agc_v), .out_i(agc_i), .out_q(agc_q),
    .gain(agc_gain), .hanging(agc_hang), .ovf(agc_ovf));

  logic [31:0] rxf_data;
  logic [4:0]  rxf_count, txf_count;
  logic        rxf_empty, rxf_full, txf_empty, txf_full;
  dcp_fifo #(.W(32)) u_rx_fifo (.clk, .rst, .wr(agc_v), .wdata({agc_i, agc_q}),
    .rd(io_rd && io_addr == 8'h61), .rdata(rxf_data), .count(rxf_count), .empty(rxf_empty),
    .full(rxf_full));

  // ---------------- transmit: compressor and sample FIFO ----------------
  logic signed [15:0] cmp_i, cmp_q;
  logic cmp_v;
  logic [5:0] cmp_idx;
  logic [31:0] txf_data;
  dcp_compressor u_cmp (.clk, .rst, .tbl_we(w(8'h66, io_addr, io_wr)), .tbl_data(io_wdata[7:0]),
    .in_valid(w(8'h6B, io_addr, io_wr)), .in_i(signed'(txi_hold)), .in_q(signed'(io_wdata)),
    .out_valid(cmp_v), .out_i(cmp_i), .out_q(cmp_q), .index(cmp_idx));
  dcp_fifo #(.W(32)) u_tx_fifo (.clk, .rst, .wr(cmp_v), .wdata({cmp_i, cmp_q}),
    .rd(tdi_req && tdi_req_q && xmt), .rdata(txf_data), .count(txf_count), .empty(txf_empty), .full(txf_full));
  // samples are scaled by 4 into the 18-bit CIC input; an empty FIFO sends 0
  assign tdi_i = txf_empty ? '0 : {txf_data[31:16], 2'b00};
  assign tdi_q = txf_empty ? '0 : {txf_data[15:0], 2'b00};


  // ---------------- modem ----------------
  logic        cd_start, cd_mode, cd_busy, cd_done;
  logic signed [15:0] cd_x, cd_y, cd_z, cx, cy, cz;
  logic [15:0] bfo_ph, fm_acc;
  logic [15:0] ph_hist [16];
  logic [31:0] mf_data;
  logic [4:0]  mf_count;
  logic        mf_empty, mf_full, mf_wr, mf_flush;
  logic [31:0] mf_wdata;
  logic [17:0] rssi, max_rssi;
  logic        dcd, sof, sync, tr_ov;
  logic [11:0] pc_avg;
  logic [7:0]  tr_data, tr_early, tr_late;
  logic [15:0] fm_diff;

  assign cd_start = w(8'h41, io_addr, io_wr);
  // receive: vector mode (magnitude/phase) unless SSB; transmit: rotate mode
  assign cd_mode = ssb || xmt;
  assign cd_x = signed'(mx);
  assign cd_y = (xmt && !ssb) ? 16'sd0 : signed'(io_wdata);
  assign cd_z = ssb ? signed'(bfo_ph) : (xmt ? (fm ? signed'(fm_acc + io_wdata) : signed'(io_wdata)) : 16'sd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      bfo_ph <= '0; fm_acc <= '0;
      for (int k = 0; k < 16; k++) ph_hist[k] <= '0;
    end else begin
      if (cd_start) begin
        bfo_ph <= bfo_ph + bfo_freq;
        if (xmt && fm && !ssb) fm_acc <= fm_acc + io_wdata;
      end
      if (cd_done && !cd_mode) begin
        ph_hist[0] <= cz;
        for (int k = 1; k < 16; k++) ph_hist[k] <= ph_hist[k-1];
      end
    end
  end

  dcp_cordic u_cordic (.clk, .rst, .start(cd_start), .mode(cd_mode), .x_in(cd_x), .y_in(cd_y),
    .z_in(cd_z), .x_out(cx), .y_out(cy), .z_out(cz), .busy(cd_busy), .done(cd_done));

  // FM receive: phase difference over fm_delay + 1 samples
  assign fm_diff = cz - ph_hist[fm_delay];

  dcp_null_detector #(.AW(NULL_AW)) u_null (.clk, .rst, .valid(cd_done && !cd_mode), .mag(cx),
    .sym_len(sym_len[NULL_AW-1:0]), .h(nd_h), .delay(sof_delay),
    .ini(io_wr && io_addr == 8'h47 && io_wdata[2]), .rssi, .max_rssi, .dcd, .sof);

  dcp_phase_correlator u_pc (.clk, .rst, .valid(cd_done && !cd_mode), .phase(cz[15:8]),
    .fft_len(10'(1 << fft_log2)), .cp_len_m1, .delay(sof_delay), .avg(pc_avg), .sync);

  dcp_timing_recovery u_tr (.clk, .rst, .iv(cd_done && !cd_mode && tre), .final_s(1'b1),
    .din(cz[15:8]), .data(tr_data), .err_early(tr_early), .err_late(tr_late), .ov(tr_ov));

  always_comb begin
    mf_wr = 1'b0;
    mf_wdata = {cx, cy};
    if (tre) begin
      mf_wr = tr_ov;
      mf_wdata = {8'h00, tr_data, tr_early, tr_late};
    end else if (cd_done) begin
      mf_wr = 1'b1;
      if (cd_mode) mf_wdata = {cx, cy};
      else mf_wdata = {cx, fm ? fm_diff : cz};
    end
  end
  assign mf_flush = rst || (io_wr && io_addr == 8'h47 && io_wdata[1]);

  dcp_fifo #(.W(32)) u_modem_fifo (.clk, .rst(mf_flush), .wr(mf_wr), .wdata(mf_wdata),
    .rd(io_rd && io_addr == 8'h41), .rdata(mf_data), .count(mf_count), .empty(mf_empty),
    .full(mf_full));

  // ---------------- CRC, encoder, SPI ----------------
  logic [31:0] crc32;
  logic [15:0] crc16, enc_b0, enc_b1, enc_g0, enc_g1;
  logic        crc_busy, spi_busy, lsdac_busy;
  logic [7:0]  spi_rx;

  dcp_crc u_crc (.clk, .rst, .init(w(8'h3B, io_addr, io_wr)), .byte_we(w(8'h38, io_addr, io_wr)),
    .word_we(w(8'h39, io_addr, io_wr)), .data(io_wdata), .crc32, .crc16, .busy(crc_busy));

  dcp_conv_encoder u_enc (.clk, .rst,
    .cfg_we({w(8'h17, io_addr, io_wr), w(8'h16, io_addr, io_wr), w(8'h15, io_addr, io_wr), w(8'h14, io_addr, io_wr)}),
    .cfg_data(io_wdata[7:0]), .mag_we(w(8'h11, io_addr, io_wr)), .mag_data(io_wdata[7:0]),
    .din_we(w(8'h10, io_addr, io_wr)), .din(io_wdata[1:0]),
    .bin0(enc_b0), .bin1(enc_b1), .gray0(enc_g0), .gray1(enc_g1));

  dcp_spi #(.NBITS(8)) u_flash_spi (.clk, .rst, .start(w(8'h08, io_addr, io_wr)), .tx(io_wdata[7:0]),
    .ss_on(w(8'h0B, io_addr, io_wr)), .ss_off(w(8'h0A, io_addr, io_wr)), .rx(spi_rx), .busy(spi_busy),
    .sck(flash_sck), .mosi(flash_mosi), .miso(flash_miso), .ss_n(flash_ss_n));

  dcp_spi #(.NBITS(16), .AUTO_SS(1'b1)) u_lsdac_spi (.clk, .rst, .start(w(8'h68, io_addr, io_wr)),
    .tx({4'h0, io_wdata[11:0]}), .ss_on(1'b0), .ss_off(1'b0), .rx(), .busy(lsdac_busy),
    .sck(lsdac_sck), .mosi(lsdac_mosi), .miso(1'b0), .ss_n(lsdac_cs_n));

  // ---------------- sticky flags ----------------
  logic sof_seen, sync_seen, blank_seen;
  always_ff @(posedge clk) begin
    if (rst) begin
      ovf_flags <= '0; sof_seen <= 1'b0; sync_seen <= 1'b0; blank_seen <= 1'b0;
    end else begin
      ovf_flags <= ((io_rd && io_addr == 8'h58) ? 5'd0 : ovf_flags)
                   | {agc_ovf, fir_ovf, dac_ovf, mix_ovf, adc_ovf};
      if (io_rd && io_addr == 8'h59) begin
        sof_seen <= sof; sync_seen <= sync; blank_seen <= nb_blanked && nb_v;
      end else begin
        sof_seen <= sof_seen | sof; sync_seen <= sync_seen | sync;
        blank_seen <= blank_seen | (nb_blanked && nb_v);
      end
    end
  end

  // ---------------- UART ----------------
  logic [8:0] uart_rx;
  logic       u_txe, u_txr, u_rxf, u_rxr;
  dcp_uart u_uart (.clk, .rst, .div_we(w(8'h21, io_addr, io_wr)), .div_data(io_wdata),
    .tx_we(w(8'h20, io_addr, io_wr)), .tx_data(io_wdata[7:0]), .rx_re(io_rd && io_addr == 8'h20),
    .rx_data(uart_rx), .txe(u_txe), .txr(u_txr), .rxf(u_rxf), .rxr(u_rxr), .txd(uart_txd), .rxd(uart_rxd));

  // ---------------- BCH codec ----------------
  logic [15:0] bch_par;
  logic [7:0]  bch_syn;
  logic        bch_busy;
  dcp_bch u_bch (.clk, .rst, .xmt, .data_we(w(8'h50, io_addr, io_wr)), .data(io_wdata),
    .cfg_we(w(8'h51, io_addr, io_wr)), .cfg_len_m1(io_wdata[15:13]), .cfg_g(io_wdata[9:3]),
    .width_we(w(8'h52, io_addr, io_wr)), .width_m1(io_wdata[3:0]),
    .acc_we(w(8'h53, io_addr, io_wr)), .acc_in(io_wdata[15]),
    .parity(bch_par), .syndrome(bch_syn), .busy(bch_busy));

  // ---------------- I2S audio port ----------------
  logic [15:0] i2s_msw;
  logic [7:0]  i2s_lsb;
  logic        i2s_left, i2s_txe, i2s_txr, i2s_rxf, i2s_rxr;
  dcp_i2s u_i2s (.clk, .rst,
    .lsb_we(io_wr && (io_addr == 8'h30 || io_addr == 8'h32)),
    .msw_we(io_wr && (io_addr == 8'h31 || io_addr == 8'h33)), .left_sel(io_addr[1]),
    .wdata(io_wdata), .rx_re(io_rd && io_addr == 8'h31), .rx_msw(i2s_msw), .rx_lsb(i2s_lsb),
    .rx_left(i2s_left), .txe(i2s_txe), .txr(i2s_txr), .rxf(i2s_rxf), .rxr(i2s_rxr),
    .bclk(i2s_bclk), .lrclk(i2s_lrclk), .sdout(i2s_sdout), .sdin(i2s_sdin));

  // ---------------- OFDM coordinate converters ----------------
  // They sit between the FFT core and the frequency-ordered buffer; neither
  // is part of this design, so both sides are ports.
  dcp_rect_to_polar u_r2p (.clk, .rst, .in_valid(fft_out_valid), .x(signed'(fft_out_x)),
    .y(signed'(fft_out_y)), .out_valid(fft_polar_valid), .phs(fft_polar_phs), .mag(fft_polar_mag));
  dcp_polar_to_rect u_p2r (.clk, .rst, .in_valid(ifft_polar_valid), .phs(ifft_polar_phs),
    .mag(ifft_polar_mag), .out_valid(ifft_in_valid), .x(ifft_in_x), .y(ifft_in_y));

  // ---------------- status read multiplexer ----------------
  always_comb begin
    case (io_addr)
      8'h08: io_rdata = {8'h00, spi_rx};
      8'h10: io_rdata = enc_b0;
      8'h11: io_rdata = enc_b1;
      8'h12: io_rdata = enc_g0;
      8'h13: io_rdata = enc_g1;
      8'h20: io_rdata = {7'd0, uart_rx};
      8'h21: io_rdata = {12'd0, u_txe, u_txr, u_rxf, u_rxr};
      8'h38: io_rdata = crc32[15:0];
      8'h39: io_rdata = crc32[31:16];
      8'h3A: io_rdata = crc16;
      8'h40: io_rdata = mf_data[31:16];
      8'h41: io_rdata = mf_data[15:0];
      8'h42: io_rdata = rssi[17:2];
      8'h43: io_rdata = {3'd0, mf_count, 6'd0, mf_empty, mf_full};
      8'h44: io_rdata = {4'd0, pc_avg};
      8'h45: io_rdata = max_rssi[17:2];
      8'h58: io_rdata = {11'd0, ovf_flags};
      8'h30: io_rdata = {8'd0, i2s_lsb};
      8'h31: io_rdata = i2s_msw;
      8'h33: io_rdata = {10'd0, i2s_txe, i2s_txr, 1'b0, i2s_left, i2s_rxf, i2s_rxr};
      8'h50: io_rdata = bch_par;
      8'h51: io_rdata = {8'd0, bch_syn};
      8'h59: io_rdata = {1'b0, bch_busy, cd_busy, txf_full, txf_empty, rxf_full, rxf_empty, sync_seen,
                         sof_seen, dcd, lsdac_busy, spi_busy, crc_busy, agc_hang, fir_busy, blank_seen};
      8'h5A: io_rdata = lo_phase[31:16];
      8'h65: io_rdata = agc_gain;
      8'h66: io_rdata = {10'd0, cmp_idx};
      8'h60: io_rdata = rxf_data[31:16];
      8'h61: io_rdata = rxf_data[15:0];
      8'h62: io_rdata = {3'd0, txf_count, 3'd0, rxf_count};
      default: io_rdata = 16'h0000;
    endcase
  end
endmodule
