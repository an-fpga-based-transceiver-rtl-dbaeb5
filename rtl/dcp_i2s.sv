// dcp_i2s: I2S master port for an external 1- or 2-channel audio codec.
//
// How it works: a frame of 2 x 25 bit clocks is generated from the system
// clock (25 clocks per half bit, 2500 clocks per frame = 32 ksps at
// 80 MHz). lrclk is low for the left and high for the right channel; as
// usual for I2S, the first bit clock of each half frame is a delay slot
// and the 24 data bits follow, MSB first, changing on the falling edge of
// bclk and sampled on its rising edge.
// Transmit: the CPU writes the low byte of a sample (lsb_we) and then the
// upper 16 bits (msw_we) for either channel; the MSW write pushes the
// 24-bit sample with its channel tag into a 15-entry FIFO and zeroes the
// low byte. At the start of each half frame the head entry is popped and
// sent if it belongs to that channel; otherwise zeros are sent.
// Receive: every half frame's 24 bits are pushed, tagged with the channel,
// into a second 15-entry FIFO; rx_msw reads its upper 16 bits, rx_lsb the
// low byte, rx_left the tag, and rx_re pops it.
// Status: txe (transmit FIFO empty), txr (room in the transmit FIFO), rxf
// (receive FIFO full), rxr (receive data ready).
// From the document: 16..24-bit samples at 32 ksps, left and right write
// ports written LSB first with the LSB zeroed after the MSW write, the MSW
// write starting transmission, a common receive port with a Left flag,
// 15-entry FIFOs and the TXE TXR Left RXF RXR flags. This design's own
// choices: master mode, the 25-clock bit frame, dropping a sample whose
// channel does not match the slot's channel (zeros are sent instead, the
// entry waits), and dropping received samples when the FIFO is full.
module dcp_i2s #(
  parameter int HALF_BIT = 25,         // system clocks per half bit clock
  parameter int SLOT     = 25          // bit clocks per channel
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        lsb_we,           // write the low byte of a sample
  input  logic        msw_we,           // write the upper 16 bits, push
  input  logic        left_sel,         // channel of the write: 1 = left
  input  logic [15:0] wdata,            // byte (bits 7:0) or upper 16 bits
  input  logic        rx_re,            // pop the received sample
  output logic [15:0] rx_msw,           // received sample, bits 23:8
  output logic [7:0]  rx_lsb,           // received sample, bits 7:0
  output logic        rx_left,          // received sample is from the left channel
  output logic        txe,              // transmit FIFO empty
  output logic        txr,              // transmit FIFO has room
  output logic        rxf,              // receive FIFO full
  output logic        rxr,              // received sample ready
  output logic        bclk,             // bit clock to the codec
  output logic        lrclk,            // channel select: 0 = left
  output logic        sdout,            // data to the codec
  input  logic        sdin              // data from the codec
);
  localparam int HW = $clog2(HALF_BIT);
  localparam int SW = $clog2(SLOT);

  // ---- sample registers and FIFOs ----
  logic [7:0]  lsb_l, lsb_r;
  logic [24:0] tx_head, rx_word;
  logic        tx_empty, tx_full, rx_empty, rx_full, tx_pop, rx_push;
  logic [24:0] rx_head;

  dcp_fifo #(.W(25), .AW(4)) u_txf (.clk, .rst, .wr(msw_we && !tx_full),
    .wdata({left_sel, wdata, left_sel ? lsb_l : lsb_r}), .rd(tx_pop), .rdata(tx_head),
    .count(), .empty(tx_empty), .full(tx_full));
  dcp_fifo #(.W(25), .AW(4)) u_rxf (.clk, .rst, .wr(rx_push && !rx_full), .wdata(rx_word),
    .rd(rx_re && !rx_empty), .rdata(rx_head), .count(), .empty(rx_empty), .full(rx_full));

  assign {rx_left, rx_msw, rx_lsb} = rx_head;
  assign txe = tx_empty;
  assign txr = !tx_full;
  assign rxf = rx_full;
  assign rxr = !rx_empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      lsb_l <= '0;
      lsb_r <= '0;
    end else if (lsb_we) begin
      if (left_sel) lsb_l <= wdata[7:0]; else lsb_r <= wdata[7:0];
    end else if (msw_we) begin
      if (left_sel) lsb_l <= '0; else lsb_r <= '0;
    end
  end

  // ---- serial timing ----
  logic [HW-1:0] hctr;                 // clocks within a half bit
  logic [SW-1:0] bit_n;                // bit clock within the slot
  logic [23:0]   txsh, rxsh;
  logic          slot_start, fall, rise;

  always_comb begin
    rise = (hctr == HW'(HALF_BIT - 1)) && !bclk;
    fall = (hctr == HW'(HALF_BIT - 1)) && bclk;
    slot_start = fall && bit_n == SW'(SLOT - 1);
    tx_pop = slot_start && !tx_empty && (tx_head[24] == lrclk);   // next slot is !lrclk
  end

  always_ff @(posedge clk) begin
    rx_push <= 1'b0;
    if (rst) begin
      hctr <= '0;
      bclk <= 1'b0;
      bit_n <= SW'(SLOT - 1);
      lrclk <= 1'b1;
      sdout <= 1'b0;
      txsh <= '0;
      rxsh <= '0;
      rx_word <= '0;
    end else begin
      hctr <= (hctr == HW'(HALF_BIT - 1)) ? '0 : hctr + 1'b1;
      if (rise) begin
        bclk <= 1'b1;
        // bit 0 of the slot is the delay slot; bits 1..24 carry data
        if (bit_n != '0) rxsh <= {rxsh[22:0], sdin};
      end
      if (fall) begin
        bclk <= 1'b0;
        if (bit_n == SW'(SLOT - 1)) begin
          // new half frame: switch channel, hand over the received word
          bit_n <= '0;
          lrclk <= !lrclk;
          rx_word <= {!lrclk, rxsh};
          rx_push <= 1'b1;
          txsh <= tx_pop ? tx_head[23:0] : 24'd0;
          sdout <= 1'b0;
        end else begin
          bit_n <= bit_n + 1'b1;
          sdout <= txsh[23];
          txsh <= {txsh[22:0], 1'b0};
        end
      end
    end
  end
endmodule
