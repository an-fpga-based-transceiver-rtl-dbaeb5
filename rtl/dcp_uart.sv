// dcp_uart: 8-bit, no-parity, one-stop-bit UART with 15-entry FIFOs.
// How: a divider produces a tick at 16 times the bit rate (divisor - 1 is
// written by the CPU). The transmitter takes bytes from its FIFO and sends
// start bit, 8 data bits LSB first and a stop bit, each 16 ticks long. The
// receiver waits for a falling edge, checks the start bit at its middle
// (tick 8), then samples each data bit and the stop bit in their middles;
// a low stop bit is a framing error, stored with the byte as bit 8 of the
// receive FIFO entry. The receive input goes through a two-flop
// synchroniser.
// Interface: tx_we pushes tx_data; rx_re pops the receive FIFO, whose head
// is rx_data = {FE, byte}; div_we loads the divisor. Status: txe (transmit
// FIFO empty), txr (transmit FIFO can take data), rxf (receive FIFO full),
// rxr (received data available).
// Timing: one bit lasts 16 * (divisor + 1) clocks.
// From the document: 8-bit characters without parity, 16x clock, divisor - 1
// register, 15-byte FIFOs, FE bit per entry, TXE/TXR/RXF/RXR flags. This
// design's choices: one stop bit, mid-bit sampling, a full receive FIFO
// drops new bytes.
module dcp_uart (
  input  logic        clk,
  input  logic        rst,
  input  logic        div_we,
  input  logic [15:0] div_data,
  input  logic        tx_we,
  input  logic [7:0]  tx_data,
  input  logic        rx_re,
  output logic [8:0]  rx_data,
  output logic        txe,
  output logic        txr,
  output logic        rxf,
  output logic        rxr,
  output logic        txd,
  input  logic        rxd
);
  logic [15:0] div, dcnt;
  logic        tick;

  always_ff @(posedge clk) begin
    if (rst) begin div <= 16'd42; dcnt <= '0; end   // 115200 baud at 80 MHz
    else begin
      if (div_we) div <= div_data;
      dcnt <= (tick || div_we) ? '0 : dcnt + 1'b1;
    end
  end
  assign tick = (dcnt == div);

  // ---------------- transmitter ----------------
  logic [7:0] tf_data;
  logic       tf_empty, tf_full, tx_pop;
  logic [9:0] tsh;        // {stop, data, start} being sent
  logic [3:0] tbit;       // bits left
  logic [3:0] tph;        // ticks within the bit

  dcp_fifo #(.W(8)) u_txf (.clk, .rst, .wr(tx_we), .wdata(tx_data), .rd(tx_pop), .rdata(tf_data),
    .count(), .empty(tf_empty), .full(tf_full));

  assign tx_pop = (tbit == '0) && !tf_empty;
  assign txe = tf_empty && (tbit == '0);
  assign txr = !tf_full;

  always_ff @(posedge clk) begin
    if (rst) begin
      tsh <= '1; tbit <= '0; tph <= '0; txd <= 1'b1;
    end else if (tx_pop) begin
      tsh <= {1'b1, tf_data, 1'b0}; tbit <= 4'd10; tph <= '0;
    end else if (tbit != '0 && tick) begin
      txd <= tsh[0];
      tph <= tph + 1'b1;
      if (tph == 4'd15) begin
        tsh  <= {1'b1, tsh[9:1]};
        tbit <= tbit - 1'b1;
      end
    end else if (tbit == '0) txd <= 1'b1;
  end

  // ---------------- receiver ----------------
  logic [2:0] rsync;
  logic       rin, rbusy, rx_push;
  logic [3:0] rph, rbit;
  logic [7:0] rsh;
  logic [8:0] rx_word;
  logic       rf_empty;

  always_ff @(posedge clk) rsync <= rst ? 3'b111 : {rsync[1:0], rxd};
  assign rin = rsync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      rbusy <= 1'b0; rph <= '0; rbit <= '0; rsh <= '0; rx_push <= 1'b0; rx_word <= '0;
    end else begin
      rx_push <= 1'b0;
      if (!rbusy) begin
        if (!rin) begin rbusy <= 1'b1; rph <= '0; rbit <= '0; end
      end else if (tick) begin
        rph <= rph + 1'b1;
        if (rph == 4'd7) begin                 // middle of a bit
          if (rbit == 4'd0) begin
            if (rin) rbusy <= 1'b0;            // false start
          end else if (rbit <= 4'd8) begin
            rsh <= {rin, rsh[7:1]};
          end else begin
            rx_word <= {!rin, rsh};
            rx_push <= 1'b1;
            rbusy   <= 1'b0;
          end
          rbit <= rbit + 1'b1;
        end
      end
    end
  end

  dcp_fifo #(.W(9)) u_rxf (.clk, .rst, .wr(rx_push), .wdata(rx_word), .rd(rx_re), .rdata(rx_data),
    .count(), .empty(rf_empty), .full(rxf));
  assign rxr = !rf_empty;
endmodule
