// dcp_spi: SPI master for the serial flash and the low-speed DAC.
// How: a shift register sends NBITS bits MSB first in SPI mode 0 (data
// changes while SCK is low, both sides sample on the rising edge). SCK runs
// at the system clock / 4 (20 Mbit/s at 80 MHz): each bit is two clocks low
// then two clocks high. Received bits shift in at each rising SCK edge.
// Interface: start with tx loads a transfer (ignored while busy); rx holds
// the received bits after busy falls. ss_on / ss_off set and clear the
// slave-select output (active low on ss_n); with AUTO_SS = 1 the select is
// instead driven low automatically for each transfer (used for the DAC).
// Timing: busy is high for exactly 4*NBITS clocks: 32 for a byte, 64 for a
// 16-bit DAC word.
// From the document: "fixed at 20 Mbps", "the CPU must wait 32 clock
// cycles", "64 clock cycles are required after the write", slave select
// through ports A/B. This design's choices: mode 0, MSB first, AUTO_SS.
module dcp_spi #(
  parameter int NBITS   = 8,
  parameter bit AUTO_SS = 1'b0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [NBITS-1:0] tx,
  input  logic             ss_on,
  input  logic             ss_off,
  output logic [NBITS-1:0] rx,
  output logic             busy,
  output logic             sck,
  output logic             mosi,
  input  logic             miso,
  output logic             ss_n
);
  localparam int CW = $clog2(4 * NBITS + 1);
  logic [NBITS-1:0] sh;
  logic [CW-1:0]    cnt;     // clocks left in the transfer
  logic             ss_reg;

  assign busy = (cnt != '0);
  assign mosi = sh[NBITS-1];
  assign ss_n = AUTO_SS ? !busy : !ss_reg;

  always_ff @(posedge clk) begin
    if (rst) begin
      sh <= '0; rx <= '0; cnt <= '0; sck <= 1'b0; ss_reg <= 1'b0;
    end else begin
      if (ss_on) ss_reg <= 1'b1;
      else if (ss_off) ss_reg <= 1'b0;
      if (!busy) begin
        sck <= 1'b0;
        if (start) begin sh <= tx; cnt <= CW'(4 * NBITS); end
      end else begin
        cnt <= cnt - 1'b1;
        // phase within the bit: cnt[1:0] = 0,3 low half, 2,1 high half
        case (cnt[1:0])
          2'd3: sck <= 1'b1;                               // rising edge
          2'd2: rx  <= {rx[NBITS-2:0], miso};              // sample
          2'd1: sck <= 1'b0;                               // falling edge
          default: if (cnt != CW'(4 * NBITS)) sh <= {sh[NBITS-2:0], 1'b0};  // next bit
        endcase
      end
    end
  end
endmodule
