// dcp_fifo: small synchronous first-in first-out buffer.
// How: a circular register array with read and write pointers and an
// occupancy counter; DEPTH-1 of the DEPTH locations are used, so a 16-slot
// array holds 15 entries as the document's UART and I2S FIFOs do.
// Interface: wr pushes wdata (ignored when full), rd pops (ignored when
// empty); rdata always shows the oldest entry (first-word fall-through).
// Timing: a pushed word is visible on rdata the clock after the write.
// From the document: "15-byte receive and transmit FIFOs" and "a 15-entry
// FIFO". This design's choice: first-word fall-through and silently
// ignoring writes to a full / reads from an empty FIFO.
module dcp_fifo #(
  parameter int W  = 8,
  parameter int AW = 4       // 2**AW slots, 2**AW - 1 usable entries
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  input  logic         rd,
  output logic [W-1:0] rdata,
  output logic [AW:0]  count,
  output logic         empty,
  output logic         full
);
  logic [W-1:0]  mem [1 << AW];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == (AW + 1)'((1 << AW) - 1));
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign rdata = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      count <= count + (AW + 1)'(do_wr) - (AW + 1)'(do_rd);
    end
  end
endmodule
