// dcp_crc: CRC-32 and CRC-16 generators fed from the CPU data port.
// How: both registers are bit-serial, LSB-first (reflected) LFSRs,
// CRC-32 with polynomial 0xEDB88320 and CRC-16 with 0x8408 (CCITT, as
// used by AX.25/X.25). Each clock shifts DPC data bits into both, so a byte
// takes 8/DPC clocks and a 16-bit word 16/DPC clocks (4 and 8 with the
// default of 2). The data register shifts right, so the least significant
// bit enters first.
// Interface: init loads all ones into both registers; byte_we / word_we
// start a byte (data[7:0]) or word (data[15:0]) while busy is low. crc32 and
// crc16 are the raw register contents; the CPU inverts them for the
// transmitted check value, as in the usual Ethernet and HDLC conventions.
// Timing: busy is high from the clock after the write until the last bit has
// been shifted in.
// From the document: the byte/word input and initialize commands, "CRCs
// initialized to all one's", 2 bits per clock cycle processed, CRC32L,
// CRC32H and CRC16 readback. This design's choices: the bit order (LSB
// first) and leaving the final inversion to software.
module dcp_crc #(
  parameter int DPC = 2                 // data bits per clock
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        init,
  input  logic        byte_we,
  input  logic        word_we,
  input  logic [15:0] data,
  output logic [31:0] crc32,
  output logic [15:0] crc16,
  output logic        busy
);
  localparam logic [31:0] P32 = 32'hEDB88320;
  localparam logic [15:0] P16 = 16'h8408;

  logic [15:0] sh;
  logic [4:0]  left;     // bits still to shift
  logic [31:0] n32;
  logic [15:0] n16;

  always_comb begin
    n32 = crc32;
    n16 = crc16;
    for (int b = 0; b < DPC; b++) begin
      if (n32[0] ^ sh[b]) n32 = (n32 >> 1) ^ P32;
      else n32 = n32 >> 1;
      if (n16[0] ^ sh[b]) n16 = (n16 >> 1) ^ P16;
      else n16 = n16 >> 1;
    end
  end

  assign busy = (left != '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      crc32 <= '1; crc16 <= '1; sh <= '0; left <= '0;
    end else if (init) begin
      crc32 <= '1; crc16 <= '1; left <= '0;
    end else if (busy) begin
      crc32 <= n32; crc16 <= n16;
      sh    <= sh >> DPC;
      left  <= left - 5'(DPC);
    end else if (word_we) begin
      sh <= data; left <= 5'd16;
    end else if (byte_we) begin
      sh <= {8'h00, data[7:0]}; left <= 5'd8;
    end
  end
endmodule
