// dcp_conv_encoder: programmable convolutional / trellis encoder.
// How: each data-input write shifts data bit 0 into a 4-bit history
// (the 4 earlier bits) and data bit 1 into a 2-bit history (2 earlier); the
// current bits come straight from din. Each of the four coded outputs (8PSK, QPSK and
// BPSK bits of channel 0, BPSK bit of channel 1) is the exclusive-OR of the
// history bits selected by its 8-bit configuration register:
//   cfg[7] U1  = current bit 1      cfg[3] S00 = bit 0, 1 write earlier
//   cfg[6] S10 = bit 1, 1 earlier   cfg[2] S01 = bit 0, 2 earlier
//   cfg[5] S11 = bit 1, 2 earlier   cfg[1] S02 = bit 0, 3 earlier
//   cfg[4] U0  = current bit 0      cfg[0] S03 = bit 0, 4 earlier
// The three channel-0 bits form a phase index {BPSK, QPSK, 8PSK} whose
// weights are 180, 90 and 45 degrees; channel 1 is a single BPSK bit.
// Gray mode converts the index as a Gray code to a natural phase number,
// so that neighbouring phases differ in one coded bit.
// Interface: cfg_we[k] writes cfg_data into register k (0: 8PSK, 1: QPSK,
// 2: BPSK channel 0, 3: BPSK channel 1); mag_we writes the output
// magnitude; din_we shifts din[1:0]. The four 16-bit status words are
// {magnitude, phase byte}: binary channel 0, binary channel 1, Gray
// channel 0, Gray channel 1, where the phase byte has the phase index in
// its top three bits (8-bit phase, 256 = full circle).
// Timing: results are registered and readable the clock after din_we.
// From the document: "exclusive-ORs delayed versions of the uncoded data
// bits", the four configuration registers and their bit names, natural or
// Gray coding, magnitude and phase status. This design's choices: which
// delay each bit name stands for, and the status bit packing.
module dcp_conv_encoder (
  input  logic        clk,
  input  logic        rst,
  input  logic [3:0]  cfg_we,
  input  logic [7:0]  cfg_data,
  input  logic        mag_we,
  input  logic [7:0]  mag_data,
  input  logic        din_we,
  input  logic [1:0]  din,
  output logic [15:0] bin0,
  output logic [15:0] bin1,
  output logic [15:0] gray0,
  output logic [15:0] gray1
);
  logic [7:0] cfg [4];
  logic [7:0] mag;
  logic [3:0] h0;      // h0[k]: bit 0 of the write k+1 writes ago
  logic [1:0] h1;
  logic [7:0] taps;
  logic [3:0] c;       // coded bits: 0 8PSK, 1 QPSK, 2 BPSK0, 3 BPSK1
  logic [2:0] nat, gry;

  // tap vector in the configuration register's bit order
  assign taps = {din[1], h1[0], h1[1], din[0], h0[0], h0[1], h0[2], h0[3]};

  always_comb begin
    for (int k = 0; k < 4; k++) c[k] = ^(cfg[k] & taps);
  end

  assign nat = {c[2], c[1], c[0]};
  assign gry = {nat[2], nat[2] ^ nat[1], nat[2] ^ nat[1] ^ nat[0]};

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 4; k++) cfg[k] <= '0;
      mag <= '0; h0 <= '0; h1 <= '0;
      bin0 <= '0; bin1 <= '0; gray0 <= '0; gray1 <= '0;
    end else begin
      for (int k = 0; k < 4; k++) if (cfg_we[k]) cfg[k] <= cfg_data;
      if (mag_we) mag <= mag_data;
      if (din_we) begin
        h0 <= {h0[2:0], din[0]};
        h1 <= {h1[0], din[1]};
        bin0  <= {mag, nat, 5'd0};
        gray0 <= {mag, gry, 5'd0};
        bin1  <= {mag, c[3], 7'd0};
        gray1 <= {mag, c[3], 7'd0};
      end
    end
  end
endmodule
