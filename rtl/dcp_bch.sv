// dcp_bch: BCH encoder / syndrome calculator for up to 16 independent bit
// streams, one stream bit per clock.
//
// How it works: each 16-bit word written to the data port holds one bit of
// each of WIDTH streams (bit j belongs to stream j). The word is loaded into
// a shift register and one bit per clock is passed through a feedback shift
// register of LEN = 3..8 stages whose taps G1..G7 are programmable; each
// stage keeps one state bit per stream, so the streams do not interact.
//   transmit (xmt = 1), acc = 1: fb = data ^ s[LEN-1]; s[0] = fb,
//       s[k] = s[k-1] ^ (G[k] & fb): the stages accumulate the parity, the
//       remainder of data(x) * x^LEN divided by g(x).
//   receive (xmt = 0), acc = 1: fb = s[LEN-1]; s[0] = data ^ fb,
//       s[k] = s[k-1] ^ (G[k] & fb): the stages hold the syndrome, the
//       remainder of the received word divided by g(x); zero for a codeword.
//   acc = 0: no feedback and no data; the stages only shift, so each write
//       moves the next parity bit of every stream (highest degree first)
//       into the shift register, where the parity port reads it.
// The bit leaving the last stage (or the encoder feedback) is shifted into
// the top of the word register as the data bits leave its bottom, so after
// WIDTH clocks bit j of the word register belongs to stream j again.
// Interface: data_we/data write a word; parity is the word register;
// cfg_we loads length-1 and the taps, width_we loads width-1 (also the
// stream whose syndrome is shown), acc_we loads ACC; syndrome is the
// stage contents of the selected stream; busy while bits are processed.
// Timing: WIDTH clocks per word (one clock per bit); write the next word
// after busy falls.
// From the document: the word-wide shift register, the 1..16 parallel
// streams, the programmable length and taps G1-G7, the ACC control, the
// xmt-dependent placement of the data, parity and syndrome read-back and
// the register names. This design's own choices: writing ACC = 1 clears
// the stages (starts a new block), stage storage as small
// per-stream arrays addressed by the bit counter instead of circulating
// registers, the exact feedback equations above, and the busy flag.
module dcp_bch #(
  parameter int NS  = 16,           // streams (maximum word width)
  parameter int MAXL = 8            // maximum number of parity bits
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            xmt,        // 1 = encode, 0 = syndrome
  input  logic            data_we,    // write a data word, start processing
  input  logic [NS-1:0]   data,       // bit j = next bit of stream j
  input  logic            cfg_we,     // load length and taps
  input  logic [2:0]      cfg_len_m1, // LEN - 1
  input  logic [7:1]      cfg_g,      // feedback taps G7..G1
  input  logic            width_we,   // load width
  input  logic [3:0]      width_m1,   // WIDTH - 1 / stream for syndrome
  input  logic            acc_we,     // load ACC
  input  logic            acc_in,     // 1 = accumulate, 0 = read out parity
  output logic [NS-1:0]   parity,     // word register
  output logic [MAXL-1:0] syndrome,   // stages of the selected stream
  output logic            busy        // bits of the last word still in progress
);
  logic [NS-1:0] st [MAXL];            // st[k][j]: stage k of stream j
  logic [2:0] len_m1;
  logic [7:1] g;
  logic [3:0] wm1;
  logic       acc;
  logic [3:0] j;                       // stream being processed
  logic [NS-1:0] sr;

  logic d, last, fb;
  always_comb begin
    d    = sr[0];
    last = st[len_m1][j];
    fb   = acc & (xmt ? (d ^ last) : last);
  end

  always_comb begin
    for (int k = 0; k < MAXL; k++) syndrome[k] = st[k][wm1];
  end
  assign parity = sr;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      j <= '0;
      sr <= '0;
      len_m1 <= 3'd7;
      g <= '0;
      wm1 <= 4'(NS - 1);
      acc <= 1'b0;
      for (int k = 0; k < MAXL; k++) st[k] <= '0;
    end else begin
      if (cfg_we) begin len_m1 <= cfg_len_m1; g <= cfg_g; end
      if (width_we) wm1 <= width_m1;
      if (acc_we) begin
        acc <= acc_in;
        // writing ACC = 1 starts a new block: clear the stages
        if (acc_in) for (int k = 0; k < MAXL; k++) st[k] <= '0;
      end
      if (data_we && !busy) begin
        sr <= data;
        j <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        st[0][j] <= (acc && !xmt ? d : 1'b0) ^ fb;
        for (int k = 1; k < MAXL; k++) st[k][j] <= st[k-1][j] ^ (g[k] & fb);
        sr <= sr >> 1;
        sr[wm1] <= acc ? fb : last;
        j <= j + 4'd1;
        if (j == wm1) busy <= 1'b0;
      end
    end
  end
endmodule
