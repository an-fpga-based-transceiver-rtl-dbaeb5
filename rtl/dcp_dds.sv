// dcp_dds: direct digital synthesizer (numerically controlled oscillator).
//
// A 32-bit phase accumulator advances by `freq` once per sample (clock
// enable `ce`); at 80 Msps one step is 80e6/2**32 = 0.019 Hz. Bits 31:22 of
// the phase address a 1024 x 18 sine table, and the table difference to the
// next entry is multiplied by bits 21:4 (18 bits) and added to the first
// entry: linear interpolation between table points. Cosine uses the same
// table with a 90-degree offset added to the two top phase bits.
//
// The document's circuit uses one dual-port ROM shared in time between
// cosine and sine on a 160 MHz clock; here both are computed in parallel at
// the sample rate, with the same arithmetic. The table is computed at
// elaboration time (round(131071*sin(2*pi*k/1024))).
//
// Timing: cos_o/sin_o appear 4 enabled cycles after the phase they belong
// to; the accumulator phase that produced them is the value it held then.
// Reset clears the accumulator to phase 0.
module dcp_dds
  import dcp_pkg::*;
#(
  parameter int PHASE_W = 32,   // accumulator width (document: 32)
  parameter int ADDR_W  = 10,   // table address bits (document: 1024 entries)
  parameter int OUT_W   = 18,   // sample width (document: 18)
  parameter int FRAC_W  = 18    // interpolation fraction bits (document: bits 21:4)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     ce,
  input  logic [PHASE_W-1:0]       freq,
  output logic signed [OUT_W-1:0]  cos_o,
  output logic signed [OUT_W-1:0]  sin_o,
  output logic [PHASE_W-1:0]       phase
);
  localparam int DEPTH = 1 << ADDR_W;
  localparam int LSB   = PHASE_W - ADDR_W - FRAC_W;

  logic signed [OUT_W-1:0] rom [DEPTH];
  initial begin
    for (int k = 0; k < DEPTH; k++)
      rom[k] = OUT_W'(sine_lut(k, ADDR_W, (1 << (OUT_W - 1)) - 1));
  end

  // stage 1: addresses and fractions for sine and cosine
  logic [ADDR_W-1:0] a_s, a_c;
  logic [FRAC_W-1:0] f_s, f_c;
  // stage 2: table values
  logic signed [OUT_W-1:0] s0, s1, c0, c1;
  logic [FRAC_W-1:0]       f_s2, f_c2;
  // stage 3: base and scaled difference
  logic signed [OUT_W-1:0] s_base, c_base;
  logic signed [OUT_W:0]   s_inc, c_inc;

  logic [PHASE_W-1:0] cphase;
  assign cphase = phase + (PHASE_W'(1) << (PHASE_W - 2));   // +90 degrees

  function automatic logic signed [OUT_W:0] interp(logic signed [OUT_W-1:0] v0,
                                                  logic signed [OUT_W-1:0] v1,
                                                  logic [FRAC_W-1:0] f);
    logic signed [OUT_W:0] d;
    logic signed [OUT_W+FRAC_W+1:0] p;
    d = {v1[OUT_W-1], v1} - {v0[OUT_W-1], v0};
    p = d * $signed({1'b0, f});
    return (OUT_W+1)'(p >>> FRAC_W);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      a_s <= '0; a_c <= '0; f_s <= '0; f_c <= '0;
      s0 <= '0; s1 <= '0; c0 <= '0; c1 <= '0; f_s2 <= '0; f_c2 <= '0;
      s_base <= '0; c_base <= '0; s_inc <= '0; c_inc <= '0;
      cos_o <= '0; sin_o <= '0;
    end else if (ce) begin
      phase <= phase + freq;
      a_s <= phase[PHASE_W-1 -: ADDR_W];
      f_s <= phase[LSB +: FRAC_W];
      a_c <= cphase[PHASE_W-1 -: ADDR_W];
      f_c <= cphase[LSB +: FRAC_W];
      s0 <= rom[a_s];  s1 <= rom[ADDR_W'(a_s + 1'b1)];
      c0 <= rom[a_c];  c1 <= rom[ADDR_W'(a_c + 1'b1)];
      f_s2 <= f_s;     f_c2 <= f_c;
      s_base <= s0;    s_inc <= interp(s0, s1, f_s2);
      c_base <= c0;    c_inc <= interp(c0, c1, f_c2);
      sin_o <= OUT_W'(s_base + s_inc);
      cos_o <= OUT_W'(c_base + c_inc);
    end
  end
endmodule
