// dcp_polar_to_rect: turns one OFDM subcarrier given as a 4-bit phase and a
// 4-bit logarithmic magnitude into a Cartesian pair for the inverse FFT.
//
// How it works: two 16-entry by 6-bit tables hold 31*cos and 31*sin of the
// phase in steps of 22.5 degrees. Magnitude bit 0 adds half of the table
// value to itself (x1.5, about +3.5 dB); magnitude bits 3:1 pick one of
// eight shifter inputs: code 0 gives zero (subcarrier off), codes 1..7 shift
// left by 1..7 places (6 dB per step). With the 3 dB half-steps this covers
// about 39 dB, and the largest value (46 << 7 = 5888) fits the 14-bit output.
// Interface: in_valid with phs and mag; out_valid with x (cosine part) and
// y (sine part), two's complement, 14 bits.
// Timing: one pair per clock; outputs are registered, one clock after
// in_valid.
// From the document: the two 16x6 tables, the x1.5 option, the shifter
// built from 8-input multiplexers with a zero input, the 4+4-bit input and
// the 14-bit outputs. This design's own choices: the table amplitude (31),
// which magnitude bits drive the x1.5 stage and which the shifter, the
// shift for each code, and the output register.
module dcp_polar_to_rect
  import dcp_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic [3:0]         phs,     // phase, 22.5 degrees per step
  input  logic [3:0]         mag,     // {shift code[2:0], x1.5}
  output logic               out_valid,
  output logic signed [13:0] x,      // cosine (real) part
  output logic signed [13:0] y       // sine (imaginary) part
);
  typedef logic signed [5:0] rom_t;

  function automatic rom_t [15:0] make_rom(int quarter_offset);
    rom_t [15:0] t;
    for (int k = 0; k < 16; k++) t[k] = rom_t'(sine_lut(k + quarter_offset, 4, 31));
    return t;
  endfunction

  localparam rom_t [15:0] COS_ROM = make_rom(4);
  localparam rom_t [15:0] SIN_ROM = make_rom(0);

  function automatic logic signed [13:0] level(rom_t v, logic [3:0] m);
    logic signed [7:0] s;
    s = 8'(v) + (m[0] ? 8'(v >>> 1) : 8'sd0);
    return (m[3:1] == 3'd0) ? 14'sd0 : 14'(14'(s) <<< m[3:1]);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      x <= '0;
      y <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x <= level(COS_ROM[phs], mag);
        y <= level(SIN_ROM[phs], mag);
      end
    end
  end
endmodule
