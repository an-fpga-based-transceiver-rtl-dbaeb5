// dcp_rect_to_polar: converts each FFT output bin (16-bit X and Y) into a
// 5-bit phase and a 7-bit logarithmic magnitude, one pair per clock, without
// CORDIC.
//
// How it works: four normalizing stages turn the pair into a small
// floating-point number. Each stage keeps the low bits of both components
// when both already fit the narrower width, and otherwise keeps the high bits
// (an arithmetic right shift) and adds the shift to the exponent. The widths
// go 16 -> 12 -> 8 -> 6 -> 5 bits, so the shifts are 4, 4, 2 and 1 and the
// exponent (0..11) fits in 4 bits. The 5-bit results are folded into the
// first quadrant: absolute values (clipped to 4 bits) and, in the second and
// fourth quadrants, a swap of the two, which is a rotation by -90 degrees.
// Then:
//   phase:     a 256 x 4 table gives round(atan2(b, a) / 11.25 degrees),
//              0..8, and an adder puts back the quadrant (0, 8, 16 or 24);
//              the 5-bit result is modulo 32 (11.25 degrees per step).
//   magnitude: a 64 x 3 table addressed by the larger component and the top
//              two bits of the smaller one gives round(4*log2|v|) - 12,
//              clipped to 0..7; the adder adds 4 * exponent. The output is
//              therefore 4*log2(sqrt(X^2+Y^2)) - 12 in 1.5 dB steps, about
//              0..50 for the full input range.
// Both tables are computed at elaboration time with integer arithmetic.
// Interface: in_valid with x, y; out_valid with phs and mag.
// Timing: one pair per clock, six register stages (latency 6 clocks),
// matching the six pipeline registers of the frequency buffer's address
// path.
// From the document: the four 2-input multiplexer stages with the widths
// 16, 12, 8, 6, 5 printed in the figure, the 4-bit exponent, the absolute
// values and swap, the 256x4 arctangent and 64x3 magnitude tables, the
// quadrant adder and the 5-bit phase / 7-bit magnitude outputs. The text
// speaks of shifts of 8, 4, 2 or 1; the printed widths give 4, 4, 2, 1 and
// are followed here. This design's own choices: the clipping of |-16| to 15,
// the table addressing and contents, the 1.5 dB magnitude unit and the
// placement of the registers.
module dcp_rect_to_polar
  import dcp_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic signed [15:0] x,       // real part of the FFT bin
  input  logic signed [15:0] y,       // imaginary part of the FFT bin
  output logic               out_valid,
  output logic [4:0]         phs,     // phase, 11.25 degrees per step
  output logic [6:0]         mag      // 4*log2(magnitude) - 12, 1.5 dB steps
);
  // ---- tables ----
  // atan2(b, a) rounded to 1/32 of a turn: count the half-step boundaries
  // (2k+1) * 5.625 degrees that the angle reaches (b*cos >= a*sin)
  function automatic logic [3:0] atan_entry(int a, int b);
    int n;
    longint c, s;
    n = 0;
    if (a == 0 && b == 0) return 4'd0;
    for (int k = 0; k < 8; k++) begin
      s = longint'(sine_lut(2 * k + 1, 6, 1 << 20));
      c = longint'(sine_lut(2 * k + 1 + 16, 6, 1 << 20));
      if (b * c >= a * s) n++;
    end
    return 4'(n);
  endfunction

  // round(4*log2(sqrt(a^2 + bm^2))) - 12 clipped to 0..7, bm = the middle of
  // the range of b selected by its top two bits: the result reaches k when
  // (a^2 + bm^2)^4 >= 2^(23 + 2k)
  function automatic logic [2:0] log_entry(int a, int bsel);
    longint m2, m8;
    int n, bm;
    bm = 4 * bsel + 2;
    m2 = longint'(a * a + bm * bm);
    m8 = m2 * m2 * m2 * m2;
    n = 0;
    for (int k = 1; k < 8; k++) if (m8 >= (64'sd1 <<< (23 + 2 * k))) n = k;
    return 3'(n);
  endfunction

  function automatic logic [255:0][3:0] make_atan();
    logic [255:0][3:0] t;
    for (int i = 0; i < 256; i++) t[i] = atan_entry(i >> 4, i & 15);
    return t;
  endfunction

  function automatic logic [63:0][2:0] make_log();
    logic [63:0][2:0] t;
    for (int i = 0; i < 64; i++) t[i] = log_entry(i >> 2, i & 3);
    return t;
  endfunction

  localparam logic [255:0][3:0] ATAN_ROM = make_atan();
  localparam logic [63:0][2:0]  LOG_ROM  = make_log();

  // ---- normalizing stages ----
  logic signed [11:0] x1, y1;
  logic signed [7:0]  x2, y2;
  logic signed [5:0]  x3, y3;
  logic signed [4:0]  x4, y4;
  logic [3:0] e1, e2, e3, e4, e5;
  logic [3:0] a5, b5;           // folded components, a from x side
  logic [4:0] q5;               // quadrant offset 0, 8, 16, 24
  logic [5:0] v;                // valid pipeline

  function automatic logic fits(logic signed [15:0] s, int w);
    return (s >>> (w - 1)) == 16'sd0 || (s >>> (w - 1)) == -16'sd1;
  endfunction

  function automatic logic [3:0] abs4(logic signed [4:0] s);
    return (s == -5'sd16) ? 4'd15 : (s[4] ? 4'(-s) : 4'(s));
  endfunction

  logic [3:0] big, sml;
  always_comb begin
    big = (a5 >= b5) ? a5 : b5;
    sml = (a5 >= b5) ? b5 : a5;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v <= '0;
      out_valid <= 1'b0;
      phs <= '0;
      mag <= '0;
    end else begin
      v <= {v[4:0], in_valid};
      out_valid <= v[4];
      // stage 1: 16 -> 12
      if (fits(x, 12) && fits(y, 12)) begin
        x1 <= 12'(x); y1 <= 12'(y); e1 <= 4'd0;
      end else begin
        x1 <= 12'(x >>> 4); y1 <= 12'(y >>> 4); e1 <= 4'd4;
      end
      // stage 2: 12 -> 8
      if (fits(16'(x1), 8) && fits(16'(y1), 8)) begin
        x2 <= 8'(x1); y2 <= 8'(y1); e2 <= e1;
      end else begin
        x2 <= 8'(x1 >>> 4); y2 <= 8'(y1 >>> 4); e2 <= e1 + 4'd4;
      end
      // stage 3: 8 -> 6
      if (fits(16'(x2), 6) && fits(16'(y2), 6)) begin
        x3 <= 6'(x2); y3 <= 6'(y2); e3 <= e2;
      end else begin
        x3 <= 6'(x2 >>> 2); y3 <= 6'(y2 >>> 2); e3 <= e2 + 4'd2;
      end
      // stage 4: 6 -> 5
      if (fits(16'(x3), 5) && fits(16'(y3), 5)) begin
        x4 <= 5'(x3); y4 <= 5'(y3); e4 <= e3;
      end else begin
        x4 <= 5'(x3 >>> 1); y4 <= 5'(y3 >>> 1); e4 <= e3 + 4'd1;
      end
      // stage 5: fold into the first quadrant
      e5 <= e4;
      unique case ({x4[4], y4[4]})
        2'b00: begin a5 <= abs4(x4); b5 <= abs4(y4); q5 <= 5'd0;  end
        2'b10: begin a5 <= abs4(y4); b5 <= abs4(x4); q5 <= 5'd8;  end
        2'b11: begin a5 <= abs4(x4); b5 <= abs4(y4); q5 <= 5'd16; end
        default: begin a5 <= abs4(y4); b5 <= abs4(x4); q5 <= 5'd24; end
      endcase
      // stage 6: tables and adders
      phs <= q5 + 5'(ATAN_ROM[{a5, b5}]);
      mag <= {1'b0, e5, 2'b00} + 7'(LOG_ROM[{big, sml[3:2]}]);
    end
  end
endmodule
