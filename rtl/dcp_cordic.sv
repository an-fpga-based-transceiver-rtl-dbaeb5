// dcp_cordic: iterative CORDIC engine of the single-carrier modem.
//
// Vector mode (mode = 0): converts (x, y) to magnitude (x_out) and phase
// (z_out = z_in + atan2(y, x), 16-bit angle, 2**15 = 180 degrees; y_out
// ends near 0); used to demodulate AM, PM and FM. Rotate mode (mode = 1): rotates (x, y) by the angle z; used for SSB and
// for modulation.
// A `start` pulse loads the inputs through the coarse-rotation stage, which
// negates and/or swaps x and y to rotate them by a multiple of 90 degrees:
// in rotate mode by the quadrant held in z[15:14] (that quadrant is then
// removed from z); in vector mode by -90/+90 degrees when x is negative
// (second/third quadrant). Sixteen fine rotations follow, one per clock,
// with shifts 0..15 and arctangent steps from a 16-entry table. The datapath
// is 22 bits: 2 extra MSBs for growth, 4 extra LSBs for resolution. Finally
// x and y are multiplied by 0.60725 (the inverse CORDIC gain) and rounded to
// 16 bits, and in vector mode the coarse quadrant ({x15&y15, x15}) is added
// back to z.
// Follows the document's three stages, widths, iteration count, correction
// constant and z correction term.
// Timing: done pulses 18 clocks after start; busy is high in between.
// Arctangent table: round(atan(2**-i) / pi * 2**19), i = 0..15.
module dcp_cordic #(
  parameter int W  = 16,
  parameter int IW = 22
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic                mode,     // 0 vector, 1 rotate
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  input  logic signed [W-1:0] z_in,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out,
  output logic signed [W-1:0] z_out,
  output logic                busy,
  output logic                done
);
  localparam int FR = IW - W - 2;   // extra LSBs (4)
  localparam logic [31:0] ATAN [16] = '{131072, 77376, 40884, 20753, 10417, 5213,
                                        2607, 1304, 652, 326, 163, 81, 41, 20, 10, 5};
  localparam logic signed [17:0] KINV = 18'sd39797;   // 0.60725 * 2**16

  logic signed [IW-1:0] x, y, z;
  logic [4:0]           n;
  logic                 md;
  logic [1:0]           quad;        // z correction (vector mode)
  logic                 negx, negy, swap;
  logic signed [W-1:0]  cx, cy;
  logic signed [IW-1:0] xs, ys, at;
  logic                 subxz;

  // coarse rotation
  always_comb begin
    negx = 1'b0; negy = 1'b0; swap = 1'b0;
    if (mode) begin
      case (z_in[W-1:W-2])
        2'b01: begin swap = 1'b1; negx = 1'b1; end       // +90: (-y, x)
        2'b10: begin negx = 1'b1; negy = 1'b1; end       // 180: (-x, -y)
        2'b11: begin swap = 1'b1; negy = 1'b1; end       // 270: (y, -x)
        default: ;
      endcase
    end else if (x_in[W-1]) begin
      swap = 1'b1;
      if (y_in[W-1]) negx = 1'b1;                        // Q3: +90: (-y, x)
      else           negy = 1'b1;                        // Q2: -90: (y, -x)
    end
    // negation happens before the swap: the negated input is then routed
    cx = swap ? (negx ? -y_in : y_in) : (negx ? -x_in : x_in);
    cy = swap ? (negy ? -x_in : x_in) : (negy ? -y_in : y_in);
  end

  assign xs    = x >>> n[3:0];
  assign ys    = y >>> n[3:0];
  assign at    = IW'(ATAN[n[3:0]]);
  assign subxz = md ? z[IW-1] : ~y[IW-1];   // rotate: z < 0; vector: y >= 0

  function automatic logic signed [W-1:0] corr(logic signed [IW-1:0] v);
    logic signed [IW+18:0] p;
    p = (v * KINV + (1 <<< (16 + FR - 1))) >>> (16 + FR);
    if (p > (IW+19)'((1 << (W-1)) - 1)) return {1'b0, {(W-1){1'b1}}};
    if (p < -(IW+19)'(1 << (W-1)))      return {1'b1, {(W-1){1'b0}}};
    return W'(p);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      x <= '0; y <= '0; z <= '0; n <= '0; md <= 1'b0; quad <= '0;
      busy <= 1'b0; done <= 1'b0;
      x_out <= '0; y_out <= '0; z_out <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        md   <= mode;
        n    <= '0;
        x    <= IW'(cx) <<< FR;
        y    <= IW'(cy) <<< FR;
        if (mode) begin
          z    <= IW'({2'b00, z_in[W-3:0]}) <<< FR;
          quad <= '0;
        end else begin
          z    <= IW'(z_in) <<< FR;
          quad <= {x_in[W-1] & y_in[W-1], x_in[W-1]};
        end
      end else if (busy) begin
        if (n < 5'd16) begin
          n <= n + 1'b1;
          if (subxz) begin          // clockwise
            x <= x + ys;
            y <= y - xs;
            z <= z + at;
          end else begin            // counter-clockwise
            x <= x - ys;
            y <= y + xs;
            z <= z - at;
          end
        end else begin
          busy  <= 1'b0;
          done  <= 1'b1;
          x_out <= corr(x);
          y_out <= corr(y);
          z_out <= W'(z >>> FR) + {quad, {(W-2){1'b0}}};
        end
      end
    end
  end
endmodule
