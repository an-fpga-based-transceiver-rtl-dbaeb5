// dcp_compressor: RF compressor / clipper for the transmit baseband.
//
// The magnitude of each I/Q pair is estimated from the top 8 bits of each
// component as 7/8 * (max + min/2); its upper 6 bits select one of 64 gain
// entries. Each entry is an unsigned 4.4 fixed-point gain (0 .. 15.94, so
// low levels can be boosted by up to 24 dB and high levels left alone or
// attenuated). Both components are multiplied by the same gain, which keeps
// the clipping level independent of the signal phase and does not alter the
// phase; results are saturated to 16 bits.
// The table is a shift register loaded one 8-bit entry per tbl_we, in
// reverse order: after 64 writes the first value written is entry 63.
// Follows the document's estimator, table size and gain format; with all
// entries 16 (1.0) the block is a bypass.
// Timing: out_valid and the outputs follow in_valid by one clock.
module dcp_compressor
  import dcp_pkg::*;
#(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                tbl_we,
  input  logic [7:0]          tbl_data,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_i,
  input  logic signed [W-1:0] in_q,
  output logic                out_valid,
  output logic signed [W-1:0] out_i,
  output logic signed [W-1:0] out_q,
  output logic [5:0]          index      // table entry used for the last pair
);
  logic [7:0] tbl [64];
  logic [7:0] ai, aq, mag, g;
  logic [5:0] idx;

  function automatic logic [7:0] abs8(logic signed [7:0] v);
    return v[7] ? 8'(-v) : 8'(v);
  endfunction

  function automatic logic signed [W-1:0] scale(logic signed [W-1:0] v, logic [7:0] gain);
    logic signed [W+9:0] p;
    p = (v * $signed({2'b00, gain})) >>> 4;
    if (p > (W+10)'((1 << (W-1)) - 1)) return {1'b0, {(W-1){1'b1}}};
    if (p < -(W+10)'(1 << (W-1)))      return {1'b1, {(W-1){1'b0}}};
    return W'(p);
  endfunction

  always_comb begin
    ai  = abs8(in_i[W-1 -: 8]);
    aq  = abs8(in_q[W-1 -: 8]);
    mag = mag_est(ai, aq)[7:0];   // at most 168 for 8-bit inputs
    idx = mag[7:2];
    g   = tbl[idx];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 64; k++) tbl[k] <= 8'd16;
      out_valid <= 1'b0; out_i <= '0; out_q <= '0; index <= '0;
    end else begin
      if (tbl_we) begin
        tbl[0] <= tbl_data;
        for (int k = 1; k < 64; k++) tbl[k] <= tbl[k-1];
      end
      out_valid <= in_valid;
      if (in_valid) begin
        out_i <= scale(in_i, g);
        out_q <= scale(in_q, g);
        index <= idx;
      end
    end
  end
endmodule
