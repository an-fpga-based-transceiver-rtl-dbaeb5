// dcp_noise_blanker: impulse-noise blanker placed between the two tuner FIR
// filters.
//
// For each I/Q sample pair (in_valid), the absolute values of the top 8 bits
// of I and Q are compared with `limit`. The samples move through four
// registers (three delay stages and an output register); a pair whose I or Q
// magnitude exceeded the limit leaves the output register as zero. The
// comparison result travels with its pair, so exactly the offending pair is
// blanked and no pulse is stretched.
// Follows the document's structure (8-bit magnitude compare, 3 delay
// registers, output register reset). The document processes I and Q
// serially on a double-rate clock and aligns the two comparisons with
// registers on opposite clock edges; here I and Q are handled in parallel.
// Timing: a pair is in the output register after the third in_valid that
// follows its own (it passes 4 registers, the first loaded on its own pulse).
module dcp_noise_blanker #(
  parameter int W = 18
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_i,
  input  logic signed [W-1:0] in_q,
  input  logic [7:0]          limit,
  output logic signed [W-1:0] out_i,
  output logic signed [W-1:0] out_q,
  output logic                blanked      // last output pair was blanked
);
  logic signed [W-1:0] di [3];
  logic signed [W-1:0] dq [3];
  logic [2:0]          hit;
  logic [7:0]          mi, mq;

  function automatic logic [7:0] abs8(logic signed [7:0] v);
    return v[7] ? 8'(-v) : 8'(v);
  endfunction

  assign mi = abs8(in_i[W-1 -: 8]);
  assign mq = abs8(in_q[W-1 -: 8]);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 3; k++) begin di[k] <= '0; dq[k] <= '0; end
      hit <= '0; out_i <= '0; out_q <= '0; blanked <= 1'b0;
    end else if (in_valid) begin
      di[0] <= in_i; dq[0] <= in_q;
      hit[0] <= (mi > limit) || (mq > limit);
      for (int k = 1; k < 3; k++) begin
        di[k] <= di[k-1]; dq[k] <= dq[k-1];
      end
      hit[2:1] <= hit[1:0];
      out_i <= hit[2] ? '0 : di[2];
      out_q <= hit[2] ? '0 : dq[2];
      blanked <= hit[2];
    end
  end
endmodule
