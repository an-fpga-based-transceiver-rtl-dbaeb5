// dcp_cic: four-stage cascaded integrator-comb filter, decimating on
// receive and interpolating on transmit, for one channel (I or Q).
//
// Receive (xmt = 0): each input sample (ce) is multiplied by the gain
// fraction (0..1024), shifted left by the gain exponent (0..15), sign-extended
// to 56 bits and run through four 56-bit integrators. Every `ratio` input
// samples the top 28 bits of the last integrator enter four 28-bit
// differentiators (one delay each, clocked only on output samples) and the
// top 18 bits of the last one are the output rdo (rdo_valid pulses).
// Overall gain: frac * 2**exp * ratio**4 / 2**38.
// Transmit (xmt = 1): every `ratio` samples tdi_req pulses and tdi is taken,
// multiplied by 0..8, placed in the low 21 bits of a 28-bit word (sign
// extended) and run through the four differentiators. Their 28-bit output,
// shifted left by the exponent, is fed once into the integrators, which see
// zeros in between (zero stuffing) and run at the full rate. tdo is bits
// 45:28 of the last integrator. Overall gain: mult * 2**exp * ratio**3 / 2**28.
//
// Widths, gain ranges and output taps follow the document. The document
// splits each integrator into two 28-bit halves with a registered carry for
// speed; here each integrator is a single 56-bit adder. Integrators may wrap:
// a CIC filter tolerates that as long as the output fits.
// Timing: rdo appears the cycle after the input sample that completes a
// decimation period; tdo follows each input step by one cycle.
module dcp_cic #(
  parameter int IN_W   = 18,
  parameter int INT_W  = 56,
  parameter int DIF_W  = 28,
  parameter int STAGES = 4,
  parameter int RATIO_W = 10     // ratio 10..640
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     ce,         // one high-rate sample
  input  logic                     xmt,
  input  logic [RATIO_W-1:0]       ratio,
  input  logic [10:0]              gain_frac,  // receive multiplier 0..1024
  input  logic [3:0]               tx_mult,    // transmit multiplier 0..8
  input  logic [3:0]               gain_exp,   // shift 0..15
  input  logic signed [IN_W-1:0]   rdi,
  output logic signed [IN_W-1:0]   rdo,
  output logic                     rdo_valid,
  input  logic signed [IN_W-1:0]   tdi,
  output logic                     tdi_req,
  output logic signed [IN_W-1:0]   tdo
);
  logic signed [INT_W-1:0] integ [STAGES];
  logic signed [DIF_W-1:0] dly   [STAGES];
  logic signed [DIF_W-1:0] comb  [STAGES+1];  // comb[0] is the comb input
  logic [RATIO_W-1:0]      cnt;
  logic                    slow;               // this sample ends a period
  logic signed [INT_W-1:0] int_in;
  logic signed [IN_W+10:0] rx_prod;
  logic signed [IN_W+4:0]  tx_prod;

  assign slow = (cnt == '0);
  assign tdi_req = ce && xmt && slow;

  always_comb begin
    rx_prod = rdi * $signed({1'b0, gain_frac});
    tx_prod = tdi * $signed({1'b0, tx_mult});
    if (xmt)
      comb[0] = DIF_W'(tx_prod);
    else
      comb[0] = integ[STAGES-1][INT_W-1 -: DIF_W];
    for (int s = 0; s < STAGES; s++)
      comb[s+1] = comb[s] - dly[s];
    if (xmt)
      int_in = slow ? (INT_W'(comb[STAGES]) <<< gain_exp) : '0;
    else
      int_in = INT_W'(rx_prod) <<< gain_exp;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      rdo <= '0; rdo_valid <= 1'b0; tdo <= '0;
      for (int s = 0; s < STAGES; s++) begin
        integ[s] <= '0;
        dly[s]   <= '0;
      end
    end else begin
      rdo_valid <= 1'b0;
      if (ce) begin
        cnt <= slow ? RATIO_W'(ratio - 1'b1) : RATIO_W'(cnt - 1'b1);
        integ[0] <= integ[0] + int_in;
        for (int s = 1; s < STAGES; s++)
          integ[s] <= integ[s] + integ[s-1];
        if (slow) begin
          for (int s = 0; s < STAGES; s++)
            dly[s] <= comb[s];
          if (!xmt) begin
            rdo <= comb[STAGES][DIF_W-1 -: IN_W];
            rdo_valid <= 1'b1;
          end
        end
        tdo <= integ[STAGES-1][DIF_W+IN_W-1:DIF_W];
      end
    end
  end
endmodule
