// dcp_agc: hang automatic gain control at the end of the receive filter
// chain; levels the signal and reduces 20-bit samples to 16 bits.
//
// Gain: the top 16 bits of a 24-bit loop accumulator form {exponent[3:0],
// mantissa[11:0]}; each sample is multiplied by 2**exponent * (1 +
// mantissa/4096) and the top 16 of its 20 bits are kept (gain 1 maps input
// bits 19:4 to the output), saturating on overflow (ovf pulses). The gain
// range is 0..96 dB.
// Loop: the output magnitude is estimated from the top 8 bits of I and Q as
// 7/8 * (max + min/2) and compared with the set point; the difference is
// shifted left by a loop-gain exponent and subtracted from the accumulator.
// The shift is the attack gain when the output is above the set point, the
// release gain when it is below the set point but above the hang threshold,
// and the loop is frozen while the output is below the hang threshold and the
// hang timer (reloaded with hang_time * 256 samples whenever the output
// exceeds the threshold) has not run out; after that the release gain
// applies again. The accumulator is kept between 0 and the gain limit
// ({exponent, top 4 mantissa bits} compared with accumulator bits 23:16).
// The document computes the products with bit-serial multipliers over 13-32
// clocks per sample; here they are parallel multipliers, with the same
// arithmetic. Register field packing is as in the configuration figure.
// Timing: outputs follow in_valid by one clock; the gain update made from an
// output is used for the next sample.
module dcp_agc
  import dcp_pkg::*;
#(
  parameter int IN_W  = 20,
  parameter int OUT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_i,
  input  logic signed [IN_W-1:0]  in_q,
  input  logic [3:0]              attack,     // loop-gain shift above set point
  input  logic [3:0]              release_g,  // loop-gain shift below set point
  input  logic [7:0]              setpoint,
  input  logic [7:0]              hang_thresh,
  input  logic [7:0]              hang_time,  // in units of 256 samples
  input  logic [7:0]              gain_limit, // {exponent, mantissa[11:8]}
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_i,
  output logic signed [OUT_W-1:0] out_q,
  output logic [15:0]             gain,
  output logic                    hanging,    // loop frozen by the hang timer
  output logic                    ovf
);
  localparam int PW = IN_W + 13 + 15;   // product width before truncation

  logic [23:0] acc;
  logic [15:0] hang_ctr;
  logic        upd;                     // a new output is available for the loop
  logic [7:0]  ai, aq, mag;
  logic signed [8:0]  err;
  logic signed [25:0] step, nacc;
  logic [3:0]  sh;
  logic        freeze;

  assign gain = acc[23:8];

  function automatic logic signed [OUT_W-1:0] amp(logic signed [IN_W-1:0] v,
                                                  logic [15:0] g, output logic o);
    logic signed [PW-1:0] p;
    p = (PW'(v) * $signed({1'b0, 1'b1, g[11:0]})) <<< g[15:12];
    p = p >>> (12 + IN_W - OUT_W);
    o = (p > PW'((1 << (OUT_W-1)) - 1)) || (p < -PW'(1 << (OUT_W-1)));
    if (p > PW'((1 << (OUT_W-1)) - 1)) return {1'b0, {(OUT_W-1){1'b1}}};
    if (p < -PW'(1 << (OUT_W-1)))      return {1'b1, {(OUT_W-1){1'b0}}};
    return OUT_W'(p);
  endfunction

  function automatic logic [7:0] abs8(logic signed [7:0] v);
    return v[7] ? 8'(-v) : 8'(v);
  endfunction

  always_comb begin
    ai  = abs8(out_i[OUT_W-1 -: 8]);
    aq  = abs8(out_q[OUT_W-1 -: 8]);
    mag = mag_est(ai, aq)[7:0];
    err = $signed({1'b0, mag}) - $signed({1'b0, setpoint});
    freeze = 1'b0;
    if (mag > setpoint)          sh = attack;
    else if (mag > hang_thresh)  sh = release_g;
    else begin
      sh = release_g;
      freeze = (hang_ctr != '0);
    end
    step = 26'(err) <<< sh;
    nacc = $signed({2'b00, acc}) - step;
    if (nacc < 0) nacc = '0;
    if (nacc[25:16] > {2'b00, gain_limit}) nacc = {2'b00, gain_limit, 16'hFFFF};
  end

  logic oi, oq;
  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0; hang_ctr <= '0; upd <= 1'b0; hanging <= 1'b0;
      out_valid <= 1'b0; out_i <= '0; out_q <= '0; ovf <= 1'b0;
    end else begin
      out_valid <= in_valid;
      upd <= in_valid;
      ovf <= 1'b0;
      if (in_valid) begin
        out_i <= amp(in_i, gain, oi);
        out_q <= amp(in_q, gain, oq);
        ovf <= oi | oq;
      end
      if (upd) begin
        hanging <= freeze;
        if (!freeze) acc <= nacc[23:0];
        if (mag > hang_thresh)   hang_ctr <= {hang_time, 8'h00};
        else if (hang_ctr != '0) hang_ctr <= hang_ctr - 1'b1;
      end
    end
  end
endmodule
