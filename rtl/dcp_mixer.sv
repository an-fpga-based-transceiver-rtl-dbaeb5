// dcp_mixer: quadrature mixer and transmit adder between the converters and
// the CIC filter.
//
// Receive: the 12-bit two's-complement ADC sample is multiplied by the
// synthesizer's cosine and sine to give baseband I and Q (18 bits each,
// full-scale ADC times full-scale sine maps to about +/-2**17).
// Transmit: the upsampled baseband pair is mixed and summed,
// I*cos + Q*sin, scaled so that a full-scale product sum of 2**17 maps to the
// DAC's full scale, saturated to 14 bits and sent in offset binary (the DAC
// runs in offset-binary mode).
// mix_ovf pulses when a transmit product had to be saturated, dac_ovf when the
// sum had to be saturated, adc_ovf passes the ADC's own overflow pin on.
// Timing: rx_i/rx_q follow their inputs by 1 enabled cycle, dac and the
// overflow flags by 2.
// The document shares one multiplier between I and Q at 160 MHz; here each
// product has its own multiplier at the 80 MHz sample rate.
module dcp_mixer #(
  parameter int ADC_W = 12,
  parameter int DAC_W = 14,
  parameter int W     = 18
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    ce,
  input  logic signed [ADC_W-1:0] adc,
  input  logic                    adc_or,
  input  logic signed [W-1:0]     cos_i,
  input  logic signed [W-1:0]     sin_i,
  output logic signed [W-1:0]     rx_i,
  output logic signed [W-1:0]     rx_q,
  input  logic signed [W-1:0]     tx_i,
  input  logic signed [W-1:0]     tx_q,
  output logic [DAC_W-1:0]        dac,
  output logic                    adc_ovf,
  output logic                    mix_ovf,
  output logic                    dac_ovf
);
  localparam int PW = ADC_W + W;      // receive product width
  localparam int TW = 2 * W;          // transmit product width

  function automatic logic signed [W-1:0] sat_w(logic signed [TW-W:0] v, output logic ovf);
    localparam logic signed [TW-W:0] MAXV = (TW-W+1)'((1 << (W-1)) - 1);
    localparam logic signed [TW-W:0] MINV = -(TW-W+1)'(1 << (W-1));
    ovf = (v > MAXV) || (v < MINV);
    return (v > MAXV) ? W'(MAXV) : (v < MINV) ? W'(MINV) : W'(v);
  endfunction

  logic signed [PW-1:0] pi, pq;
  logic signed [TW-1:0] ti, tq;
  logic signed [W-1:0]  si, sq;
  logic                 oi, oq, adc_or_d;
  logic signed [W:0]    sum;
  logic signed [W-4:0]  sum_s;        // sum >> 4 before saturation (15 bits)

  always_comb begin
    pi = adc * cos_i;
    pq = adc * sin_i;
    ti = tx_i * cos_i;
    tq = tx_q * sin_i;
    si = sat_w((TW-W+1)'(ti >>> (W-1)), oi);
    sq = sat_w((TW-W+1)'(tq >>> (W-1)), oq);
  end

  assign sum_s = (W-3)'(sum >>> 4);

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_i <= '0; rx_q <= '0; sum <= '0; dac <= '0;
      adc_ovf <= 1'b0; mix_ovf <= 1'b0; dac_ovf <= 1'b0; adc_or_d <= 1'b0;
    end else begin
      adc_ovf <= 1'b0; mix_ovf <= 1'b0; dac_ovf <= 1'b0;
      if (ce) begin
        rx_i <= W'(pi >>> (PW - W - 1));
        rx_q <= W'(pq >>> (PW - W - 1));
        adc_or_d <= adc_or;
        adc_ovf  <= adc_or_d;
        sum <= (W+1)'(si) + (W+1)'(sq);
        mix_ovf <= oi | oq;
        if (sum_s > (W-3)'((1 << (DAC_W-1)) - 1)) begin
          dac <= {1'b1, {(DAC_W-1){1'b1}}};          // +full scale, offset binary
          dac_ovf <= 1'b1;
        end else if (sum_s < -(W-3)'(1 << (DAC_W-1))) begin
          dac <= '0;                                 // -full scale
          dac_ovf <= 1'b1;
        end else
          dac <= {~sum_s[DAC_W-1], sum_s[DAC_W-2:0]};
      end
    end
  end
endmodule
