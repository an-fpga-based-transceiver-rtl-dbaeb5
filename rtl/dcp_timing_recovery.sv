// dcp_timing_recovery: early/late timing-error detector for PSK and FSK
// symbol timing.
//
// The resampler delivers several samples per symbol (early, nominal, late);
// `iv` marks each one and `final` marks the last (late) one. Each sample
// (phase or frequency, 8 bits) is shifted into a two-register delay line and
// adjacent samples are subtracted (8-bit wrap-around difference, so a phase
// step of -180..+180 degrees is measured correctly). When the final sample
// arrives the clock enable is high for two cycles: the first cycle adds
// |nominal - early| and the second |late - nominal| to a 10-bit running
// sum; the two are kept apart by a two-stage accumulator loop (the register
// after the adder holds the first while the second is processed). A 16-stage
// shift register holds past sums, so (sum now - sum 8 symbols ago) / 8 is
// the average of each error over the last 8 symbols, given as err_early and
// err_late (8 bits, unsigned). `data` is the nominal sample of the last
// symbol. `ov` pulses when new values are ready: the final sample's flag passes
// two registers, so ov is high in the second clock after the final sample.
// Follows the document's structure and widths (8-bit samples, 10-bit sum,
// 16-stage shift register, 8-period average). Taking the magnitude of each
// difference is from the text; splitting the output into two separate
// averages is this design's reading of the figure.
module dcp_timing_recovery (
  input  logic        clk,
  input  logic        rst,
  input  logic        iv,
  input  logic        final_s,
  input  logic [7:0]  din,
  output logic [7:0]  data,
  output logic [7:0]  err_early,   // average |nominal - early|
  output logic [7:0]  err_late,    // average |late - nominal|
  output logic        ov
);
  logic [7:0]  r1, r2;
  logic        f1;
  logic        ce;
  logic signed [7:0] d;
  logic [7:0]  ad;
  logic [9:0]  acc [2];          // acc[0]: newest, acc[1]: other stream
  logic [9:0]  sr [16];
  logic [9:0]  nsum, diff;

  assign ce   = (iv & final_s) | f1;
  assign d    = $signed(r1 - r2);
  assign ad   = d[7] ? 8'(-d) : 8'(d);
  assign nsum = acc[1] + 10'(ad);
  assign diff = nsum - sr[15];

  always_ff @(posedge clk) begin
    if (rst) begin
      r1 <= '0; r2 <= '0; f1 <= 1'b0; ov <= 1'b0;
      acc[0] <= '0; acc[1] <= '0;
      for (int k = 0; k < 16; k++) sr[k] <= '0;
      data <= '0; err_early <= '0; err_late <= '0;
    end else begin
      if (iv) begin
        r1 <= din;
        r2 <= r1;
      end
      f1 <= iv & final_s;
      ov <= f1;
      if (ce) begin
        // two interleaved accumulators: the new sum goes to the front
        acc[0] <= nsum;
        acc[1] <= acc[0];
        sr[0] <= nsum;
        for (int k = 1; k < 16; k++) sr[k] <= sr[k-1];
        if (f1) begin
          err_late <= {1'b0, diff[9:3]};
          data     <= r2;
        end else
          err_early <= {1'b0, diff[9:3]};
      end
    end
  end
endmodule
