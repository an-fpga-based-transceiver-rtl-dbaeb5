// dcp_phase_correlator: OFDM symbol synchroniser that compares each
// sample's phase with the phase one FFT length earlier.
//
// The top 8 bits of the CORDIC phase (`valid`) are written to a 1024 x 8
// RAM used as a delay line of fft_len samples, and the delayed phase is
// subtracted (8-bit wrap-around). Inside the cyclic prefix the two phases
// match, so the difference is small. The magnitude of the difference is
// accumulated in a 12-bit running sum and a variable-length shift register
// (cp_len_m1 + 1 stages, up to 64) delays that sum; their difference is the
// phase error summed over the last cyclic-prefix length. While it is below a
// quarter of full scale (1024), its minimum is tracked and each new minimum
// reloads a 6-bit down-counter with `delay`; when the counter runs out, sync
// pulses for one clock. Above the limit the minimum register is preset to
// all ones.
// Follows the document's structure and widths (8-bit phase, 12-bit sum,
// 6-bit cyclic-prefix length and delay, 1/4 full-scale limit).
// Timing: avg and sync are registered one clock after `valid`.
module dcp_phase_correlator #(
  parameter int AW = 10       // delay-line RAM address bits (1024 entries)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          valid,
  input  logic [7:0]    phase,
  input  logic [AW-1:0] fft_len,    // delay in samples (FFT size)
  input  logic [5:0]    cp_len_m1,  // cyclic prefix length - 1
  input  logic [5:0]    delay,
  output logic [11:0]   avg,
  output logic          sync
);
  logic [7:0]    ram [1 << AW];
  logic [AW-1:0] addr;
  logic signed [7:0] d;
  logic [7:0]    ad;
  logic [11:0]   acc, nacc, navg, minv;
  logic [11:0]   sr [64];
  logic [5:0]    ctr;
  logic          nz_d, low, upd;

  assign d    = $signed(phase - ram[addr]);
  assign ad   = d[7] ? 8'(-d) : 8'(d);
  assign nacc = acc + 12'(ad);
  assign navg = nacc - sr[cp_len_m1];
  assign low  = navg < 12'd1024;
  assign upd  = low && (navg < minv);

  always_ff @(posedge clk) begin
    if (valid) ram[addr] <= phase;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      addr <= '0; acc <= '0; avg <= '0; minv <= '1; ctr <= '0; nz_d <= 1'b0; sync <= 1'b0;
      for (int k = 0; k < 64; k++) sr[k] <= '0;
    end else begin
      sync <= 1'b0;
      if (valid) begin
        addr <= (addr >= fft_len - 1'b1) ? '0 : addr + 1'b1;
        acc  <= nacc;
        sr[0] <= nacc;
        for (int k = 1; k < 64; k++) sr[k] <= sr[k-1];
        avg  <= navg;
        if (!low) minv <= '1;
        else if (upd) minv <= navg;
        if (upd) ctr <= delay;
        else if (ctr != '0) ctr <= ctr - 1'b1;
        nz_d <= (ctr != '0);
        sync <= nz_d && (ctr == '0) && !upd;
      end
    end
  end
endmodule
