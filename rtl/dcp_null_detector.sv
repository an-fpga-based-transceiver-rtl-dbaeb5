// dcp_null_detector: OFDM null-symbol detector, signal-strength meter and
// start-of-frame generator.
//
// Each magnitude sample (from the CORDIC, 16 bits, `valid`) is added to a
// 24-bit accumulator whose top 18 bits are written to a 512-entry RAM used
// as a delay line of `sym_len` samples (the address counter wraps when it
// reaches sym_len - 1). Subtracting the delayed value gives the moving sum
// of the last sym_len magnitudes / 64: the RSSI.
// The largest RSSI seen is kept (ini makes the current RSSI the maximum and
// clears any minimum search in progress - this design's choice);
// the low-signal threshold is max/4 (-12 dB, h = 0) or max/2 (-6 dB,
// h = 1). While the RSSI is below it (dcd low), the minimum RSSI is tracked
// and every new minimum reloads a 6-bit down-counter with `delay`; when no
// new minimum has come for `delay` samples the counter reaches zero and sof
// pulses for one clock: the end of the null symbol has passed. Above the
// threshold the minimum register is preset to all ones.
// Follows the document's structure and widths (24-bit accumulator, 18-bit
// delay line, 6-bit delay). dcd = RSSI not below the threshold (signal
// present) is this design's reading of the output labelled DCD.
// Timing: rssi, dcd and sof are registered one clock after `valid`.
module dcp_null_detector #(
  parameter int AW = 9        // delay-line RAM address bits (512 entries)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          valid,
  input  logic [15:0]   mag,
  input  logic [AW-1:0] sym_len,   // symbol length in samples
  input  logic          h,         // 0: -12 dB, 1: -6 dB threshold
  input  logic [5:0]    delay,     // SOF delay in samples
  input  logic          ini,       // make the current RSSI the maximum
  output logic [17:0]   rssi,
  output logic [17:0]   max_rssi,
  output logic          dcd,
  output logic          sof
);
  logic [23:0]   acc;
  logic [17:0]   ram [1 << AW];
  logic [AW-1:0] addr;
  logic [17:0]   rnow, minr, thr;
  logic [23:0]   nacc;
  logic [5:0]    ctr;
  logic          nz_d;
  logic          low, upd;

  assign nacc = acc + 24'(mag);
  assign rnow = nacc[23:6] - ram[addr];
  assign thr  = h ? (max_rssi >> 1) : (max_rssi >> 2);
  assign low  = rnow < thr;
  assign upd  = low && (rnow < minr);

  always_ff @(posedge clk) begin
    if (valid) ram[addr] <= nacc[23:6];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0; addr <= '0; rssi <= '0; max_rssi <= '0; minr <= '1;
      ctr <= '0; nz_d <= 1'b0; dcd <= 1'b0; sof <= 1'b0;
    end else begin
      sof <= 1'b0;
      if (ini) max_rssi <= rssi;
      if (valid) begin
        acc  <= nacc;
        addr <= (addr >= sym_len - 1'b1) ? '0 : addr + 1'b1;
        rssi <= rnow;
        dcd  <= !low;
        if (!ini && rnow > max_rssi) max_rssi <= rnow;
        if (!low) minr <= '1;
        else if (upd) minr <= rnow;
        if (upd) ctr <= delay;
        else if (ctr != '0) ctr <= ctr - 1'b1;
        nz_d <= (ctr != '0);
        sof  <= nz_d && (ctr == '0) && !upd;
      end
      if (ini) begin  // re-arm: forget any minimum found before
        minr <= '1; ctr <= '0; nz_d <= 1'b0; sof <= 1'b0;
      end
    end
  end
endmodule
