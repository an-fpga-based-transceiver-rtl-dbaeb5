// dcp_tuner_fir: programmable FIR filter of the tuner chain (used twice:
// 18-bit output after the CIC filter and 20-bit output before the AGC).
//
// Incoming I/Q sample pairs are written to a 512-entry data RAM at the
// address of a sample counter that increments after every write. A filter
// program of up to 512 36-bit instructions sits in a second RAM:
//   [23:0]  signed coefficient (1.0 = 2**23)
//   [32:24] data index: the sample `index` places back from the newest one
//   [33]    W: after this product, write the accumulated sum to the output
//           and start a new sum
//   [35]    E: end of filter; one more instruction runs after it
// A down-counter, initialised by dec_wr and reloaded with `dec`, requests a run after every `dec` new
// samples (one request is held while a run is in progress); the run starts:
// the newest sample address is saved as the base and the program runs from
// address 0, one instruction (one I and one Q product) per clock. The 42-bit
// sums are rounded to OUT_W bits (shift by 23 - (OUT_W - 18)) and saturated;
// ovf pulses on saturation. Several W instructions in one program give
// several outputs per run (interpolation); dec > 1 gives decimation.
// The program is loaded 9 bits at a time, least significant segment first,
// through ld_data/ld_we; raising ld_rst clears the load address, and the
// filter is held while ld_rst stays high.
//
// Follows the document in RAM sizes, instruction fields, word widths and the
// start/decimation counters. The bit positions of W and E are read from the
// register figure (bit 34 unused). The document processes I and Q on
// alternate cycles of a 160 MHz clock with three-section carry-save
// accumulators; here I and Q have their own multiplier and a plain 42-bit
// accumulator at one instruction per clock.
// Timing: the run starts the cycle after the sample that completes the count;
// an output appears 3 cycles after its W instruction is fetched.
module dcp_tuner_fir #(
  parameter int DATA_W = 18,
  parameter int OUT_W  = 18,
  parameter int COEF_W = 24,
  parameter int AW     = 9,     // data and program RAM address bits (512 entries)
  parameter int DEC_W  = 6      // decimation 1..50
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_i,
  input  logic signed [DATA_W-1:0] in_q,
  input  logic [DEC_W-1:0]         dec,
  input  logic                     dec_wr,   // (re)initialise the decimation counter
  input  logic                     ld_rst,
  input  logic                     ld_we,
  input  logic [8:0]               ld_data,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_i,
  output logic signed [OUT_W-1:0]  out_q,
  output logic                     ovf,
  output logic                     busy
);
  localparam int ACC_W = DATA_W + COEF_W;       // 42
  localparam int SHIFT = COEF_W - 1 - (OUT_W - DATA_W);

  typedef struct packed {
    logic             e;
    logic             spare;
    logic             w;
    logic [AW-1:0]    index;
    logic [COEF_W-1:0] coef;
  } instr_t;

  logic [2*DATA_W-1:0] dram [1 << AW];
  instr_t              prog [1 << AW];

  // ---------------- sample side ----------------
  logic [AW-1:0]   sctr;
  logic [DEC_W-1:0] dcnt;
  logic            pend, start;
  always_ff @(posedge clk) begin
    if (in_valid) dram[sctr] <= {in_i, in_q};
  end

  // ---------------- program loading ----------------
  logic [AW+1:0] lctr;                  // 4 segments per instruction
  logic [26:0]   lbuf;
  logic          ld_rst_d;
  always_ff @(posedge clk) begin
    ld_rst_d <= rst ? 1'b0 : ld_rst;
    if (rst || (ld_rst && !ld_rst_d)) lctr <= '0;
    else if (ld_we) begin
      lctr <= lctr + 1'b1;
      if (lctr[1:0] == 2'd3) prog[lctr[AW+1:2]] <= instr_t'({ld_data, lbuf});
      else lbuf <= {ld_data, lbuf[26:9]};
    end
  end

  // ---------------- filter engine ----------------
  logic [AW-1:0] base, pc;
  logic          fetch, last;
  instr_t        ir;           // stage 1: fetched instruction
  logic          v1;
  logic signed [DATA_W-1:0] di, dq;   // stage 2: data
  logic signed [COEF_W-1:0] c2;
  logic          v2, w2;
  logic signed [ACC_W-1:0]  acc_i, acc_q;
  logic          load;                 // next product starts a new sum

  assign start = pend && !fetch && !v1 && !v2 && !ld_rst;
  assign busy  = fetch | v1 | v2;

  function automatic logic signed [OUT_W-1:0] rnd(logic signed [ACC_W-1:0] a, output logic o);
    logic signed [ACC_W:0] r;
    r = ((ACC_W+1)'(a) + (ACC_W+1)'(64'sd1 << (SHIFT - 1))) >>> SHIFT;
    o = (r > (ACC_W+1)'((1 << (OUT_W-1)) - 1)) || (r < -(ACC_W+1)'(1 << (OUT_W-1)));
    if (r > (ACC_W+1)'((1 << (OUT_W-1)) - 1)) return {1'b0, {(OUT_W-1){1'b1}}};
    if (r < -(ACC_W+1)'(1 << (OUT_W-1)))      return {1'b1, {(OUT_W-1){1'b0}}};
    return OUT_W'(r);
  endfunction

  logic signed [ACC_W-1:0] ni, nq;
  logic oi, oq;
  always_comb begin
    ni = di * c2;
    nq = dq * c2;
    if (!load) begin
      ni = ni + acc_i;
      nq = nq + acc_q;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sctr <= '0; dcnt <= '0; pend <= 1'b0; fetch <= 1'b0; last <= 1'b0; pc <= '0; base <= '0;
      v1 <= 1'b0; v2 <= 1'b0; w2 <= 1'b0; load <= 1'b1;
      acc_i <= '0; acc_q <= '0; out_valid <= 1'b0; ovf <= 1'b0;
      out_i <= '0; out_q <= '0; ir <= '0; di <= '0; dq <= '0; c2 <= '0;
    end else begin
      out_valid <= 1'b0;
      ovf <= 1'b0;
      if (in_valid) sctr <= sctr + 1'b1;
      // decimation counter: a run is requested after every `dec` samples
      if (start) pend <= 1'b0;
      if (dec_wr) begin
        dcnt <= dec;
        pend <= 1'b0;
      end else if (in_valid && dec != '0) begin
        if (dcnt <= DEC_W'(1)) begin
          dcnt <= dec;
          pend <= 1'b1;
        end else
          dcnt <= dcnt - 1'b1;
      end
      // stage 0: program counter
      if (start) begin
        fetch <= 1'b1; last <= 1'b0; pc <= '0; load <= 1'b1;
        base <= sctr - 1'b1;
      end else if (fetch) begin
        pc <= pc + 1'b1;
        if (last || ld_rst) fetch <= 1'b0;
      end
      // stage 1: instruction
      v1 <= fetch && !ld_rst;
      if (fetch) begin
        ir <= prog[pc];
        if (prog[pc].e) last <= 1'b1;
      end
      // stage 2: data read
      v2 <= v1;
      if (v1) begin
        {di, dq} <= dram[AW'(base - ir.index)];
        c2 <= ir.coef;
        w2 <= ir.w;
      end
      // stage 3: multiply-accumulate and output
      if (v2) begin
        acc_i <= ni;
        acc_q <= nq;
        load  <= w2;
        if (w2) begin
          out_i <= rnd(ni, oi);
          out_q <= rnd(nq, oq);
          ovf <= oi | oq;
          out_valid <= 1'b1;
        end
      end
    end
  end
endmodule
