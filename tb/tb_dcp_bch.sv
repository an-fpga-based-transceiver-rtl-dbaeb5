// tb_dcp_bch: encodes 16 random 7-bit messages in parallel with the (15,7)
// BCH code, g(x) = x^8 + x^7 + x^6 + x^4 + 1, reads the 8 parity bits of
// every stream and compares them with a bit-serial polynomial division in
// the testbench. Then feeds the 15-bit codewords back in receive mode: all
// syndromes must be zero, and after one bit of one stream is flipped that
// stream's syndrome must equal x^pos mod g(x) while the others stay zero.
// Also checks one clock per bit (busy for WIDTH clocks).
module tb_dcp_bch;
  logic clk = 0, rst = 1;
  logic xmt = 1, data_we = 0, cfg_we = 0, width_we = 0, acc_we = 0, acc_in = 0;
  logic [15:0] data = 0;
  logic [2:0] cfg_len_m1 = 0;
  logic [7:1] cfg_g = 0;
  logic [3:0] width_m1 = 0;
  logic [15:0] parity;
  logic [7:0] syndrome;
  logic busy;
  int checks = 0, failures = 0;

  dcp_bch dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam int GPOLY = 'h1D1;           // x^8 + x^7 + x^6 + x^4 + 1

  // remainder of v (nbits, highest degree first) divided by g
  function automatic int polymod(longint v, int nbits);
    longint r;
    r = v;
    for (int i = nbits - 1; i >= 8; i--)
      if (r[i]) r = r ^ (longint'(GPOLY) << (i - 8));
    return int'(r & 255);
  endfunction

  task automatic put(input logic [15:0] w, output int clocks);
    @(negedge clk); data = w; data_we = 1;
    @(negedge clk); data_we = 0;
    clocks = 1;
    while (busy) begin @(negedge clk); clocks++; end
  endtask

  task automatic reg_acc(input logic a);
    @(negedge clk); acc_in = a; acc_we = 1;
    @(negedge clk); acc_we = 0;
  endtask

  logic [6:0] msg [16];
  logic [7:0] par [16];
  logic [15:0] w;
  int c;

  initial begin
    @(posedge clk); #1 rst = 0;
    for (int s = 0; s < 16; s++) msg[s] = 7'($urandom);
    @(negedge clk); cfg_len_m1 = 3'd7; cfg_g = 7'b1101000; cfg_we = 1;   // G7 G6 G4
    width_m1 = 4'd15; width_we = 1;
    @(negedge clk); cfg_we = 0; width_we = 0;
    // ---- encode: 7 data words, highest degree first ----
    xmt = 1;
    reg_acc(1);
    for (int b = 6; b >= 0; b--) begin
      for (int s = 0; s < 16; s++) w[s] = msg[s][b];
      put(w, c);
      check(c == 17, $sformatf("word took %0d clocks", c));
    end
    reg_acc(0);
    for (int s = 0; s < 16; s++) par[s] = 0;
    for (int b = 7; b >= 0; b--) begin
      put(16'h0000, c);
      for (int s = 0; s < 16; s++) par[s][b] = parity[s];
    end
    for (int s = 0; s < 16; s++)
      check(par[s] == 8'(polymod(longint'(msg[s]) << 8, 15)),
            $sformatf("stream %0d parity %h want %h", s, par[s], polymod(longint'(msg[s]) << 8, 15)));
    // ---- receive: codewords, then one with an error in stream 5 ----
    for (int pass = 0; pass < 2; pass++) begin
      int pos;
      pos = 3 + pass * 7;                  // error position (degree)
      xmt = 0;
      reg_acc(1);
      for (int b = 14; b >= 0; b--) begin
        for (int s = 0; s < 16; s++)
          w[s] = (b >= 8) ? msg[s][b - 8] : par[s][b];
        if (pass == 1 && b == pos) w[5] = ~w[5];
        put(w, c);
      end
      for (int s = 0; s < 16; s++) begin
        @(negedge clk); width_m1 = 4'(s); width_we = 1;
        @(negedge clk); width_we = 0;
        #1;
        if (pass == 1 && s == 5)
          check(syndrome == 8'(polymod(longint'(1) << pos, 15)) && syndrome != 0,
                $sformatf("syndrome with error %h want %h", syndrome, polymod(longint'(1) << pos, 15)));
        else
          check(syndrome == 8'h00, $sformatf("pass %0d stream %0d syndrome %h", pass, s, syndrome));
      end
      @(negedge clk); width_m1 = 4'd15; width_we = 1;
      @(negedge clk); width_we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
