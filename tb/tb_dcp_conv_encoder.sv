// tb_dcp_conv_encoder: random configuration words and random data; a
// reference model keeps its own bit histories and computes the four coded
// bits, the natural and Gray phase indices and the status words, which are
// compared after every data write. A fixed rate-1/2, K=5 code (taps
// U0,S00,S02,S03 and U0,S01,S02,S03 on QPSK/BPSK) is also run.
module tb_dcp_conv_encoder;
  logic clk = 0, rst = 1, mag_we = 0, din_we = 0;
  logic [3:0] cfg_we = 0;
  logic [7:0] cfg_data = 0, mag_data = 0;
  logic [1:0] din = 0;
  logic [15:0] bin0, bin1, gray0, gray1;
  int checks = 0, failures = 0;
  dcp_conv_encoder dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic [7:0] cfg [4];
  logic [7:0] mg;
  bit b0h [5];   // b0h[0] current, b0h[k] k writes ago
  bit b1h [3];
  function automatic logic [2:0] to_nat(logic [2:0] g);
    return {g[2], g[2] ^ g[1], g[2] ^ g[1] ^ g[0]};
  endfunction
  task automatic wcfg(input int k, input logic [7:0] v);
    @(negedge clk); cfg_we = 4'(1 << k); cfg_data = v; @(negedge clk); cfg_we = 0;
    cfg[k] = v;
  endtask
  task automatic step(input logic [1:0] d);
    bit c [4];
    logic [7:0] tp;
    logic [2:0] nat;
    for (int k = 4; k > 0; k--) b0h[k] = b0h[k - 1];
    for (int k = 2; k > 0; k--) b1h[k] = b1h[k - 1];
    b0h[0] = d[0]; b1h[0] = d[1];
    tp = {b1h[0], b1h[1], b1h[2], b0h[0], b0h[1], b0h[2], b0h[3], b0h[4]};
    for (int k = 0; k < 4; k++) c[k] = ^(cfg[k] & tp);
    nat = {c[2], c[1], c[0]};
    @(negedge clk); din_we = 1; din = d; @(negedge clk); din_we = 0;
    checks += 4;
    if (bin0 != {mg, nat, 5'd0}) begin failures++; $display("bin0 %h exp %h", bin0, {mg, nat, 5'd0}); end
    if (gray0 != {mg, to_nat(nat), 5'd0}) begin failures++; $display("gray0 %h", gray0); end
    if (bin1 != {mg, c[3], 7'd0}) begin failures++; $display("bin1 %h", bin1); end
    if (gray1 != {mg, c[3], 7'd0}) begin failures++; $display("gray1 %h", gray1); end
  endtask
  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    foreach (b0h[k]) b0h[k] = 0;
    foreach (b1h[k]) b1h[k] = 0;
    foreach (cfg[k]) cfg[k] = 0;
    mg = 8'hC8;
    @(negedge clk); mag_we = 1; mag_data = mg; @(negedge clk); mag_we = 0;
    for (int r = 0; r < 20; r++) begin
      for (int k = 0; k < 4; k++) wcfg(k, 8'($urandom));
      for (int n = 0; n < 40; n++) step(2'($urandom));
    end
    wcfg(0, 8'h00); wcfg(1, 8'b0001_1011); wcfg(2, 8'b0001_0111); wcfg(3, 8'b0001_1011);
    for (int n = 0; n < 100; n++) step(2'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
