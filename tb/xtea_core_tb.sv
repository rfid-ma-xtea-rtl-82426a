// xtea_core_tb: XTEA block cipher against two published known-answer
// vectors and the reference model, both directions, with a latency check of
// 4 clocks per cycle (128 clocks for 64 rounds).
module xtea_core_tb;
  import xtea_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0, ed = 0, busy, done;
  logic [127:0] key;
  logic [63:0]  din, dout;
  int checks = 0, failures = 0;

  xtea_core #(.ROUNDS(64)) dut (.clk, .rst, .start, .ed, .key, .din, .dout, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(input bit dir, input logic [127:0] k, input logic [63:0] d,
                    input logic [63:0] exp);
    int lat = 0;
    @(negedge clk);
    ed = dir; key = k; din = d; start = 1;
    @(negedge clk);
    start = 0; din = {$urandom, $urandom};   // inputs are sampled at start only
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    checks += 2;
    if (dout !== exp) begin
      failures++;
      $display("FAIL ed=%0d din=%h dout=%h exp=%h", dir, d, dout, exp);
    end
    if (lat != 128) begin
      failures++;
      $display("FAIL latency %0d, expected 128", lat);
    end
  endtask

  initial begin
    logic [127:0] k;
    logic [63:0]  p, c;
    key = 0; din = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    // published XTEA vectors, words as {v1, v0}
    op(0, 128'h0, 64'h0, 64'hF7131ED9_DEE9D4D8);
    op(0, 128'h0C0D0E0F_08090A0B_04050607_00010203, 64'h45464748_41424344,
       64'h72612CB5_497DF3D0);
    op(1, 128'h0C0D0E0F_08090A0B_04050607_00010203, 64'h72612CB5_497DF3D0,
       64'h45464748_41424344);
    for (int i = 0; i < 40; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom};
      c = ref_enc(k, p);
      op(0, k, p, c);
      op(1, k, c, p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
