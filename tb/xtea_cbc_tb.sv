// xtea_cbc_tb: two-block CBC encryption and decryption against the reference
// model, for the chained (Fig. 2) unit and the unchained parallel variant,
// plus the single-block mode. Checks latencies: 129 clocks for decryption,
// single-block and parallel encryption, 258 for chained encryption.
module xtea_cbc_tb;
  import xtea_ref_pkg::*;
  logic clk = 0, rst = 1;
  logic start [2], dec = 0, single = 0, busy [2], done [2];
  logic [127:0] key, din, dout [2];
  logic [63:0]  iv;
  int checks = 0, failures = 0;

  xtea_cbc #(.CHAIN_ENC(1'b1)) dut_c (.clk, .rst, .start(start[0]), .dec, .single, .key, .iv,
                                      .din, .dout(dout[0]), .busy(busy[0]), .done(done[0]));
  xtea_cbc #(.CHAIN_ENC(1'b0)) dut_p (.clk, .rst, .start(start[1]), .dec, .single, .key, .iv,
                                      .din, .dout(dout[1]), .busy(busy[1]), .done(done[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(input int u, input bit d, input bit s, input logic [127:0] x,
                    input logic [127:0] exp, input int exp_lat);
    int lat;
    @(negedge clk);
    dec = d; single = s; din = x; start[u] = 1;
    @(negedge clk);
    start[u] = 0;
    lat = 0;
    while (!done[u]) begin @(negedge clk); lat++; end
    checks += 2;
    if (dout[u] !== exp) begin
      failures++;
      $display("FAIL unit=%0d dec=%0d single=%0d din=%h dout=%h exp=%h", u, d, s, x, dout[u], exp);
    end
    if (lat != exp_lat) begin
      failures++;
      $display("FAIL unit=%0d dec=%0d latency %0d expected %0d", u, d, lat, exp_lat);
    end
  endtask

  initial begin
    logic [127:0] p, c;
    start[0] = 0; start[1] = 0;
    key = 0; iv = 0; din = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 12; i++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      iv  = (i == 0) ? 64'h0 : {$urandom, $urandom};
      p   = {$urandom, $urandom, $urandom, $urandom};
      // chained unit
      c = ref_cbc_enc(key, iv, p, 1);
      op(0, 0, 0, p, c, 258);
      op(0, 1, 0, c, p, 129);
      // parallel unit: encryption unchained, decryption is true CBC
      c = ref_cbc_enc(key, iv, p, 0);
      op(1, 0, 0, p, c, 129);
      op(1, 1, 0, c, ref_cbc_dec(key, iv, c), 129);
      // single block
      op(0, 0, 1, p, {ref_enc(key, p[127:64]), 64'h0}, 129);
      op(0, 1, 1, p, {ref_dec(key, p[127:64]), 64'h0}, 129);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
