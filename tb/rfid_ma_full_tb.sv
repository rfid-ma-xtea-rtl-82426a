// rfid_ma_full_tb: one complete session of the top at its default
// parameters: tag identification, then mutual authentication with a
// published XTEA key and IV = 0. Every observable is compared with the
// reference model, and the clock at which each step's result appears is
// recorded and checked against the latency of the unit that produced it:
// 31 clocks per generator run, 129 per CBC decryption, 258 per chained CBC
// encryption, one clock per authentication decision, each with up to 3
// clocks more for message hops (6 for the identification exchange). The
// step times are also printed in microseconds for a 20 ns clock.
module rfid_ma_full_tb;
  import xtea_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  logic [127:0] reader_key, tag_key;
  logic [63:0]  reader_iv, tag_iv;
  logic done, busy, tag_id_ok, reader_auth, tag_auth;
  logic [63:0]  sid, sct, rg1, rg2, rg3;
  logic [127:0] rch, tch, trs, rrs;
  int checks = 0, failures = 0;
  int cyc = 0;
  int t_rg1 = -1, t_rg2 = -1, t_rch = -1, t_tch = -1, t_rg3 = -1, t_rda = -1;
  int t_trs = -1, t_rrs = -1, t_tga = -1, t_id = -1;

  rfid_ma_top dut (
    .clk, .rst, .start, .reader_key, .tag_key, .reader_iv, .tag_iv,
    .done, .busy, .tag_id_ok, .reader_auth, .tag_auth,
    .secure_id(sid), .secure_id_ct(sct), .random_gen1(rg1), .random_gen2(rg2),
    .random_gen3(rg3), .reader_challenge(rch), .tag_challenge(tch),
    .tag_response(trs), .reader_response(rrs));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // first clock at which each result appears, counted from start
  always @(negedge clk) begin
    cyc <= cyc + 1;
    if (t_id  < 0 && tag_id_ok)    t_id  <= cyc;
    if (t_rg1 < 0 && rg1 != 0)     t_rg1 <= cyc;
    if (t_rg2 < 0 && rg2 != 0)     t_rg2 <= cyc;
    if (t_rch < 0 && rch != 0)     t_rch <= cyc;
    if (t_tch < 0 && tch != 0)     t_tch <= cyc;
    if (t_rg3 < 0 && rg3 != 0)     t_rg3 <= cyc;
    if (t_rda < 0 && reader_auth)  t_rda <= cyc;
    if (t_trs < 0 && trs != 0)     t_trs <= cyc;
    if (t_rrs < 0 && rrs != 0)     t_rrs <= cyc;
    if (t_tga < 0 && tag_auth)     t_tga <= cyc;
  end

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic step(input string name, input int from, input int to, input int lat,
                     input int slack = 3);
    expect_true(from >= 0 && to >= 0 && (to - from) >= lat && (to - from) <= lat + slack,
                $sformatf("%s took %0d clocks, expected %0d", name, to - from, lat));
    $display("  %-34s %4d clocks  %6.3f us", name, to - from, (to - from) * 0.02);
  endtask

  initial begin
    logic [63:0]  rn, si;
    logic [127:0] chg, tc, tr, rr;
    reader_key = 128'h0C0D0E0F_08090A0B_04050607_00010203;
    tag_key = reader_key;
    reader_iv = 0; tag_iv = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    cyc = 0;
    start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    @(negedge clk);
    si  = ref_lfsr(64'h0123_4567_89AB_CDEF, 30);
    rn  = ref_lfsr(64'h0, 30);
    chg = ref_cbc_dec(reader_key, reader_iv, {rn, rn});
    tc  = ref_cbc_enc(tag_key, tag_iv, chg, 1);
    tr  = ref_cbc_enc(tag_key, tag_iv, {rn, tc[127:64]}, 1);
    rr  = ref_cbc_dec(reader_key, reader_iv, tr);
    expect_true(rn == 64'h0000_0000_3FFF_FFFF, "generator value from zero seed");
    expect_true(sid == si && sct == ref_enc(tag_key, si), "secure identity and its ciphertext");
    expect_true(rg1 == rn && rg2 == rn && rg3 == rn, "RN1, RN2, RN3");
    expect_true(rch == chg, "reader challenge");
    expect_true(tch == tc, "tag challenge");
    expect_true(tch[127:64] == rn, "TC1 = RN1");
    expect_true(trs == tr, "tag response");
    expect_true(rrs == rr, "reader response");
    expect_true(rrs[127:64] == rn, "RR1 = RN2");
    expect_true(tag_id_ok && reader_auth && tag_auth, "identification and both authentications");
    $display("step times:");
    step("tag identification",               0,     t_id,  31 + 129 + 129, 6);
    step("RN1 generation",                   t_id,  t_rg1, 31);
    step("RN2 generation",                   t_rg1, t_rg2, 31);
    step("reader challenge (CBC decrypt)",   t_rg2, t_rch, 129);
    step("tag challenge (CBC encrypt)",      t_rch, t_tch, 258);
    step("RN3 generation",                   t_tch, t_rg3, 31);
    step("reader authenticated",             t_rg3, t_rda, 1);
    step("tag response (CBC encrypt)",       t_rda, t_trs, 258);
    step("reader response (CBC decrypt)",    t_trs, t_rrs, 129);
    step("tag authenticated",                t_rrs, t_tga, 1);
    $display("  %-34s %4d clocks  %6.3f us", "mutual authentication", t_tga - t_id, (t_tga - t_id) * 0.02);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
