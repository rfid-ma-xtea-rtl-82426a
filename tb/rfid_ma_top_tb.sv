// rfid_ma_top_tb: end-to-end sessions of reader and tag through the top.
// Three tops run side by side:
//   u=0 defaults (chained CBC encryption);
//   u=1 CHAIN_ENC = 0, the unchained parallel encryption, and 60 generator
//       steps, so RN1 = RN2 = RN3 = 0x0FFFFFFFFFFFFFFF as in the document's
//       simulation; with IV = 0 it must also show that simulation's value
//       relations: Tag_Challenge1 = Random_Gen1, Tag_Response1 =
//       Tag_Response2, Reader_Response1 = Random_Gen2 and Reader_Response2 =
//       Random_Gen2 ^ Tag_Response1;
//   u=2 RN3 seed differs from RN2, so the reader's check RR1 == RN2 fails.
// Every observable is compared with the reference model. Sessions with a
// tag IV that differs from the reader's (reader authentication fails, nak)
// and with a wrong tag key (identification fails) are included, and each
// outcome is counted; an outcome that never happens counts as a failure.
// Session lengths are checked against the clock counts of the datapath.
module rfid_ma_top_tb;
  import xtea_ref_pkg::*;
  localparam int N = 3;
  localparam logic [63:0] SEED_SI = 64'h0123_4567_89AB_CDEF;
  localparam logic [63:0] SEED_RN3_ALT = 64'h5555_0000_AAAA_0000;

  logic clk = 0, rst = 1;
  logic start [N];
  logic [127:0] reader_key, tag_key;
  logic [63:0]  reader_iv, tag_iv;
  logic done [N], busy [N], tag_id_ok [N], reader_auth [N], tag_auth [N];
  logic [63:0]  sid [N], sct [N], rg1 [N], rg2 [N], rg3 [N];
  logic [127:0] rch [N], tch [N], trs [N], rrs [N];
  int checks = 0, failures = 0;
  int n_id_ok = 0, n_id_fail = 0, n_rd_ok = 0, n_rd_fail = 0, n_tg_ok = 0, n_tg_fail = 0;
  int n_chain = 0, n_par = 0;

  rfid_ma_top u0 (
    .clk, .rst, .start(start[0]), .reader_key, .tag_key, .reader_iv, .tag_iv,
    .done(done[0]), .busy(busy[0]), .tag_id_ok(tag_id_ok[0]), .reader_auth(reader_auth[0]),
    .tag_auth(tag_auth[0]), .secure_id(sid[0]), .secure_id_ct(sct[0]),
    .random_gen1(rg1[0]), .random_gen2(rg2[0]), .random_gen3(rg3[0]),
    .reader_challenge(rch[0]), .tag_challenge(tch[0]), .tag_response(trs[0]),
    .reader_response(rrs[0]));
  rfid_ma_top #(.CHAIN_ENC(1'b0), .RNG_STEPS(60)) u1 (
    .clk, .rst, .start(start[1]), .reader_key, .tag_key, .reader_iv, .tag_iv,
    .done(done[1]), .busy(busy[1]), .tag_id_ok(tag_id_ok[1]), .reader_auth(reader_auth[1]),
    .tag_auth(tag_auth[1]), .secure_id(sid[1]), .secure_id_ct(sct[1]),
    .random_gen1(rg1[1]), .random_gen2(rg2[1]), .random_gen3(rg3[1]),
    .reader_challenge(rch[1]), .tag_challenge(tch[1]), .tag_response(trs[1]),
    .reader_response(rrs[1]));
  rfid_ma_top #(.SEED_RN3(SEED_RN3_ALT)) u2 (
    .clk, .rst, .start(start[2]), .reader_key, .tag_key, .reader_iv, .tag_iv,
    .done(done[2]), .busy(busy[2]), .tag_id_ok(tag_id_ok[2]), .reader_auth(reader_auth[2]),
    .tag_auth(tag_auth[2]), .secure_id(sid[2]), .secure_id_ct(sct[2]),
    .random_gen1(rg1[2]), .random_gen2(rg2[2]), .random_gen3(rg3[2]),
    .reader_challenge(rch[2]), .tag_challenge(tch[2]), .tag_response(trs[2]),
    .reader_response(rrs[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // model state per top: generator states
  logic [63:0] m_si [N], m_rn [N], m_rn3 [N];

  // run one session on top u; kind: 0 normal, 1 tag IV differs, 2 tag key differs
  task automatic session(input int u, input int kind);
    logic [127:0] chg, tc, tr, rr;
    logic [63:0]  rn3;
    bit chain = (u != 1);
    int cyc = 0, exp_cyc;
    int steps;
    logic [63:0] tiv;
    logic [127:0] tkey;
    tiv  = (kind == 1) ? ~reader_iv : reader_iv;
    tkey = (kind == 2) ? ~reader_key : reader_key;
    tag_iv = tiv; tag_key = tkey;
    @(negedge clk); start[u] = 1;
    @(negedge clk); start[u] = 0;
    while (!done[u]) begin @(negedge clk); cyc++; end
    steps = (u == 1) ? 60 : 30;
    m_si[u] = ref_lfsr(m_si[u], steps);
    expect_true(sid[u] == m_si[u] && sct[u] == ref_enc(tkey, m_si[u]), $sformatf("u%0d SI/CT", u));
    if (kind == 2) begin
      expect_true(!tag_id_ok[u] && !reader_auth[u] && !tag_auth[u], $sformatf("u%0d wrong key rejected", u));
      n_id_fail++;
      return;
    end
    expect_true(tag_id_ok[u], $sformatf("u%0d tag identified", u));
    n_id_ok++;
    m_rn[u]  = ref_lfsr(m_rn[u], steps);
    m_rn3[u] = ref_lfsr(m_rn3[u], steps);
    expect_true(rg1[u] == m_rn[u] && rg2[u] == m_rn[u] && rg3[u] == m_rn3[u], $sformatf("u%0d RN1..3", u));
    chg = ref_cbc_dec(reader_key, reader_iv, {m_rn[u], m_rn[u]});
    tc  = ref_cbc_enc(tkey, tiv, chg, chain);
    expect_true(rch[u] == chg, $sformatf("u%0d reader challenge", u));
    expect_true(tch[u] == tc, $sformatf("u%0d tag challenge", u));
    if (kind == 1) begin
      expect_true(!reader_auth[u] && !tag_auth[u], $sformatf("u%0d IV mismatch rejected", u));
      n_rd_fail++;
      return;
    end
    expect_true(reader_auth[u], $sformatf("u%0d reader authenticated", u));
    n_rd_ok++;
    if (chain) n_chain++; else n_par++;
    tr = ref_cbc_enc(tkey, tiv, {m_rn3[u], tc[127:64]}, chain);
    rr = ref_cbc_dec(reader_key, reader_iv, tr);
    expect_true(trs[u] == tr, $sformatf("u%0d tag response", u));
    expect_true(rrs[u] == rr, $sformatf("u%0d reader response", u));
    expect_true(tag_auth[u] == (m_rn3[u] == m_rn[u]), $sformatf("u%0d tag_auth", u));
    if (tag_auth[u]) n_tg_ok++; else n_tg_fail++;
    if (u == 1 && reader_iv == 0) begin
      expect_true(rg1[u] == 64'h0FFF_FFFF_FFFF_FFFF, "Fig.5 value of Random_Gen1");
      expect_true(tch[u][127:64] == rg1[u], "Fig.5 relation TC1 = RN1");
      expect_true(trs[u][127:64] == trs[u][63:0], "Fig.5 relation TR1 = TR2");
      expect_true(rrs[u][127:64] == rg2[u], "Fig.5 relation RR1 = RN2");
      expect_true(rrs[u][63:0] == (rg2[u] ^ trs[u][127:64]), "Fig.5 relation RR2 = RN2 ^ TR1");
    end
    // identification: SI steps+1 + CT 129 + decryption 129;
    // mutual authentication: RN1, RN2, RN3 steps+1 each + CHG 129 + TC + check 1
    //   + TR + RR 129 + check 1, where TC and TR take 258 chained, 129 parallel;
    // plus 16 clocks of message hops and state hand-overs
    exp_cyc = ((steps + 1) + 129 + 129) + (3 * (steps + 1) + 129 + 1 + 129 + 1)
            + 2 * (chain ? 258 : 129) + 16;
    expect_true(cyc >= exp_cyc - 2 && cyc <= exp_cyc + 2,
                $sformatf("u%0d session took %0d clocks, expected about %0d", u, cyc, exp_cyc));
    $display("u%0d session: %0d clocks (%0.3f us at a 20 ns clock)", u, cyc, cyc * 0.02);
  endtask

  initial begin
    for (int u = 0; u < N; u++) begin
      start[u] = 0; m_si[u] = SEED_SI; m_rn[u] = 0; m_rn3[u] = 0;
    end
    m_rn3[2] = SEED_RN3_ALT;
    reader_key = {$urandom, $urandom, $urandom, $urandom};
    tag_key = reader_key;
    reader_iv = 0; tag_iv = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    session(0, 0);
    session(1, 0);
    session(2, 0);
    session(0, 1);
    session(0, 2);
    reader_key = {$urandom, $urandom, $urandom, $urandom};
    reader_iv = {$urandom, $urandom};
    session(0, 0);
    session(1, 0);
    expect_true(n_id_ok > 0,   "mechanism: identification success");
    expect_true(n_id_fail > 0, "mechanism: identification failure");
    expect_true(n_rd_ok > 0,   "mechanism: reader authentication success");
    expect_true(n_rd_fail > 0, "mechanism: reader authentication failure (nak)");
    expect_true(n_tg_ok > 0,   "mechanism: tag authentication success");
    expect_true(n_tg_fail > 0, "mechanism: tag authentication failure");
    expect_true(n_chain > 0,   "mechanism: chained CBC encryption");
    expect_true(n_par > 0,     "mechanism: parallel encryption");
    $display("counts: id ok %0d fail %0d, reader auth ok %0d fail %0d, tag auth ok %0d fail %0d, chained %0d, parallel %0d",
             n_id_ok, n_id_fail, n_rd_ok, n_rd_fail, n_tg_ok, n_tg_fail, n_chain, n_par);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
