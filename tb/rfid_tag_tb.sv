// rfid_tag_tb: plays the reader against one tag. Each session checks the
// identification reply (CT = XTEA(SI)), RN1 against the LFSR model, and the
// tag's answer to a challenge built by the reference model: with a correct
// challenge the tag must set reader_auth and return TR = CBC_Enc(RN3 || TC1);
// with a corrupted challenge it must answer nak and leave reader_auth low.
// A second identification request in mid-session must restart the tag.
// Also checks that the challenge-to-response time is two chained
// encryptions plus one generator run.
module rfid_tag_tb;
  import xtea_ref_pkg::*;
  logic clk = 0, rst = 1;
  logic [127:0] key, chg, rsp, tc;
  logic [63:0]  iv, si, ct, rn1, rn3;
  logic id_req = 0, rng_req = 0, chg_valid = 0;
  logic id_valid, rn1_valid, rsp_valid, nak, reader_auth;
  int checks = 0, failures = 0;
  localparam logic [63:0] SEED_SI = 64'h0123_4567_89AB_CDEF;

  rfid_tag dut (.clk, .rst, .key, .iv, .id_req, .rng_req, .chg_valid, .chg,
                .id_valid, .si, .ct, .rn1_valid, .rn1, .rsp_valid, .nak, .rsp,
                .rn3, .tc, .reader_auth);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1;
    @(negedge clk); s = 0;
  endtask

  initial begin
    logic [63:0]  rn_model, si_model, rn2;
    logic [127:0] c, exp_tc;
    int lat;
    bit good;
    key = {$urandom, $urandom, $urandom, $urandom};
    iv = 0; chg = 0;
    rn_model = 0; si_model = SEED_SI;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int sess = 0; sess < 4; sess++) begin
      good = (sess != 2);
      if (sess == 3) iv = {$urandom, $urandom};
      // identification
      pulse(id_req);
      while (!id_valid) @(negedge clk);
      si_model = ref_lfsr(si_model, 30);
      expect_true(si == si_model, "SI from generator");
      expect_true(ct == ref_enc(key, si), "CT = XTEA(SI)");
      // RN1
      pulse(rng_req);
      while (!rn1_valid) @(negedge clk);
      rn_model = ref_lfsr(rn_model, 30);
      expect_true(rn1 == rn_model, "RN1 from generator");
      // challenge from an independent reader nonce RN2
      rn2 = {$urandom, $urandom};
      c = ref_cbc_dec(key, iv, {rn1, rn2});
      if (!good) c[127:64] ^= 64'h1;
      @(negedge clk); chg = c; chg_valid = 1;
      @(negedge clk); chg_valid = 0;
      lat = 0;
      while (!rsp_valid && !nak) begin @(negedge clk); lat++; end
      exp_tc = ref_cbc_enc(key, iv, c, 1);
      expect_true(tc == exp_tc, "TC = CBC_Enc(CHG)");
      expect_true(rn3 == rn_model, "RN3 from generator");
      if (good) begin
        expect_true(rsp_valid && reader_auth, "reader authenticated");
        expect_true(rsp == ref_cbc_enc(key, iv, {rn3, exp_tc[127:64]}, 1), "TR = CBC_Enc(RN3||TC1)");
        // 2 chained encryptions (2*258) + generator (31) + check (1), +/- 2
        expect_true(lat >= 546 && lat <= 552, $sformatf("challenge to response %0d clocks", lat));
      end else begin
        expect_true(nak && !reader_auth, "bad challenge rejected");
      end
    end
    // restart: a second id_req while the tag waits for rng_req
    for (int r = 0; r < 2; r++) begin
      pulse(id_req);
      while (!id_valid) @(negedge clk);
      si_model = ref_lfsr(si_model, 30);
      expect_true(si == si_model && ct == ref_enc(key, si), "identification after restart");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
