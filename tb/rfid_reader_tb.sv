// rfid_reader_tb: plays the tag against one reader, built from the reference
// model. Sessions:
//   0 normal: tag_id_ok and tag_auth set, CHG = CBC_Dec(RN1||RN2) checked;
//   1 wrong CT in identification: session ends with tag_id_ok = 0;
//   2 tag answers nak: tag_auth = 0;
//   3 tag response built from an RN3 different from RN2: tag_auth = 0;
//   4..14 normal again, each with a random IV.
module rfid_reader_tb;
  import xtea_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0;
  logic [127:0] key, chg, rsp, rr;
  logic [63:0]  iv, si, ct, rn1, rn1_q, rn2;
  logic id_req, rng_req, chg_valid;
  logic id_valid = 0, rn1_valid = 0, rsp_valid = 0, nak = 0;
  logic tag_id_ok, tag_auth, busy, done;
  int checks = 0, failures = 0;

  rfid_reader dut (.clk, .rst, .start, .key, .iv, .id_req, .rng_req, .chg_valid, .chg,
                   .id_valid, .si, .ct, .rn1_valid, .rn1, .rsp_valid, .nak, .rsp,
                   .rn1_q, .rn2, .rr, .tag_id_ok, .tag_auth, .busy, .done);

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

  initial begin
    logic [63:0]  rn2_model, rn3;
    logic [127:0] tc, exp_chg;
    key = {$urandom, $urandom, $urandom, $urandom};
    iv = 0; si = 0; ct = 0; rn1 = 0; rsp = 0;
    rn2_model = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int sess = 0; sess < 15; sess++) begin
      if (sess >= 4) iv = {$urandom, $urandom};
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!id_req) @(negedge clk);
      // identification reply
      si = {$urandom, $urandom};
      ct = ref_enc(key, si);
      if (sess == 1) ct ^= 64'h8000_0000_0000_0000;
      @(negedge clk); id_valid = 1;
      @(negedge clk); id_valid = 0;
      if (sess == 1) begin
        while (!done) @(negedge clk);
        expect_true(!tag_id_ok && !tag_auth, "wrong CT rejected");
        continue;
      end
      while (!rng_req) @(negedge clk);
      expect_true(tag_id_ok, "tag identified");
      rn1 = {$urandom, $urandom};
      @(negedge clk); rn1_valid = 1;
      @(negedge clk); rn1_valid = 0;
      while (!chg_valid) @(negedge clk);
      rn2_model = ref_lfsr(rn2_model, 30);
      expect_true(rn2 == rn2_model, "RN2 from generator");
      exp_chg = ref_cbc_dec(key, iv, {rn1, rn2_model});
      expect_true(chg == exp_chg, "CHG = CBC_Dec(RN1||RN2)");
      // tag side
      tc  = ref_cbc_enc(key, iv, chg, 1);
      rn3 = (sess == 3) ? ~rn2_model : rn2_model;
      @(negedge clk);
      if (sess == 2) nak = 1;
      else begin
        rsp = ref_cbc_enc(key, iv, {rn3, tc[127:64]}, 1);
        rsp_valid = 1;
      end
      @(negedge clk); nak = 0; rsp_valid = 0;
      while (!done) @(negedge clk);
      if (sess == 0 || sess >= 4) begin
        expect_true(tag_auth, "tag authenticated");
        expect_true(rr == {rn3, tc[127:64]}, "RR = CBC_Dec(TR)");
      end else begin
        expect_true(!tag_auth, "tag rejected");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
