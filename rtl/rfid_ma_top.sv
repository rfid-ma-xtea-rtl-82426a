// rfid_ma_top: RFID reader and tag performing tag identification followed by
// XTEA-CBC mutual authentication.
//
// One rfid_reader and one rfid_tag are joined by a direct message link (no
// radio): id_req / {SI, CT}, rng_req / RN1, CHG, and TR or nak. Each side has
// its own 128-bit key and 64-bit IV input; authentication only succeeds when
// they match (a shared symmetric key, IV = 0 in the document's example).
// Pulse `start` to run one session; `done` pulses at its end with
// tag_id_ok, reader_auth (decided in the tag) and tag_auth (decided in the
// reader) valid. The observation outputs carry the values the document's
// simulation shows: Random_Gen1..3, Reader_Challenge1/2, Tag_Challenge1/2,
// Tag_Response1/2 and Reader_Response1/2 (each pair as one 128-bit word,
// "1" in the upper half).
//
// Timing with the defaults (64 rounds, CHAIN_ENC = 1, 30 LFSR steps) is
// 1,174 clocks per session: 295 for identification and 880 for the mutual
// authentication. CHAIN_ENC = 0 shortens each of the two tag encryptions by
// 129 clocks.
//
// The generator seeds default to equal values for RN1, RN2 and RN3, which is
// what lets the reader's check RR1 == RN2 succeed (see rfid_reader).
module rfid_ma_top
  import xtea_pkg::*;
#(
  parameter int unsigned ROUNDS    = 64,
  parameter bit          CHAIN_ENC = 1'b1,
  parameter int unsigned RNG_STEPS = 30,
  parameter logic [63:0] SEED_SI   = 64'h0123_4567_89AB_CDEF,
  parameter logic [63:0] SEED_RN1  = 64'h0,
  parameter logic [63:0] SEED_RN2  = 64'h0,
  parameter logic [63:0] SEED_RN3  = 64'h0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  key_t    reader_key,
  input  key_t    tag_key,
  input  block_t  reader_iv,
  input  block_t  tag_iv,
  output logic    done,
  output logic    busy,
  output logic    tag_id_ok,
  output logic    reader_auth,
  output logic    tag_auth,
  output block_t  secure_id,
  output block_t  secure_id_ct,
  output block_t  random_gen1,
  output block_t  random_gen2,
  output block_t  random_gen3,
  output dblock_t reader_challenge,
  output dblock_t tag_challenge,
  output dblock_t tag_response,
  output dblock_t reader_response
);

  logic    id_req, rng_req, chg_valid;
  logic    id_valid, rn1_valid, rsp_valid, nak;
  block_t  rn1_tag;
  block_t  rn1_rdr;

  rfid_reader #(
    .ROUNDS(ROUNDS), .CHAIN_ENC(CHAIN_ENC), .RNG_STEPS(RNG_STEPS), .SEED_RN2(SEED_RN2)
  ) u_reader (
    .clk(clk), .rst(rst), .start(start), .key(reader_key), .iv(reader_iv),
    .id_req(id_req), .rng_req(rng_req), .chg_valid(chg_valid), .chg(reader_challenge),
    .id_valid(id_valid), .si(secure_id), .ct(secure_id_ct),
    .rn1_valid(rn1_valid), .rn1(rn1_tag), .rsp_valid(rsp_valid), .nak(nak), .rsp(tag_response),
    .rn1_q(rn1_rdr), .rn2(random_gen2), .rr(reader_response),
    .tag_id_ok(tag_id_ok), .tag_auth(tag_auth), .busy(busy), .done(done)
  );

  rfid_tag #(
    .ROUNDS(ROUNDS), .CHAIN_ENC(CHAIN_ENC), .RNG_STEPS(RNG_STEPS),
    .SEED_SI(SEED_SI), .SEED_RN1(SEED_RN1), .SEED_RN3(SEED_RN3)
  ) u_tag (
    .clk(clk), .rst(rst), .key(tag_key), .iv(tag_iv),
    .id_req(id_req), .rng_req(rng_req), .chg_valid(chg_valid), .chg(reader_challenge),
    .id_valid(id_valid), .si(secure_id), .ct(secure_id_ct),
    .rn1_valid(rn1_valid), .rn1(rn1_tag), .rsp_valid(rsp_valid), .nak(nak), .rsp(tag_response),
    .rn3(random_gen3), .tc(tag_challenge), .reader_auth(reader_auth)
  );

  // RN1 as the tag generated it (Random_Gen1)
  assign random_gen1 = rn1_tag;

  // the challenge is always built from the RN1 the tag sent
  rn1_copy: assert property (@(posedge clk) disable iff (rst)
    chg_valid |-> (rn1_rdr == rn1_tag));

endmodule
