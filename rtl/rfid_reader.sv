// rfid_reader: reader side of the RFID identification and mutual
// authentication.
//
// The reader owns one rng64 (nonce RN2) and one xtea_cbc unit, used only for
// decryption. Pulsing `start` runs one session:
//   1. send id_req; on {SI, CT}: if XTEA_Dec(CT) == SI the tag is identified
//      (tag_id_ok = 1), otherwise the session ends here.
//   2. send rng_req; on RN1: RN2 = RNG; CHG = CBC_Dec(RN1 || RN2); send CHG.
//   3. on the tag response TR: RR = CBC_Dec(TR); the tag is authenticated
//      (tag_auth = 1) if RR[127:64] (RR1) == RN2. On nak the session ends
//      with tag_auth = 0.
// `done` pulses at the end of every session; tag_id_ok and tag_auth hold
// until the next start.
//
// Note on the check in step 3: decryption returns RR1 = RN3, the tag's own
// nonce, so RR1 == RN2 holds only when the tag's RN3 generator yields the
// same number as the reader's RN2 generator, as in the document's own
// simulation where all three generators give one value. The check is kept
// as the document states it.
//
// Link protocol as in rfid_tag: one-clock pulses with data in the same clock.
// The message order and both checks follow the document; the handshake and
// the identification message layout are this design's choices.
module rfid_reader
  import xtea_pkg::*;
#(
  parameter int unsigned ROUNDS    = 64,
  parameter bit          CHAIN_ENC = 1'b1,
  parameter int unsigned RNG_STEPS = 30,
  parameter logic [63:0] SEED_RN2  = 64'h0
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  key_t    key,
  input  block_t  iv,
  // to tag
  output logic    id_req,
  output logic    rng_req,
  output logic    chg_valid,
  output dblock_t chg,
  // from tag
  input  logic    id_valid,
  input  block_t  si,
  input  block_t  ct,
  input  logic    rn1_valid,
  input  block_t  rn1,
  input  logic    rsp_valid,
  input  logic    nak,
  input  dblock_t rsp,
  // results and observation
  output block_t  rn1_q,
  output block_t  rn2,
  output dblock_t rr,
  output logic    tag_id_ok,
  output logic    tag_auth,
  output logic    busy,
  output logic    done
);

  typedef enum logic [3:0] {
    R_IDLE, R_WAIT_ID, R_ID_DEC, R_WAIT_RN1, R_RN2, R_CHG, R_WAIT_RSP,
    R_RR, R_CHECK
  } rstate_e;
  rstate_e st;

  logic   rn2_req, rn2_ok, rn2_busy;
  block_t rn2_rn;

  rng64 #(.SEED(SEED_RN2), .STEPS(RNG_STEPS)) u_rng_rn2 (
    .clk(clk), .rst(rst), .req(rn2_req), .rn(rn2_rn), .valid(rn2_ok), .busy(rn2_busy)
  );

  logic    c_start, c_single, c_busy, c_done;
  dblock_t c_din, c_dout;
  block_t  si_q;

  // CHAIN_ENC only matters for encryption; the reader only decrypts
  xtea_cbc #(.ROUNDS(ROUNDS), .CHAIN_ENC(CHAIN_ENC)) u_cbc (
    .clk(clk), .rst(rst), .start(c_start), .dec(1'b1), .single(c_single),
    .key(key), .iv(iv), .din(c_din), .dout(c_dout), .busy(c_busy), .done(c_done)
  );

  always_comb begin
    rn2_req  = (st == R_WAIT_RN1) && rn1_valid;
    c_start  = 1'b0;
    c_single = 1'b0;
    c_din    = '0;
    unique case (st)
      R_WAIT_ID:  if (id_valid)  begin c_start = 1'b1; c_single = 1'b1; c_din = {ct, 64'h0}; end
      R_RN2:      if (rn2_ok)    begin c_start = 1'b1; c_din = {rn1_q, rn2_rn}; end
      R_WAIT_RSP: if (rsp_valid) begin c_start = 1'b1; c_din = rsp; end
      default: ;
    endcase
  end

  assign busy = (st != R_IDLE);

  // sub-units are only started when idle
  start_when_idle: assert property (@(posedge clk) disable iff (rst)
    !(rn2_req && rn2_busy) && !(c_start && c_busy));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st        <= R_IDLE;
      id_req    <= 1'b0;
      rng_req   <= 1'b0;
      chg_valid <= 1'b0;
      chg       <= '0;
      si_q      <= '0;
      rn1_q     <= '0;
      rn2       <= '0;
      rr        <= '0;
      tag_id_ok <= 1'b0;
      tag_auth  <= 1'b0;
      done      <= 1'b0;
    end else begin
      id_req    <= 1'b0;
      rng_req   <= 1'b0;
      chg_valid <= 1'b0;
      done      <= 1'b0;
      unique case (st)
        R_IDLE: if (start) begin
          tag_id_ok <= 1'b0;
          tag_auth  <= 1'b0;
          id_req    <= 1'b1;
          st        <= R_WAIT_ID;
        end
        R_WAIT_ID: if (id_valid) begin
          si_q <= si;
          st   <= R_ID_DEC;
        end
        R_ID_DEC: if (c_done) begin
          if (c_dout[127:64] == si_q) begin
            tag_id_ok <= 1'b1;
            rng_req   <= 1'b1;
            st        <= R_WAIT_RN1;
          end else begin
            done <= 1'b1;
            st   <= R_IDLE;
          end
        end
        R_WAIT_RN1: if (rn1_valid) begin
          rn1_q <= rn1;
          st    <= R_RN2;
        end
        R_RN2: if (rn2_ok) begin
          rn2 <= rn2_rn;
          st  <= R_CHG;
        end
        R_CHG: if (c_done) begin
          chg       <= c_dout;
          chg_valid <= 1'b1;
          st        <= R_WAIT_RSP;
        end
        R_WAIT_RSP: begin
          if (rsp_valid) st <= R_RR;
          else if (nak) begin
            done <= 1'b1;
            st   <= R_IDLE;
          end
        end
        R_RR: if (c_done) begin
          rr <= c_dout;
          st <= R_CHECK;
        end
        R_CHECK: begin
          tag_auth <= (rr[127:64] == rn2);
          done     <= 1'b1;
          st       <= R_IDLE;
        end
        default: st <= R_IDLE;
      endcase
    end
  end

endmodule
