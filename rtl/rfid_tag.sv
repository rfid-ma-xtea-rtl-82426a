// rfid_tag: tag side of the RFID identification and mutual authentication.
//
// The tag owns three rng64 generators (secure identity SI, nonces RN1 and
// RN3) and one xtea_cbc unit, used only for encryption. It answers the
// reader's messages in a fixed order:
//   1. id_req:    SI = RNG; CT = XTEA_Enc(SI); send {SI, CT} (id_valid).
//   2. rng_req:   RN1 = RNG; send RN1 (rn1_valid).
//   3. chg_valid: TC = CBC_Enc(CHG); RN3 = RNG;
//                 if TC[127:64] (TC1) == RN1 the reader is authenticated
//                 (reader_auth = 1), TR = CBC_Enc(RN3 || TC1), send TR
//                 (rsp_valid); otherwise send nak and stop.
// A new id_req starts a new session and clears reader_auth; it is accepted
// in every state where the tag waits for the reader (idle, waiting for
// rng_req, waiting for the challenge), so a reader that gave up after a
// failed identification can start again.
//
// Link protocol (this design's choice, not given by the document): every
// message is a one-clock pulse with its data valid in the same clock; data
// outputs hold until overwritten. Requests that arrive out of order are
// ignored.
// Timing: from chg_valid, reader_auth rises after about 2*(4*ROUNDS/2) +
// RNG_STEPS clocks with CHAIN_ENC = 1.
// The message contents and the check follow the document's algorithm and
// message-flow figure; sending SI in clear next to CT during identification
// is this design's reading of an under-specified step.
module rfid_tag
  import xtea_pkg::*;
#(
  parameter int unsigned ROUNDS    = 64,
  parameter bit          CHAIN_ENC = 1'b1,
  parameter int unsigned RNG_STEPS = 30,
  parameter logic [63:0] SEED_SI   = 64'h0123_4567_89AB_CDEF,
  parameter logic [63:0] SEED_RN1  = 64'h0,
  parameter logic [63:0] SEED_RN3  = 64'h0
) (
  input  logic    clk,
  input  logic    rst,
  input  key_t    key,
  input  block_t  iv,
  // from reader
  input  logic    id_req,
  input  logic    rng_req,
  input  logic    chg_valid,
  input  dblock_t chg,
  // to reader
  output logic    id_valid,
  output block_t  si,
  output block_t  ct,
  output logic    rn1_valid,
  output block_t  rn1,
  output logic    rsp_valid,
  output logic    nak,
  output dblock_t rsp,
  // observation
  output block_t  rn3,
  output dblock_t tc,
  output logic    reader_auth
);

  typedef enum logic [3:0] {
    T_IDLE, T_SI, T_CT, T_WAIT_RNG, T_RN1, T_WAIT_CHG, T_TC, T_RN3,
    T_CHECK, T_RSP
  } tstate_e;
  tstate_e st;

  // random number generators
  logic   si_req, rn1_req, rn3_req;
  logic   si_ok, rn1_ok, rn3_ok;
  block_t si_rn, rn1_rn, rn3_rn;
  logic   si_busy, rn1_busy, rn3_busy;

  rng64 #(.SEED(SEED_SI),  .STEPS(RNG_STEPS)) u_rng_si  (.clk(clk), .rst(rst), .req(si_req),  .rn(si_rn),  .valid(si_ok),  .busy(si_busy));
  rng64 #(.SEED(SEED_RN1), .STEPS(RNG_STEPS)) u_rng_rn1 (.clk(clk), .rst(rst), .req(rn1_req), .rn(rn1_rn), .valid(rn1_ok), .busy(rn1_busy));
  rng64 #(.SEED(SEED_RN3), .STEPS(RNG_STEPS)) u_rng_rn3 (.clk(clk), .rst(rst), .req(rn3_req), .rn(rn3_rn), .valid(rn3_ok), .busy(rn3_busy));

  // cipher
  logic    c_start, c_single, c_busy, c_done;
  dblock_t c_din, c_dout;

  xtea_cbc #(.ROUNDS(ROUNDS), .CHAIN_ENC(CHAIN_ENC)) u_cbc (
    .clk(clk), .rst(rst), .start(c_start), .dec(1'b0), .single(c_single),
    .key(key), .iv(iv), .din(c_din), .dout(c_dout), .busy(c_busy), .done(c_done)
  );

  logic wait_st;
  assign wait_st = (st == T_IDLE) || (st == T_WAIT_RNG) || (st == T_WAIT_CHG);

  // requests to the sub-units, decoded from the state
  always_comb begin
    si_req   = wait_st && id_req;
    rn1_req  = (st == T_WAIT_RNG) && rng_req && !id_req;
    rn3_req  = (st == T_TC) && c_done;
    c_start  = 1'b0;
    c_single = 1'b0;
    c_din    = '0;
    unique case (st)
      T_SI:       if (si_ok)     begin c_start = 1'b1; c_single = 1'b1; c_din = {si_rn, 64'h0}; end
      T_WAIT_CHG: if (chg_valid && !id_req) begin c_start = 1'b1; c_din = chg; end
      T_CHECK:    if (tc[127:64] == rn1) begin c_start = 1'b1; c_din = {rn3, tc[127:64]}; end
      default: ;
    endcase
  end

  // sub-units are only started when idle
  start_when_idle: assert property (@(posedge clk) disable iff (rst)
    !(si_req && si_busy) && !(rn1_req && rn1_busy) && !(rn3_req && rn3_busy) && !(c_start && c_busy));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st          <= T_IDLE;
      id_valid    <= 1'b0;
      rn1_valid   <= 1'b0;
      rsp_valid   <= 1'b0;
      nak         <= 1'b0;
      si          <= '0;
      ct          <= '0;
      rn1         <= '0;
      rn3         <= '0;
      tc          <= '0;
      rsp         <= '0;
      reader_auth <= 1'b0;
    end else begin
      id_valid  <= 1'b0;
      rn1_valid <= 1'b0;
      rsp_valid <= 1'b0;
      nak       <= 1'b0;
      if (wait_st && id_req) begin
        reader_auth <= 1'b0;
        st          <= T_SI;
      end else unique case (st)
        T_IDLE: ;
        T_SI: if (si_ok) begin
          si <= si_rn;
          st <= T_CT;
        end
        T_CT: if (c_done) begin
          ct       <= c_dout[127:64];
          id_valid <= 1'b1;
          st       <= T_WAIT_RNG;
        end
        T_WAIT_RNG: if (rng_req) st <= T_RN1;
        T_RN1: if (rn1_ok) begin
          rn1       <= rn1_rn;
          rn1_valid <= 1'b1;
          st        <= T_WAIT_CHG;
        end
        T_WAIT_CHG: if (chg_valid) st <= T_TC;
        T_TC: if (c_done) begin
          tc <= c_dout;
          st <= T_RN3;
        end
        T_RN3: if (rn3_ok) begin
          rn3 <= rn3_rn;
          st  <= T_CHECK;
        end
        T_CHECK: begin
          if (tc[127:64] == rn1) begin
            reader_auth <= 1'b1;
            st          <= T_RSP;
          end else begin
            nak <= 1'b1;
            st  <= T_IDLE;
          end
        end
        T_RSP: if (c_done) begin
          rsp       <= c_dout;
          rsp_valid <= 1'b1;
          st        <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end

endmodule
