// xtea_cbc: two-block XTEA in cipher block chaining mode (Fig. 2).
//
// Two xtea_core instances share one 128-bit key. A request carries two
// 64-bit blocks, block 1 in din[127:64] and block 2 in din[63:0]; the result
// has the same layout.
//   Decryption: P1 = Dec(C1) ^ IV, P2 = Dec(C2) ^ C1. Both cores run in
//     parallel, so the request takes 4*CYCLES+1 clocks (129).
//   Encryption, CHAIN_ENC = 1 (Fig. 2(a)): C1 = Enc(P1 ^ IV), then
//     C2 = Enc(P2 ^ C1). Block 2 waits for block 1: 2*(4*CYCLES)+2 clocks.
//   Encryption, CHAIN_ENC = 0: C1 = Enc(P1 ^ IV), C2 = Enc(P2 ^ IV), both in
//     parallel, 4*CYCLES+1 clocks. This is the behaviour the document's
//     simulation values and per-step times point to (two blocks processed
//     "in parallel"); it is kept as an option because it is not true CBC.
//   single = 1: plain one-block XTEA of din[127:64] with no IV, result in
//     dout[127:64] and dout[63:0] = 0. Used for tag identification.
//
// Interface: pulse `start` while `busy` is low with `dec`, `single`, `iv` and
// `din` valid; `key` must stay stable while busy. `done` pulses one clock
// with `dout` valid; dout holds until the next start.
// The chaining structure follows the document; the handshake, the block
// layout and the single-block mode are this design's choices.
module xtea_cbc
  import xtea_pkg::*;
#(
  parameter int unsigned ROUNDS    = 64,
  parameter bit          CHAIN_ENC = 1'b1
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    start,
  input  logic    dec,
  input  logic    single,
  input  key_t    key,
  input  block_t  iv,
  input  dblock_t din,
  output dblock_t dout,
  output logic    busy,
  output logic    done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_RUN2} state_e;
  state_e st;

  logic    go;
  logic    a_start, b_start, a_busy, b_busy, a_done, b_done;
  block_t  a_din, b_din, a_dout, b_dout;
  logic    dec_q, single_q;
  block_t  iv_q, c1_q, p2_q;
  logic    a_fin, b_fin;   // core finished in this request

  assign go = start && (st == S_IDLE);

  // core A: block 1; core B: block 2
  always_comb begin
    a_start = go;
    if (dec)         a_din = din[127:64];
    else if (single) a_din = din[127:64];
    else             a_din = din[127:64] ^ iv;

    b_start = 1'b0;
    b_din   = '0;
    if (go && !single && (dec || !CHAIN_ENC)) begin
      b_start = 1'b1;
      b_din   = dec ? din[63:0] : (din[63:0] ^ iv);
    end else if (st == S_RUN2 && (a_fin || a_done) && !b_fin) begin
      // chained encryption: second block once the first is out
      b_start = 1'b1;
      b_din   = p2_q ^ a_dout;
    end
  end

  xtea_core #(.ROUNDS(ROUNDS)) u_a (
    .clk(clk), .rst(rst), .start(a_start), .ed(dec), .key(key),
    .din(a_din), .dout(a_dout), .busy(a_busy), .done(a_done)
  );

  xtea_core #(.ROUNDS(ROUNDS)) u_b (
    .clk(clk), .rst(rst), .start(b_start), .ed(go ? dec : dec_q),
    .key(key), .din(b_din), .dout(b_dout), .busy(b_busy), .done(b_done)
  );

  assign busy = (st != S_IDLE);

  // a core is only started when it is idle
  a_idle_on_start: assert property (@(posedge clk) disable iff (rst) a_start |-> !a_busy);
  b_idle_on_start: assert property (@(posedge clk) disable iff (rst) b_start |-> !b_busy);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      st       <= S_IDLE;
      dec_q    <= 1'b0;
      single_q <= 1'b0;
      iv_q     <= '0;
      c1_q     <= '0;
      p2_q     <= '0;
      a_fin    <= 1'b0;
      b_fin    <= 1'b0;
      dout     <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (go) begin
          dec_q    <= dec;
          single_q <= single;
          iv_q     <= iv;
          c1_q     <= din[127:64];
          p2_q     <= din[63:0];
          a_fin    <= 1'b0;
          b_fin    <= 1'b0;
          st       <= (!dec && !single && CHAIN_ENC) ? S_RUN2 : S_RUN;
        end
        S_RUN: begin
          // parallel: both cores (or core A only for single)
          if (a_done) a_fin <= 1'b1;
          if (b_done) b_fin <= 1'b1;
          if ((a_fin || a_done) && (single_q || b_fin || b_done)) begin
            st   <= S_IDLE;
            done <= 1'b1;
            if (single_q)
              dout <= {a_dout, 64'h0};
            else if (dec_q)
              dout <= {a_dout ^ iv_q, b_dout ^ c1_q};
            else
              dout <= {a_dout, b_dout};
          end
        end
        S_RUN2: begin
          if (a_done)  a_fin <= 1'b1;
          if (b_start) b_fin <= 1'b1;   // here b_fin marks block 2 as started
          if (b_done) begin
            st   <= S_IDLE;
            done <= 1'b1;
            dout <= {a_dout, b_dout};
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
