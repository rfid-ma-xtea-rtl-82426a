// xtea_key_sched: counter-driven XTEA key schedule (Fig. 1, Eq. (1)-(6)).
//
// Holds the running sum (A_e for encryption, A_d for decryption) and produces
// the registered 32-bit round key Kout for the round-function.
//   phase 00, encryption: Kout <= sum + K[sum & 3];         sum <= sum + DELTA
//   phase 10, encryption: Kout <= sum + K[(sum >> 11) & 3]
//   phase 00, decryption: Kout <= sum + K[(sum >> 11) & 3]; sum <= sum - DELTA
//   phase 10, decryption: Kout <= sum + K[sum & 3]
// so the first half-round of a cycle uses the sum before the update and the
// second half-round the sum after it, as standard XTEA does. `init` loads the
// start sum: 0 for encryption, DELTA*CYCLES for decryption.
//
// Timing: Kout is valid the cycle after phase 00 or 10 is presented, i.e. in
// phases 01 and 11 where the data registers consume it.
// The equations and the key selection follow the document; the registered
// Kout and the exact update point of the sum are this design's choice.
module xtea_key_sched
  import xtea_pkg::*;
#(
  parameter int unsigned CYCLES = 32   // 64 Feistel rounds
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   init,     // load start sum for the selected direction
  input  logic   ed,       // 0 = encryption, 1 = decryption
  input  logic   en,       // advance with the phase counter
  input  phase_e phase,
  input  key_t   key,
  output word_t  kout
);

  word_t sum;
  word_t k [4];

  always_comb begin
    for (int i = 0; i < 4; i++) k[i] = key[32*i +: 32];
  end


  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sum  <= '0;
      kout <= '0;
    end else if (init) begin
      sum  <= ed ? xtea_dec_sum(CYCLES) : '0;
    end else if (en) begin
      unique case (phase)
        PH_KEY0: begin
          if (!ed) begin
            kout <= sum + k[sum[1:0]];
            sum  <= sum + XTEA_DELTA;
          end else begin
            kout <= sum + k[sum[12:11]];
            sum  <= sum - XTEA_DELTA;
          end
        end
        PH_KEY1: kout <= sum + (ed ? k[sum[1:0]] : k[sum[12:11]]);
        default: ;
      endcase
    end
  end

endmodule
