// xtea_round_fn: the XTEA Feistel round function, Eq. (7) of the design:
//
//   Rout = Kout ^ (((Rin << 4) ^ (Rin >> 5)) + Rin)
//
// Purely combinational, 32 bits wide. Rin is the half-block that feeds the
// round and Kout the round key from xtea_key_sched; the caller adds or
// subtracts Rout into the other half-block. Follows the document exactly.
module xtea_round_fn
  import xtea_pkg::*;
(
  input  word_t rin,
  input  word_t kout,
  output word_t rout
);

  word_t mix;

  always_comb begin
    mix  = ((rin << 4) ^ (rin >> 5)) + rin;
    rout = kout ^ mix;
  end

endmodule
