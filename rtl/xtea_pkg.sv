// xtea_pkg: types and constants shared by the XTEA cipher, its CBC wrapper
// and the RFID reader/tag controllers.
//
// The XTEA cipher works on a 64-bit block split into two 32-bit words and a
// 128-bit key split into four 32-bit sub-keys K[3..0] (K[0] = key[31:0]).
// The round-constant DELTA is the standard XTEA value 0x9E3779B9; the
// document names the constant but does not print it.
package xtea_pkg;

  typedef logic [31:0]  word_t;
  typedef logic [63:0]  block_t;
  typedef logic [127:0] key_t;
  typedef logic [127:0] dblock_t;   // two CBC blocks, block 1 in [127:64]

  // Four-step phase counter of Algorithm 1 (the "count" of Eq. (3)-(6)).
  typedef enum logic [1:0] {
    PH_KEY0 = 2'b00,   // Rin <= I1, first round key
    PH_UPD0 = 2'b01,   // I0 +/-= Rout
    PH_KEY1 = 2'b10,   // Rin <= I0, second round key
    PH_UPD1 = 2'b11    // I1 +/-= Rout
  } phase_e;

  localparam word_t XTEA_DELTA = 32'h9E37_79B9;

  // Sum that decryption starts from: DELTA times the number of cycles
  // (one cycle = two Feistel rounds).
  function automatic word_t xtea_dec_sum(input int unsigned cycles);
    return word_t'(XTEA_DELTA * cycles);
  endfunction

endpackage
