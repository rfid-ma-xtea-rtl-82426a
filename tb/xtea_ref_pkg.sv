// xtea_ref_pkg: reference models for the testbenches, written from the
// published XTEA algorithm (the C reference by Needham and Wheeler), not from
// the RTL. A 64-bit block is {v1, v0} (v0 in bits 31:0) and a 128-bit key is
// {k3, k2, k1, k0}. Also models CBC over two blocks and the rng64 LFSR.
package xtea_ref_pkg;

  localparam int unsigned DELTA = 32'h9E3779B9;

  function automatic logic [63:0] ref_enc(input logic [127:0] key, input logic [63:0] blk,
                                          input int cycles = 32);
    logic [31:0] v0, v1, sum, k [4];
    for (int i = 0; i < 4; i++) k[i] = key[i*32 +: 32];
    v0 = blk[31:0]; v1 = blk[63:32]; sum = 0;
    for (int i = 0; i < cycles; i++) begin
      v0  += (((v1 << 4) ^ (v1 >> 5)) + v1) ^ (sum + k[sum & 3]);
      sum += DELTA;
      v1  += (((v0 << 4) ^ (v0 >> 5)) + v0) ^ (sum + k[(sum >> 11) & 3]);
    end
    return {v1, v0};
  endfunction

  function automatic logic [63:0] ref_dec(input logic [127:0] key, input logic [63:0] blk,
                                          input int cycles = 32);
    logic [31:0] v0, v1, sum, k [4];
    for (int i = 0; i < 4; i++) k[i] = key[i*32 +: 32];
    v0 = blk[31:0]; v1 = blk[63:32]; sum = DELTA * cycles;
    for (int i = 0; i < cycles; i++) begin
      v1  -= (((v0 << 4) ^ (v0 >> 5)) + v0) ^ (sum + k[(sum >> 11) & 3]);
      sum -= DELTA;
      v0  -= (((v1 << 4) ^ (v1 >> 5)) + v1) ^ (sum + k[sum & 3]);
    end
    return {v1, v0};
  endfunction

  // two-block CBC, block 1 in [127:64]; chain = 0 XORs both blocks with IV
  function automatic logic [127:0] ref_cbc_enc(input logic [127:0] key, input logic [63:0] iv,
                                               input logic [127:0] p, input bit chain = 1);
    logic [63:0] c1, c2;
    c1 = ref_enc(key, p[127:64] ^ iv);
    c2 = ref_enc(key, p[63:0] ^ (chain ? c1 : iv));
    return {c1, c2};
  endfunction

  function automatic logic [127:0] ref_cbc_dec(input logic [127:0] key, input logic [63:0] iv,
                                               input logic [127:0] c);
    return {ref_dec(key, c[127:64]) ^ iv, ref_dec(key, c[63:0]) ^ c[127:64]};
  endfunction

  // state of the XNOR LFSR (taps 64,63,61,60) after n shifts
  function automatic logic [63:0] ref_lfsr(input logic [63:0] s, input int n);
    for (int i = 0; i < n; i++) s = {s[62:0], !(s[63] ^ s[62] ^ s[60] ^ s[59])};
    return s;
  endfunction

endpackage
