// des_round: one DES round (Feistel step), purely combinational.
//
// The 64-bit block {L, R} becomes {R, L ^ f(R, K)}, where f expands R to 48
// bits, mixes in the 48-bit round key K, passes the result through the eight
// S-boxes and permutes the 32-bit result with P. Encryption and decryption use
// the same round; only the order of the round keys differs. The round function
// follows FIPS 46-3; sixteen of these make up one DES unit (see des_unrolled).
module des_round
  import des_pkg::*;
(
  input  logic [63:0] block_in,   // {L, R} before the round
  input  subkey_t     subkey,     // 48-bit round key
  output logic [63:0] block_out   // {L', R'} = {R, L ^ f(R, K)}
);
  logic [31:0] l, r;
  assign l = block_in[63:32];
  assign r = block_in[31:0];
  assign block_out = {r, l ^ f_func(r, subkey)};
endmodule
