// aes_dec_round: the decryption transforms of one AES round, combinational.
//
// InvSubBytes, then InvShiftRows, then InvMixColumns; in the last round
// InvMixColumns is left out. This is the order of the equivalent inverse
// cipher of FIPS-197, which keeps AddRoundKey in the same place as in
// encryption; the round keys it adds must then have been passed through
// InvMixColumns (done in the round scheduler). AddRoundKey is not part of
// this block.
module aes_dec_round
  import aes_pkg::*;
(
  input  state_t state_in,
  input  logic   last,       // 1: final round, no InvMixColumns
  output state_t state_out
);
  state_t isr;
  assign isr       = inv_shift_rows(inv_sub_bytes(state_in));
  assign state_out = last ? isr : inv_mix_columns(isr);
endmodule
