// aes_enc_round: the encryption transforms of one AES round, combinational.
//
// SubBytes, then ShiftRows, then MixColumns; in the last round MixColumns is
// left out, so the loop takes its value from after ShiftRows. AddRoundKey is
// not part of this block: the round scheduler applies it before the state
// enters here. Transforms as in FIPS-197.
module aes_enc_round
  import aes_pkg::*;
(
  input  state_t state_in,
  input  logic   last,       // 1: final round, no MixColumns
  output state_t state_out
);
  state_t sr;
  assign sr        = shift_rows(sub_bytes(state_in));
  assign state_out = last ? sr : mix_columns(sr);
endmodule
