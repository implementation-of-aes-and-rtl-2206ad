// des_key_schedule: holds one 64-bit DES key and derives its sixteen 48-bit
// round keys.
//
// On load the key (parity bits included, they are ignored) is stored. PC-1
// selects the 56 key bits, the two 28-bit halves C and D are rotated left by
// 1 or 2 positions per round, and PC-2 picks 48 bits per round (FIPS 46-3).
// With all rounds unrolled, the whole schedule is wiring after the key
// register. When decrypt is high the sixteen keys are delivered in reverse
// order, which turns the DES unit they feed into a decryption unit. The
// Triple-DES loop has two of these, one for K1 and one for K2, as in the
// original design; that each keeps its own key register is this design's
// choice.
module des_key_schedule
  import des_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,       // store key_in
  input  logic [63:0] key_in,
  input  logic        decrypt,    // 1: round keys in reverse order
  output subkeys_t    subkeys     // subkeys[0] is used by the first round
);
  logic [63:0] key_q;
  subkey_t     ks [16];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    key_q <= '0;
    else if (load) key_q <= key_in;
  end

  always_comb begin
    logic [27:0] c, d;
    {c, d} = pc1(key_q);
    for (int i = 0; i < 16; i++) begin
      c = rotl28(c, SHIFT_T[i]);
      d = rotl28(d, SHIFT_T[i]);
      ks[i] = pc2({c, d});
    end
  end

  always_comb begin
    for (int i = 0; i < 16; i++) subkeys[i] = decrypt ? ks[15-i] : ks[i];
  end
endmodule
