// aes_pkg: types, constants and transforms of AES (Rijndael, FIPS-197) shared
// by the AES datapath and key schedule.
//
// A 128-bit state holds the sixteen bytes column by column: byte 0 (bits
// 127:120) is row 0 of column 0, byte 1 is row 1 of column 0, and so on,
// which is the order in which a block's bytes arrive. The S-box and its
// inverse are not typed in as tables; they are computed at elaboration from
// their definition: the multiplicative inverse in GF(2^8) modulo
// x^8 + x^4 + x^3 + x + 1 (with 0 mapped to 0), followed by the affine map
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63.
package aes_pkg;

  typedef logic [127:0] state_t;
  typedef logic [31:0]  word_t;

  // Key length, selected by control signals (128, 192 or 256 bits).
  typedef enum logic [1:0] {KEY128 = 2'd0, KEY192 = 2'd1, KEY256 = 2'd2} key_size_e;

  localparam int unsigned MAX_ROUNDS = 14;               // AES-256
  localparam int unsigned RK_WORDS   = MAX_ROUNDS + 1;   // round keys to store

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p = '0;
    logic [7:0] x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // a^254 = a^-1 in GF(2^8), and 0 for a = 0.
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] r = 8'h01;
    logic [7:0] sq = a;
    for (int i = 1; i < 8; i++) begin   // 254 = 0b11111110
      sq = gf_mul(sq, sq);
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] affine(input logic [7:0] b);
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]} ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  function automatic logic [255:0][7:0] gen_sbox();
    for (int i = 0; i < 256; i++) gen_sbox[i] = affine(gf_inv(8'(i)));
  endfunction

  function automatic logic [255:0][7:0] gen_inv_sbox();
    logic [255:0][7:0] s = gen_sbox();
    for (int i = 0; i < 256; i++) gen_inv_sbox[s[i]] = 8'(i);
  endfunction

  localparam logic [255:0][7:0] SBOX     = gen_sbox();
  localparam logic [255:0][7:0] INV_SBOX = gen_inv_sbox();

  function automatic logic [7:0] get_byte(input state_t s, input int unsigned i);
    return s[127-8*i -: 8];
  endfunction

  function automatic word_t sub_word(input word_t w);
    return {SBOX[w[31:24]], SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]]};
  endfunction

  function automatic state_t sub_bytes(input state_t s);
    for (int i = 0; i < 16; i++) sub_bytes[127-8*i -: 8] = SBOX[get_byte(s, i)];
  endfunction

  function automatic state_t inv_sub_bytes(input state_t s);
    for (int i = 0; i < 16; i++) inv_sub_bytes[127-8*i -: 8] = INV_SBOX[get_byte(s, i)];
  endfunction

  // Row r is rotated left by r columns.
  function automatic state_t shift_rows(input state_t s);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        shift_rows[127-8*(4*c+r) -: 8] = get_byte(s, 4*((c+r)%4) + r);
  endfunction

  function automatic state_t inv_shift_rows(input state_t s);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        inv_shift_rows[127-8*(4*((c+r)%4)+r) -: 8] = get_byte(s, 4*c + r);
  endfunction

  function automatic word_t mix_column(input word_t w);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = w;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  function automatic word_t inv_mix_column(input word_t w);
    logic [7:0] a0, a1, a2, a3;
    {a0, a1, a2, a3} = w;
    return {gf_mul(a0, 8'h0e) ^ gf_mul(a1, 8'h0b) ^ gf_mul(a2, 8'h0d) ^ gf_mul(a3, 8'h09),
            gf_mul(a0, 8'h09) ^ gf_mul(a1, 8'h0e) ^ gf_mul(a2, 8'h0b) ^ gf_mul(a3, 8'h0d),
            gf_mul(a0, 8'h0d) ^ gf_mul(a1, 8'h09) ^ gf_mul(a2, 8'h0e) ^ gf_mul(a3, 8'h0b),
            gf_mul(a0, 8'h0b) ^ gf_mul(a1, 8'h0d) ^ gf_mul(a2, 8'h09) ^ gf_mul(a3, 8'h0e)};
  endfunction

  function automatic state_t mix_columns(input state_t s);
    for (int c = 0; c < 4; c++) mix_columns[127-32*c -: 32] = mix_column(s[127-32*c -: 32]);
  endfunction

  function automatic state_t inv_mix_columns(input state_t s);
    for (int c = 0; c < 4; c++) inv_mix_columns[127-32*c -: 32] = inv_mix_column(s[127-32*c -: 32]);
  endfunction

  function automatic logic [3:0] rounds_of(input key_size_e ks);
    case (ks)
      KEY128:  return 4'd10;
      KEY192:  return 4'd12;
      default: return 4'd14;
    endcase
  endfunction

endpackage
