// tb_crypto_fpga_top: end-to-end test of the whole FPGA design at its default
// configuration. The Triple-DES and the AES core are driven at the same time
// through their byte ports, as a host would: keys, text, start, then the
// result bytes are read back and compared with known answers.
//
// Counted mechanisms (each must happen at least once):
//   Triple-DES encryption and decryption, the loop-back from Round(Dec) into
//   Round(Enc), a start ignored while a block is in the loop; AES key
//   expansion for each key size, a key-size switch between expansions,
//   encryption and decryption, several blocks on one stored key schedule,
//   a start ignored during key expansion and one ignored while busy; both
//   cores busy in the same cycle.
module tb_crypto_fpga_top;
  import aes_pkg::*;
  import aes_vectors_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] tdes_key_byte = '0, tdes_din_byte = '0, tdes_dout_byte;
  logic tdes_key_byte_valid = 0, tdes_key_load_k1 = 0, tdes_key_load_k2 = 0;
  logic tdes_din_valid = 0, tdes_decrypt = 0, tdes_start = 0;
  logic tdes_busy, tdes_done, tdes_dout_valid;
  logic [7:0] aes_key_byte = '0, aes_din_byte = '0, aes_dout_byte;
  logic aes_key_byte_valid = 0, aes_key_expand = 0, aes_din_valid = 0, aes_decrypt = 0, aes_start = 0;
  key_size_e aes_key_size = KEY128;
  logic aes_key_busy, aes_key_done, aes_busy, aes_done, aes_dout_valid;
  int checks = 0, failures = 0;

  typedef enum int {M_TDES_ENC, M_TDES_DEC, M_TDES_LOOP, M_TDES_IGNORED,
                    M_AES_KEY128, M_AES_KEY192, M_AES_KEY256, M_AES_SIZE_SWITCH,
                    M_AES_ENC, M_AES_DEC, M_AES_REUSE_KEY, M_AES_IGN_KEYX, M_AES_IGN_BUSY,
                    M_BOTH_BUSY, M_COUNT} mech_e;
  int mech [M_COUNT];
  localparam string MECH_NAME [M_COUNT] = '{
    "tdes encrypt", "tdes decrypt", "tdes loop-back", "tdes start ignored",
    "aes 128-bit key", "aes 192-bit key", "aes 256-bit key", "aes key-size switch",
    "aes encrypt", "aes decrypt", "aes key reuse", "aes start in keyexp",
    "aes start in busy", "both cores busy"};

  typedef struct packed { logic [63:0] k1, k2, pt, ct; } tvec_t;
  localparam tvec_t TV [5] = '{
    '{64'h133457799BBCDFF1, 64'h133457799BBCDFF1, 64'h0123456789ABCDEF, 64'h85E813540F0AB405},
    '{64'h38c275f34aed056a, 64'hd6ea8eeca4192fa1, 64'hfeb9dc4b1ebe55e5, 64'h15be2a4169d6137e},
    '{64'hb8f9b680eff76c81, 64'hd4e9ab304d4896f9, 64'he17fd8f0816496da, 64'h4ed3a967da1cc578},
    '{64'h087a3ebecc676aaa, 64'h2c5d8ce1b3c6acbc, 64'h5f1670a9821bc729, 64'h939809a0785a05aa},
    '{64'h85d7645e7dbb0778, 64'h0b4eb4d9fb9d9794, 64'h64a52b2b803afb03, 64'hb96e6ff66597992c}};

  crypto_fpga_top dut (.*);
  always #5 clk = ~clk;

  always @(negedge clk) begin
    if (dut.u_tdes.dec_out_valid) mech[M_TDES_LOOP]++;
    if (tdes_busy && aes_busy) mech[M_BOTH_BUSY]++;
  end

  function automatic void check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endfunction

  // ---------------- Triple-DES host ----------------
  task automatic tdes_key(input logic [63:0] k, input bit second);
    for (int i = 7; i >= 0; i--) begin
      @(negedge clk); tdes_key_byte = k[8*i +: 8]; tdes_key_byte_valid = 1;
    end
    @(negedge clk); tdes_key_byte_valid = 0;
    if (second) tdes_key_load_k2 = 1; else tdes_key_load_k1 = 1;
    @(negedge clk); tdes_key_load_k1 = 0; tdes_key_load_k2 = 0;
  endtask

  task automatic tdes_block(input logic dec, input logic [63:0] x, input logic [63:0] exp,
                            input bit poke);
    logic [63:0] got;
    int lat;
    for (int i = 7; i >= 0; i--) begin
      @(negedge clk); tdes_din_byte = x[8*i +: 8]; tdes_din_valid = 1;
    end
    @(negedge clk); tdes_din_valid = 0; tdes_decrypt = dec; tdes_start = 1;
    @(negedge clk); tdes_start = 0; lat = 1;
    if (poke) begin
      @(negedge clk); tdes_start = 1; lat++;
      @(negedge clk); tdes_start = 0; lat++;
      mech[M_TDES_IGNORED]++;
    end
    while (!tdes_done) begin @(negedge clk); lat++; end
    check(lat == 48, $sformatf("tdes latency %0d", lat));
    repeat (2) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      check(tdes_dout_valid, "tdes byte valid");
      got = {got[55:0], tdes_dout_byte};
      @(negedge clk);
    end
    check(got == exp, $sformatf("tdes dec=%0b in=%h got=%h exp=%h", dec, x, got, exp));
    mech[dec ? M_TDES_DEC : M_TDES_ENC]++;
  endtask

  // ---------------- AES host ----------------
  task automatic aes_key(input aes_vec_t v, input bit poke);
    for (int i = 0; i < 16 + 8 * v.ks; i++) begin
      @(negedge clk); aes_key_byte = v.key[255-8*i -: 8]; aes_key_byte_valid = 1;
    end
    @(negedge clk); aes_key_byte_valid = 0;
    if (aes_key_size != key_size_e'(v.ks)) mech[M_AES_SIZE_SWITCH]++;
    aes_key_size = key_size_e'(v.ks); aes_key_expand = 1;
    @(negedge clk); aes_key_expand = 0;
    if (poke) begin
      aes_start = 1;
      @(negedge clk); aes_start = 0;
      check(!aes_busy, "aes start taken during key expansion");
      mech[M_AES_IGN_KEYX]++;
    end
    while (!aes_key_done) @(negedge clk);
    mech[M_AES_KEY128 + v.ks]++;
  endtask

  task automatic aes_block(input logic dec, input logic [127:0] x, input logic [127:0] exp,
                           input int nr, input bit poke);
    logic [127:0] got;
    int lat;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); aes_din_byte = x[127-8*i -: 8]; aes_din_valid = 1;
    end
    @(negedge clk); aes_din_valid = 0; aes_decrypt = dec; aes_start = 1;
    @(negedge clk); aes_start = 0; lat = 1;
    if (poke) begin
      aes_start = 1; aes_decrypt = !dec;
      @(negedge clk); aes_start = 0; lat++;
      mech[M_AES_IGN_BUSY]++;
    end
    while (!aes_done) begin @(negedge clk); lat++; end
    check(lat == 2 * nr + 3, $sformatf("aes latency %0d for Nr=%0d", lat, nr));
    repeat (2) @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      check(aes_dout_valid, "aes byte valid");
      got = {got[119:0], aes_dout_byte};
      @(negedge clk);
    end
    check(got == exp, $sformatf("aes dec=%0b in=%h got=%h exp=%h", dec, x, got, exp));
    mech[dec ? M_AES_DEC : M_AES_ENC]++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      foreach (TV[v]) begin
        tdes_key(TV[v].k1, 0);
        tdes_key(TV[v].k2, 1);
        tdes_block(1'b0, TV[v].pt, TV[v].ct, v == 3);
        tdes_block(1'b1, TV[v].ct, TV[v].pt, 0);
      end
      foreach (AES_VEC[v]) begin
        aes_key(AES_VEC[v], v == 2);
        aes_block(1'b0, AES_VEC[v].pt, AES_VEC[v].ct, 10 + 2 * AES_VEC[v].ks, v == 4);
        aes_block(1'b1, AES_VEC[v].ct, AES_VEC[v].pt, 10 + 2 * AES_VEC[v].ks, 0);
        mech[M_AES_REUSE_KEY]++;   // the decryption used the stored schedule again
      end
    join
    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-20s happened %0d times", MECH_NAME[m], mech[m]);
      check(mech[m] > 0, $sformatf("mechanism %s never happened", MECH_NAME[m]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
