// tb_aes_core: AES known-answer tests through the byte ports. For each vector
// the key bytes are sent, expanded, then the plaintext is encrypted and the
// ciphertext decrypted with the same stored key. Checks the results, the
// 2*Nr+3 cycle block latency, the sixteen back-to-back output bytes, and that
// a start during key expansion is ignored.
module tb_aes_core;
  import aes_pkg::*;
  import aes_vectors_pkg::*;
  logic       clk = 0, rst_n = 0;
  logic [7:0] key_byte = '0, din_byte = '0;
  logic       key_byte_valid = 0, key_expand = 0, din_valid = 0, decrypt = 0, start = 0;
  key_size_e  key_size = KEY128;
  logic       key_busy, key_done, busy, done, dout_valid;
  logic [7:0] dout_byte;
  int checks = 0, failures = 0;

  aes_core dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic load_key(input aes_vec_t v, input bit poke_start);
    int nbytes = 16 + 8 * v.ks;
    for (int i = 0; i < nbytes; i++) begin
      @(negedge clk); key_byte = v.key[255-8*i -: 8]; key_byte_valid = 1;
    end
    @(negedge clk); key_byte_valid = 0; key_size = key_size_e'(v.ks); key_expand = 1;
    @(negedge clk); key_expand = 0;
    if (poke_start) begin
      start = 1;
      @(negedge clk); start = 0;
      check(!busy, "start taken during key expansion");
    end
    while (!key_done) @(negedge clk);
  endtask

  task automatic block(input logic dec, input logic [127:0] x, input logic [127:0] exp, input int nr);
    logic [127:0] got;
    int lat;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); din_byte = x[127-8*i -: 8]; din_valid = 1;
    end
    @(negedge clk); din_valid = 0; decrypt = dec; start = 1;
    @(negedge clk); start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    check(lat == 2 * nr + 3, $sformatf("latency %0d, Nr=%0d", lat, nr));
    repeat (2) @(negedge clk);
    for (int i = 0; i < 16; i++) begin
      check(dout_valid, "output byte valid");
      got = {got[119:0], dout_byte};
      @(negedge clk);
    end
    check(!dout_valid, "no 17th byte");
    check(got == exp, $sformatf("dec=%0b in=%h got=%h exp=%h", dec, x, got, exp));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (AES_VEC[v]) begin
      load_key(AES_VEC[v], v % 4 == 1);
      block(1'b0, AES_VEC[v].pt, AES_VEC[v].ct, 10 + 2 * AES_VEC[v].ks);
      block(1'b1, AES_VEC[v].ct, AES_VEC[v].pt, 10 + 2 * AES_VEC[v].ks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
