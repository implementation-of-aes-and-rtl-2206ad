// tb_tdes_core: two-key Triple-DES (K1, K2, K1) known-answer tests through the
// byte ports: keys and text go in one byte per cycle, the result comes out one
// byte per cycle. Each vector is run as encryption and as decryption. Also
// checks that done comes 48 cycles after the start cycle, that the eight
// output bytes follow back to back from the second cycle after done on, and that a start while busy is ignored.
module tb_tdes_core;
  logic       clk = 0, rst_n = 0;
  logic [7:0] key_byte = '0, din_byte = '0;
  logic       key_byte_valid = 0, key_load_k1 = 0, key_load_k2 = 0;
  logic       din_valid = 0, decrypt = 0, start = 0;
  logic       busy, done, dout_valid;
  logic [7:0] dout_byte;
  int checks = 0, failures = 0;

  typedef struct packed { logic [63:0] k1, k2, pt, ct; } vec_t;
  localparam vec_t V [5] = '{
    '{64'h133457799BBCDFF1, 64'h133457799BBCDFF1, 64'h0123456789ABCDEF, 64'h85E813540F0AB405},
    '{64'h38c275f34aed056a, 64'hd6ea8eeca4192fa1, 64'hfeb9dc4b1ebe55e5, 64'h15be2a4169d6137e},
    '{64'hb8f9b680eff76c81, 64'hd4e9ab304d4896f9, 64'he17fd8f0816496da, 64'h4ed3a967da1cc578},
    '{64'h087a3ebecc676aaa, 64'h2c5d8ce1b3c6acbc, 64'h5f1670a9821bc729, 64'h939809a0785a05aa},
    '{64'h85d7645e7dbb0778, 64'h0b4eb4d9fb9d9794, 64'h64a52b2b803afb03, 64'hb96e6ff66597992c}};

  tdes_core dut (.*);
  always #5 clk = ~clk;

  task automatic send_key(input logic [63:0] k, input bit second);
    for (int i = 7; i >= 0; i--) begin
      @(negedge clk); key_byte = k[8*i +: 8]; key_byte_valid = 1;
    end
    @(negedge clk); key_byte_valid = 0;
    if (second) key_load_k2 = 1; else key_load_k1 = 1;
    @(negedge clk); key_load_k1 = 0; key_load_k2 = 0;
  endtask

  task automatic run(input vec_t v, input logic dec, input bit poke_start);
    logic [63:0] din, exp, got;
    int lat, n;
    din = dec ? v.ct : v.pt;
    exp = dec ? v.pt : v.ct;
    send_key(v.k1, 0);
    send_key(v.k2, 1);
    for (int i = 7; i >= 0; i--) begin
      @(negedge clk); din_byte = din[8*i +: 8]; din_valid = 1;
    end
    @(negedge clk); din_valid = 0; decrypt = dec; start = 1;
    @(negedge clk); start = 0; lat = 1;
    if (poke_start) begin
      // A second start in mid-flight, with the other mode, must change nothing.
      repeat (5) @(negedge clk);
      lat += 5; start = 1; decrypt = !dec;
      @(negedge clk); start = 0; lat++;
    end
    while (!done) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 48) begin failures++; $display("FAIL done after %0d edges", lat); end
    n = 0;
    repeat (2) @(negedge clk);
    while (n < 8) begin
      checks++;
      if (!dout_valid) begin failures++; $display("FAIL byte %0d not valid", n); end
      got = {got[55:0], dout_byte};
      n++;
      @(negedge clk);
    end
    checks++;
    if (dout_valid) begin failures++; $display("FAIL ninth output byte"); end
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL k1=%h k2=%h dec=%0b in=%h got=%h exp=%h", v.k1, v.k2, dec, din, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (V[i]) begin
      run(V[i], 1'b0, i == 1);
      run(V[i], 1'b1, i == 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
