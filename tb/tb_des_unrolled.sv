// tb_des_unrolled: single-DES known-answer tests through the 16-round unit,
// fed by a des_key_schedule. Checks encryption and decryption results and that
// the result appears exactly 16 clock edges after the block goes in.
module tb_des_unrolled;
  import des_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, decrypt = 0, in_valid = 0, out_valid;
  logic [63:0] key_in = '0, in_block = '0, out_block;
  subkeys_t subkeys;
  int checks = 0, failures = 0;

  typedef struct packed { logic [63:0] key, pt, ct; } vec_t;
  localparam vec_t V [5] = '{
    '{64'h133457799BBCDFF1, 64'h0123456789ABCDEF, 64'h85E813540F0AB405},
    '{64'h2291d8cdc310411e, 64'h7ec27378a661c935, 64'hda8c15dae1fd2bd1},
    '{64'h187c07e4d5636e9b, 64'hc3c400b27244b8cd, 64'h1e8d1291b92ce856},
    '{64'h3a97f11ae6510705, 64'h06a68a02f0e161af, 64'h587aa18fd022dc87},
    '{64'h37f86cb9078738c3, 64'h70f07e8d3b583bad, 64'h49bbbf4f73228ba2}};

  des_key_schedule u_ks (.clk, .rst_n, .load, .key_in, .decrypt, .subkeys);
  des_unrolled dut (.clk, .rst_n, .in_valid, .in_block, .subkeys, .out_valid, .out_block);
  always #5 clk = ~clk;

  task automatic run(input logic [63:0] key, input logic dec, input logic [63:0] din,
                     input logic [63:0] exp);
    int lat;
    @(negedge clk); key_in = key; load = 1; decrypt = dec;
    @(negedge clk); load = 0; in_block = din; in_valid = 1;
    @(negedge clk); in_valid = 0; in_block = '0;
    lat = 1;
    while (!out_valid) begin @(negedge clk); lat++; end
    checks++;
    if (out_block !== exp) begin
      failures++;
      $display("FAIL key=%h dec=%0b in=%h got=%h exp=%h", key, dec, din, out_block, exp);
    end
    checks++;
    if (lat != 16) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (V[i]) begin
      run(V[i].key, 1'b0, V[i].pt, V[i].ct);
      run(V[i].key, 1'b1, V[i].ct, V[i].pt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
