// tb_des_key_schedule: checks the round keys of key 133457799BBCDFF1 against
// the published worked example (K1, K2, K16), in both orders, and that a new
// key is only taken on load.
module tb_des_key_schedule;
  import des_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, decrypt = 0;
  logic [63:0] key_in = '0;
  subkeys_t subkeys;
  int checks = 0, failures = 0;

  des_key_schedule dut (.*);
  always #5 clk = ~clk;

  task automatic check(input string what, input logic [47:0] got, input logic [47:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); key_in = 64'h133457799BBCDFF1; load = 1;
    @(negedge clk); load = 0; key_in = 64'hFFFF_FFFF_FFFF_FFFF;
    check("K1",  subkeys[0],  48'h1B02EFFC7072);
    check("K2",  subkeys[1],  48'h79AED9DBC9E5);
    check("K16", subkeys[15], 48'hCB3D8B0E17F5);
    decrypt = 1; #1;
    check("dec K16 first", subkeys[0],  48'hCB3D8B0E17F5);
    check("dec K2",        subkeys[14], 48'h79AED9DBC9E5);
    check("dec K1 last",   subkeys[15], 48'h1B02EFFC7072);
    // All-ones key gives all-ones round keys; all-zero key (after reset) zeros.
    @(negedge clk); load = 1;
    @(negedge clk); load = 0; #1;
    for (int i = 0; i < 16; i++) check("ones", subkeys[i], '1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
