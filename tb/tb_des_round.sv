// tb_des_round: checks one DES round against the first two rounds of the
// published worked example (key 133457799BBCDFF1, plaintext 0123456789ABCDEF),
// whose intermediate halves and round keys are known values, and checks on
// random blocks that a round applied to the swapped output of a round with
// the same key gives back the swapped input (the Feistel inverse).
module tb_des_round;
  import des_pkg::*;
  logic [63:0] bin, bout;
  subkey_t     k;
  int checks = 0, failures = 0;

  logic [63:0] back;

  des_round dut (.block_in(bin), .subkey(k), .block_out(bout));
  des_round u_inverse (.block_in({bout[31:0], bout[63:32]}), .subkey(k), .block_out(back));

  task automatic check(input logic [63:0] i, input subkey_t key, input logic [63:0] exp);
    bin = i; k = key; #1;
    checks++;
    if (bout !== exp) begin
      failures++;
      $display("FAIL in=%h k=%h got=%h exp=%h", i, key, bout, exp);
    end
  endtask

  initial begin
    // {L0,R0} after IP -> {L1,R1}
    check(64'hCC00CCFF_F0AAF0AA, 48'h1B02EFFC7072, 64'hF0AAF0AA_EF4A6544);
    // {L1,R1} -> {L2,R2}
    check(64'hF0AAF0AA_EF4A6544, 48'h79AED9DBC9E5, 64'hEF4A6544_CC017709);
    // A zero key leaves f(R) = P(S(E(R))); with R=0 every S-box sees 0,
    // giving S-outputs 14,15,10,7,2,12,4,13 = EFA72C4D before P.
    check(64'h00000000_00000000, 48'h0, {32'h0, p_ref(32'hEFA72C4D)});
    for (int n = 0; n < 50; n++) begin
      bin = {$urandom, $urandom}; k = {16'($urandom), $urandom}; #1;
      checks++;
      if (back !== {bin[31:0], bin[63:32]} || bout[63:32] !== bin[31:0]) begin
        failures++;
        $display("FAIL Feistel inverse in=%h k=%h out=%h back=%h", bin, k, bout, back);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference P permutation written out independently from the table in FIPS 46-3.
  function automatic logic [31:0] p_ref(input logic [31:0] x);
    int unsigned t [32] = '{16,7,20,21,29,12,28,17,1,15,23,26,5,18,31,10,
                            2,8,24,14,32,27,3,9,19,13,30,6,22,11,4,25};
    for (int i = 0; i < 32; i++) p_ref[31-i] = x[32-t[i]];
  endfunction

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
