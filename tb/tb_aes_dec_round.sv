// tb_aes_dec_round: checks the decryption round transforms against vectors
// from a separate software model of AES (normal and last rounds).
module tb_aes_dec_round;
  import aes_pkg::*;
  state_t state_in, state_out;
  logic   last;
  int checks = 0, failures = 0;

  typedef struct packed { state_t i; logic l; state_t o; } vec_t;
  localparam vec_t V [6] = '{
    '{128'h0efaeaa308cd7e55d63521fbbb90f321, 1'b0, 128'he695ff5baa761c76766d93821d8fca84},
    '{128'ha1e5c9691b2b6f5f260fd86b4b2474ec, 1'b1, 128'hf1a62d84442aca05230b1283ccfb06e4},
    '{128'hff9eda2bf98574f57cb0ba517a464a78, 1'b0, 128'h9a4d8306ec6ef6ee559c8f9b148d7861},
    '{128'h67e6251c60d2fd88f52da0ef7fde562e, 1'b1, 128'h0a9c479790f5b961777fc2c36bfa21c4},
    '{128'h167d4583c88cde805c10c9cbc65bb196, 1'b0, 128'hc19e37e8ed184b1342b89969a62831d9},
    '{128'ha908c24e5d8fb4ab47d57c43c5fbb0b7, 1'b1, 128'hb763010e8dbffc641673a82007b5c6b6}};

  aes_dec_round dut (.*);

  initial begin
    foreach (V[k]) begin
      state_in = V[k].i; last = V[k].l; #1;
      checks++;
      if (state_out !== V[k].o) begin
        failures++;
        $display("FAIL in=%h last=%0b got=%h exp=%h", V[k].i, V[k].l, state_out, V[k].o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
