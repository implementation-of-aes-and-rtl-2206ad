// tb_aes_enc_round: checks the encryption round transforms against the first
// round of the FIPS-197 Appendix B example and against vectors from a
// separate software model of AES (normal and last rounds).
module tb_aes_enc_round;
  import aes_pkg::*;
  state_t state_in, state_out;
  logic   last;
  int checks = 0, failures = 0;

  typedef struct packed { state_t i; logic l; state_t o; } vec_t;
  localparam vec_t V [7] = '{
    '{128'h193de3bea0f4e22b9ac68d2ae9f84808, 1'b0, 128'h046681e5e0cb199a48f8d37a2806264c},
    '{128'hbf5bd867048cc96b5d6094d702730bb5, 1'b0, 128'h4b734cef3ab1e0e70c9580c47677fd61},
    '{128'h2e9ff4f4321ec13eedd1f17658835ae4, 1'b1, 128'h3172a169233ebebf55ecbfb26adb7838},
    '{128'h8640c6761b96bfc7cc5edc4b096ef2fa, 1'b0, 128'h88c3b4801ca7b64b5e6ff661a2b8d67f},
    '{128'h173557839c5ceb255746ecb38b174faf, 1'b1, 128'hf04ace79de5a84ec5bf05b3f3d96e96d},
    '{128'h514e2dcc14a026b8b04fff7b29b80c14, 1'b0, 128'h6eca0871cdbb44f9d520945ef6d81c6e},
    '{128'hfc9988ec67083cbd9858d34074a66b25, 1'b1, 128'hb030663f856a7fce4624c47a92eeeb09}};

  aes_enc_round dut (.*);

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
