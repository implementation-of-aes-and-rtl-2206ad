// des_unrolled: a complete DES unit with its sixteen rounds laid out in a row.
//
// The block passes the initial permutation, then sixteen des_round instances,
// then the final permutation (with the usual swap of the halves after round
// 16). Whether the unit encrypts or decrypts is decided only by the order of
// the sixteen round keys it is given. The unrolled chain of sixteen rounds is
// the original design's organisation of one DES; the register after every round is
// this design's choice, made so that the clock rate stays at that of a single
// round. Only one block is in flight at a time in the Triple-DES loop, but the
// unit itself would accept a new block every cycle.
//
// Timing: in_valid/in_block are taken on a rising edge; out_valid/out_block
// appear ROUNDS clock edges later. The round keys must stay stable while a
// block is inside the unit.
module des_unrolled
  import des_pkg::*;
#(
  parameter int unsigned ROUNDS = 16   // DES round count, Fig. 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [63:0] in_block,
  input  subkeys_t    subkeys,         // round keys in the order they are used
  output logic        out_valid,
  output logic [63:0] out_block
);
  logic [63:0] stage_q   [ROUNDS];
  logic        valid_q   [ROUNDS];
  logic [63:0] round_in  [ROUNDS];
  logic [63:0] round_out [ROUNDS];

  for (genvar i = 0; i < ROUNDS; i++) begin : g_round
    if (i == 0) begin : g_first
      assign round_in[i] = initial_perm(in_block);
    end else begin : g_next
      assign round_in[i] = stage_q[i-1];
    end
    des_round u_round (.block_in(round_in[i]), .subkey(subkeys[i]), .block_out(round_out[i]));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        stage_q[i] <= '0;
        valid_q[i] <= 1'b0;
      end else begin
        stage_q[i] <= round_out[i];
        valid_q[i] <= (i == 0) ? in_valid : valid_q[i-1];
      end
    end
  end

  // Pre-output is {R16, L16}, followed by the inverse initial permutation.
  assign out_block = final_perm({stage_q[ROUNDS-1][31:0], stage_q[ROUNDS-1][63:32]});
  assign out_valid = valid_q[ROUNDS-1];
endmodule
