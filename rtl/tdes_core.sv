// tdes_core: two-key Triple-DES (E-D-E) built as a loop around two DES units.
//
// Organisation (after the block diagram of the design): key bytes collect in
// a 64-bit register, from which the K1 and the K2 key schedule each store
// their own key. Text bytes collect in a second 64-bit register. A
// multiplexer feeds either that register or the loop-back path into the
// Round(Enc) unit (16 unrolled rounds keyed by K1); its result goes either
// into the Round(Dec) unit (16 rounds keyed by K2), whose output returns to
// the multiplexer, or, on the second pass, to the output multiplexer and the
// 8-bit output register. A block therefore makes the trip
// Enc(K1) -> Dec(K2) -> Enc(K1), which is E-D-E encryption with K3 = K1.
// The two units are identical; Round(Dec) decrypts because the K2 schedule
// hands it its round keys in reverse order. For Triple-DES decryption both
// schedules swap their order, so the same trip computes
// D(K1) -> E(K2) -> D(K1).
//
// The register after every DES round is this design's choice (the original
// implementation ran at 69 MHz, which a combinational 16-round chain could
// not reach); so is the byte-level handshake below.
//
// Interface:
//   key_byte/key_byte_valid  shift a byte into the 64-bit key register
//   key_load_k1/key_load_k2  copy that register into the K1 / K2 schedule
//   din_byte/din_valid       shift a byte into the 64-bit text register
//   decrypt                  sampled with start: 0 encrypt, 1 decrypt
//   start                    begin on the text register (ignored while busy)
//   busy                     a block is inside the loop
//   done                     one-cycle pulse: result taken by the output mux
//   dout_byte/dout_valid     the eight result bytes, most significant first
// Timing: done is high in the 48th cycle after the start cycle (3 x 16
// rounds, one per cycle); the output register holds the eight result bytes,
// with dout_valid, in cycles 2 to 9 after done.
module tdes_core
  import des_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] key_byte,
  input  logic       key_byte_valid,
  input  logic       key_load_k1,
  input  logic       key_load_k2,
  input  logic [7:0] din_byte,
  input  logic       din_valid,
  input  logic       decrypt,
  input  logic       start,
  output logic       busy,
  output logic       done,
  output logic [7:0] dout_byte,
  output logic       dout_valid
);
  logic [63:0] key_reg, text_reg;
  subkeys_t    subkeys_k1, subkeys_k2;
  logic        mode_q, mode;
  logic        busy_q, second_pass_q;
  logic        go;
  logic        enc_in_valid, enc_out_valid, dec_in_valid, dec_out_valid;
  logic [63:0] enc_in, enc_out, dec_out;

  byte_shift_in #(.WIDTH(64)) u_key_reg (
    .clk, .rst_n, .byte_valid(key_byte_valid), .byte_in(key_byte), .data(key_reg));

  byte_shift_in #(.WIDTH(64)) u_text_reg (
    .clk, .rst_n, .byte_valid(din_valid), .byte_in(din_byte), .data(text_reg));

  // The mode is taken from the port in the start cycle (the first round uses
  // its key at that edge) and held in mode_q afterwards.
  assign go   = start && !busy_q;
  assign mode = go ? decrypt : mode_q;

  des_key_schedule u_ks_k1 (
    .clk, .rst_n, .load(key_load_k1), .key_in(key_reg), .decrypt(mode), .subkeys(subkeys_k1));

  des_key_schedule u_ks_k2 (
    .clk, .rst_n, .load(key_load_k2), .key_in(key_reg), .decrypt(!mode), .subkeys(subkeys_k2));

  // Input multiplexer: new text or loop-back from Round(Dec).
  assign enc_in       = dec_out_valid ? dec_out : text_reg;
  assign enc_in_valid = go || dec_out_valid;

  des_unrolled u_round_enc (
    .clk, .rst_n, .in_valid(enc_in_valid), .in_block(enc_in), .subkeys(subkeys_k1),
    .out_valid(enc_out_valid), .out_block(enc_out));

  assign dec_in_valid = enc_out_valid && !second_pass_q;

  des_unrolled u_round_dec (
    .clk, .rst_n, .in_valid(dec_in_valid), .in_block(enc_out), .subkeys(subkeys_k2),
    .out_valid(dec_out_valid), .out_block(dec_out));

  assign done = enc_out_valid && second_pass_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q        <= 1'b0;
      busy_q        <= 1'b0;
      second_pass_q <= 1'b0;
    end else begin
      if (go) begin
        mode_q <= decrypt;
        busy_q <= 1'b1;
      end
      if (dec_out_valid) second_pass_q <= 1'b1;
      if (done) begin
        busy_q        <= 1'b0;
        second_pass_q <= 1'b0;
      end
    end
  end

  assign busy = busy_q;

  // Output multiplexer and 8-bit output register.
  byte_shift_out #(.WIDTH(64)) u_out (
    .clk, .rst_n, .load(done), .data(enc_out), .dout(dout_byte), .dout_valid, .busy());

  // Only one block is ever inside the loop.
  a_one_block: assert property (@(posedge clk) disable iff (!rst_n)
                                !(go && (busy_q || dec_out_valid)));
  a_loop_pass: assert property (@(posedge clk) disable iff (!rst_n)
                                dec_out_valid |-> !second_pass_q);
endmodule
