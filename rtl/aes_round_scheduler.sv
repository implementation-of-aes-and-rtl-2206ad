// aes_round_scheduler: the AES round loop ("round scheduling").
//
// One state register and one copy of each round's transforms serve all
// rounds. An input multiplexer loads the state register with a new block or
// with the output of the round transforms. Each round the state passes
// AddRoundKey and then either the encryption transforms (SubBytes, ShiftRows,
// MixColumns) or the decryption transforms (InvSubBytes, InvShiftRows,
// InvMixColumns), the mixing step left out in the final round. The round key
// is read from the key-storing RAM; for decryption the rounds run through the
// keys backwards and, except for the first and last AddRoundKey, the key goes
// through InvMixColumns first (equivalent inverse cipher), selected by a
// multiplexer. After the final AddRoundKey the result goes into the output
// register. This organisation follows the original round-scheduling
// diagram; the two-cycle round and the handshake are this design's.
//
// Timing: each of the Nr+1 AddRoundKey steps takes two cycles, one to read the
// round key from the synchronous RAM and one to use it, so a block occupies
// 2*Nr+3 clock edges counting the one that ends the start cycle (23, 27, 31
// for Nr = 10, 12, 14): the last of them writes the output register, and
// done is high in the cycle after it. start is ignored while busy; decrypt
// and nr are sampled with start.
module aes_round_scheduler
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       decrypt,
  input  logic [3:0] nr,          // 10, 12 or 14
  input  state_t     din,
  output logic [3:0] key_raddr,   // to the key RAM
  input  state_t     key_rdata,   // from the key RAM, one cycle after key_raddr
  output logic       busy,
  output logic       done,        // one-cycle pulse, dout valid from then on
  output state_t     dout
);
  state_t     state_q, key_eff, ark, enc_out, dec_out;
  logic [3:0] round_q, nr_q;
  logic       phase_q;            // 0: key read issued, 1: key available
  logic       dec_q;
  logic       last;

  assign last = (round_q == nr_q - 1'b1);

  // Key multiplexer: InvMixColumns on the inner round keys when decrypting.
  assign key_eff = (dec_q && round_q != 0 && round_q != nr_q) ? inv_mix_columns(key_rdata)
                                                             : key_rdata;
  assign ark = state_q ^ key_eff;

  aes_enc_round u_enc (.state_in(ark), .last, .state_out(enc_out));
  aes_dec_round u_dec (.state_in(ark), .last, .state_out(dec_out));

  assign key_raddr = dec_q ? (nr_q - round_q) : round_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= '0;
      dout    <= '0;
      round_q <= '0;
      nr_q    <= 4'd10;
      phase_q <= 1'b0;
      dec_q   <= 1'b0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        state_q <= din;                         // input multiplexer: new block
        round_q <= '0;
        nr_q    <= nr;
        dec_q   <= decrypt;
        phase_q <= 1'b0;
        busy    <= 1'b1;
      end else if (busy) begin
        phase_q <= !phase_q;
        if (phase_q) begin
          if (round_q == nr_q) begin
            dout <= ark;                        // final AddRoundKey -> output register
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            state_q <= dec_q ? dec_out : enc_out; // input multiplexer: loop back
            round_q <= round_q + 1'b1;
          end
        end
      end
    end
  end

  a_nr: assert property (@(posedge clk) disable iff (!rst_n)
                         start && !busy |-> nr inside {4'd10, 4'd12, 4'd14});
endmodule
