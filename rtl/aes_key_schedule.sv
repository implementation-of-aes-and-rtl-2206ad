// aes_key_schedule: "3-in-1" AES key expansion for 128-, 192- and 256-bit keys.
//
// On start the key (most significant bits of key, Nk = 4, 6 or 8 words, as
// chosen by key_size) is expanded into the 4*(Nr+1) words of the FIPS-197
// schedule, one 32-bit word per clock. A window of the last eight words
// supplies w[i-1] and w[i-Nk]; every Nk-th word passes RotWord, SubWord and
// the round constant, and for 256-bit keys the word four after that passes
// SubWord alone. Every fourth word completes a 128-bit round key, which is
// written into the key-storing RAM at the address of its round. One datapath
// serves all three key sizes; the size takes effect at start. The 3-in-1
// unit and its place in front of the key RAM are the original design's;
// producing one word per clock is this design's choice.
//
// Timing: expansion takes 4*(Nr+1) cycles after the start cycle (44, 52 or 60);
// done pulses in the cycle after the last RAM write, and nr then gives the
// round count of the stored schedule. start is ignored while busy.
module aes_key_schedule
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  key_size_e    key_size,
  input  logic [255:0] key,
  output logic         busy,
  output logic         done,
  output logic [3:0]   nr,         // rounds of the stored schedule: 10, 12, 14
  output logic         ram_we,
  output logic [3:0]   ram_waddr,
  output state_t       ram_wdata
);
  logic [255:0] key_q;
  logic [3:0]   nk_q;              // key length in words
  logic [5:0]   i_q;               // index of the word being produced
  logic [5:0]   last_q;            // index of the last word, 4*(Nr+1)-1
  logic [3:0]   mod_q;             // i mod Nk
  logic [7:0]   rcon_q;
  word_t        win_q [8];         // win_q[k] = w[i-1-k]
  word_t        acc_q [3];         // first three words of the current round key
  word_t        w_new, temp;

  always_comb begin
    temp = win_q[0];
    if (mod_q == 0)                      temp = sub_word({temp[23:0], temp[31:24]}) ^ {rcon_q, 24'h0};
    else if (nk_q == 8 && mod_q == 4)    temp = sub_word(temp);
    if (i_q < 6'(nk_q)) w_new = key_q[255 - 32*i_q[2:0] -: 32];
    else                w_new = win_q[nk_q-1] ^ temp;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      nr     <= 4'd10;
      key_q  <= '0;
      nk_q   <= 4'd4;
      i_q    <= '0;
      last_q <= '0;
      mod_q  <= '0;
      rcon_q <= 8'h01;
      for (int k = 0; k < 8; k++) win_q[k] <= '0;
      for (int k = 0; k < 3; k++) acc_q[k] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy   <= 1'b1;
        key_q  <= key;
        nk_q   <= 4'(rounds_of(key_size) - 6);
        nr     <= rounds_of(key_size);
        last_q <= 6'(4 * (int'(rounds_of(key_size)) + 1) - 1);
        i_q    <= '0;
        mod_q  <= '0;
        rcon_q <= 8'h01;
      end else if (busy) begin
        for (int k = 7; k > 0; k--) win_q[k] <= win_q[k-1];
        win_q[0] <= w_new;
        if (i_q[1:0] != 2'd3) acc_q[i_q[1:0]] <= w_new;
        if (i_q >= 6'(nk_q) && mod_q == 0) rcon_q <= xtime(rcon_q);
        mod_q <= (mod_q == nk_q - 1) ? '0 : mod_q + 1'b1;
        i_q   <= i_q + 1'b1;
        if (i_q == last_q) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign ram_we    = busy && (i_q[1:0] == 2'd3);
  assign ram_waddr = i_q[5:2];
  assign ram_wdata = {acc_q[0], acc_q[1], acc_q[2], w_new};
endmodule
