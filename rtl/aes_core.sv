// aes_core: AES (Rijndael) encryption and decryption of 128-bit blocks with
// 128-, 192- or 256-bit keys, behind 8-bit ports.
//
// Organisation (after the original design's AES block diagram): key bytes collect in
// a 256-bit register, text bytes in a 128-bit register. The key-scheduling
// unit expands the key once into the key-storing RAM; the round unit then
// encrypts or decrypts any number of blocks with it, fetching one round key
// per round from the RAM. The 128-bit result leaves through the output
// multiplexer and 8-bit register. The key size is chosen by key_size when the
// expansion starts and needs no other change to the hardware.
//
// Interface:
//   key_byte/key_byte_valid  shift a byte into the 256-bit key register; the
//                            last 16, 24 or 32 bytes sent form the key, first
//                            byte most significant
//   key_size                 KEY128, KEY192 or KEY256, sampled with key_expand
//   key_expand               start the key expansion (ignored while it runs)
//   key_busy                 expansion running (44, 52 or 60 cycles)
//   key_done                 one-cycle pulse: round keys stored
//   din_byte/din_valid       shift a byte into the 128-bit text register
//   decrypt, start           process the text register; start is ignored
//                            while a block or a key expansion is running
//   busy, done               block running; done pulses when the result is
//                            in the output register
//   dout_byte/dout_valid     the sixteen result bytes, most significant first
// Timing: done comes in the cycle after the (2*Nr+3)-th clock edge counted
// from the edge that ends the start cycle; the sixteen output bytes follow
// in cycles 2 to 17 after done.
module aes_core
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] key_byte,
  input  logic       key_byte_valid,
  input  key_size_e  key_size,
  input  logic       key_expand,
  output logic       key_busy,
  output logic       key_done,
  input  logic [7:0] din_byte,
  input  logic       din_valid,
  input  logic       decrypt,
  input  logic       start,
  output logic       busy,
  output logic       done,
  output logic [7:0] dout_byte,
  output logic       dout_valid
);
  logic [255:0] key_reg, key_aligned;
  state_t       text_reg, result, ram_wdata, ram_rdata;
  logic [3:0]   nr, ram_waddr, ram_raddr;
  logic         ram_we, round_start;

  byte_shift_in #(.WIDTH(256)) u_key_reg (
    .clk, .rst_n, .byte_valid(key_byte_valid), .byte_in(key_byte), .data(key_reg));

  byte_shift_in #(.WIDTH(128)) u_text_reg (
    .clk, .rst_n, .byte_valid(din_valid), .byte_in(din_byte), .data(text_reg));

  // The key occupies the low end of the shift register; the key schedule
  // expects it at the high end.
  always_comb begin
    case (key_size)
      KEY128:  key_aligned = {key_reg[127:0], 128'h0};
      KEY192:  key_aligned = {key_reg[191:0], 64'h0};
      default: key_aligned = key_reg;
    endcase
  end

  aes_key_schedule u_key_sched (
    .clk, .rst_n, .start(key_expand && !busy), .key_size, .key(key_aligned),
    .busy(key_busy), .done(key_done), .nr,
    .ram_we, .ram_waddr, .ram_wdata);

  aes_key_ram #(.DEPTH(RK_WORDS), .WIDTH(128)) u_key_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .raddr(ram_raddr), .rdata(ram_rdata));

  assign round_start = start && !key_busy;

  aes_round_scheduler u_round (
    .clk, .rst_n, .start(round_start), .decrypt, .nr, .din(text_reg),
    .key_raddr(ram_raddr), .key_rdata(ram_rdata),
    .busy, .done, .dout(result));

  byte_shift_out #(.WIDTH(128)) u_out (
    .clk, .rst_n, .load(done), .data(result), .dout(dout_byte), .dout_valid, .busy());

  // The key RAM is never rewritten while a block is using it.
  a_no_rekey: assert property (@(posedge clk) disable iff (!rst_n) !(ram_we && busy));
endmodule
