// crypto_fpga_top: the FPGA logic of a PCI secret-key block-cipher accelerator
// card, holding a two-key Triple-DES core and an AES core side by side.
//
// On the card the FPGA sits behind a PCI controller and a local-bus
// controller; the host sends keys and text over an 8-bit path and reads the
// result back the same way. Those board devices are outside this design, so
// each core's 8-bit ports are brought straight out with a tdes_ or aes_
// prefix. The two cores share only clock and reset and can run at the same
// time. Port meanings and timing are those of tdes_core and aes_core.
module crypto_fpga_top
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // Triple-DES (E-D-E, keys K1, K2, K1)
  input  logic [7:0] tdes_key_byte,
  input  logic       tdes_key_byte_valid,
  input  logic       tdes_key_load_k1,
  input  logic       tdes_key_load_k2,
  input  logic [7:0] tdes_din_byte,
  input  logic       tdes_din_valid,
  input  logic       tdes_decrypt,
  input  logic       tdes_start,
  output logic       tdes_busy,
  output logic       tdes_done,
  output logic [7:0] tdes_dout_byte,
  output logic       tdes_dout_valid,
  // AES (128/192/256-bit keys)
  input  logic [7:0] aes_key_byte,
  input  logic       aes_key_byte_valid,
  input  key_size_e  aes_key_size,
  input  logic       aes_key_expand,
  output logic       aes_key_busy,
  output logic       aes_key_done,
  input  logic [7:0] aes_din_byte,
  input  logic       aes_din_valid,
  input  logic       aes_decrypt,
  input  logic       aes_start,
  output logic       aes_busy,
  output logic       aes_done,
  output logic [7:0] aes_dout_byte,
  output logic       aes_dout_valid
);
  tdes_core u_tdes (
    .clk, .rst_n,
    .key_byte(tdes_key_byte), .key_byte_valid(tdes_key_byte_valid),
    .key_load_k1(tdes_key_load_k1), .key_load_k2(tdes_key_load_k2),
    .din_byte(tdes_din_byte), .din_valid(tdes_din_valid),
    .decrypt(tdes_decrypt), .start(tdes_start),
    .busy(tdes_busy), .done(tdes_done),
    .dout_byte(tdes_dout_byte), .dout_valid(tdes_dout_valid));

  aes_core u_aes (
    .clk, .rst_n,
    .key_byte(aes_key_byte), .key_byte_valid(aes_key_byte_valid),
    .key_size(aes_key_size), .key_expand(aes_key_expand),
    .key_busy(aes_key_busy), .key_done(aes_key_done),
    .din_byte(aes_din_byte), .din_valid(aes_din_valid),
    .decrypt(aes_decrypt), .start(aes_start),
    .busy(aes_busy), .done(aes_done),
    .dout_byte(aes_dout_byte), .dout_valid(aes_dout_valid));
endmodule
