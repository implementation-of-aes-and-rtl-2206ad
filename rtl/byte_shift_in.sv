// byte_shift_in: wide input register filled from an 8-bit port.
//
// Both cores receive keys and text blocks one byte at a time over an 8-bit
// path and collect them in a register as wide as the key or block (64, 128 or
// 256 bits). Each cycle with byte_valid high shifts the register left by
// eight bits and puts byte_in in the low byte, so after WIDTH/8 bytes the
// first byte sent is the most significant one. The register keeps its value
// until more bytes arrive; it is readable at all times. The 8-bit path into
// wide registers is the original design's; byte order and the valid strobe
// are this design's choices.
module byte_shift_in #(
  parameter int unsigned WIDTH = 64   // register width in bits, a multiple of 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             byte_valid,
  input  logic [7:0]       byte_in,
  output logic [WIDTH-1:0] data
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          data <= '0;
    else if (byte_valid) data <= {data[WIDTH-9:0], byte_in};
  end

  initial assert (WIDTH % 8 == 0 && WIDTH >= 16) else $error("WIDTH must be a multiple of 8");
endmodule
