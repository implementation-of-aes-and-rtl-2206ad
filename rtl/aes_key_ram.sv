// aes_key_ram: key-storing RAM of the AES core.
//
// Holds the expanded round keys, one 128-bit round key per word, so that the
// round loop can fetch the key of any round in either direction. One write
// port (from the key schedule) and one read port (to the round scheduler),
// both synchronous to clk, as in an FPGA dual-ported block RAM: rdata shows
// the word at raddr one clock edge after raddr is presented. A write and a
// read of the same word in one cycle return the old contents. The contents
// are not reset. The RAM itself is part of the original design; its size
// (enough for the 15 round keys of AES-256) and port timing are this
// design's choices.
module aes_key_ram #(
  parameter int unsigned DEPTH = 15,    // round keys of AES-256 (14 rounds + 1)
  parameter int unsigned WIDTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

  a_waddr: assert property (@(posedge clk) we |-> int'(waddr) < DEPTH);
endmodule
