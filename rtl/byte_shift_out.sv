// byte_shift_out: output multiplexer and 8-bit output register.
//
// A result word of WIDTH bits is stored on load; then the multiplexer selects
// one byte per cycle, most significant first, into the 8-bit output register,
// whose contents are flagged by dout_valid. The first byte is in the register
// one clock edge after load and the last WIDTH/8 edges after load. A new load
// restarts the sequence. busy is high while bytes remain to be sent. The
// multiplexer and 8-bit output register are the original design's; byte
// order and the valid flag are this design's choices.
module byte_shift_out #(
  parameter int unsigned WIDTH = 64   // result width in bits, a multiple of 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] data,
  output logic [7:0]       dout,
  output logic             dout_valid,
  output logic             busy
);
  localparam int unsigned NBYTES = WIDTH / 8;
  localparam int unsigned CW = $clog2(NBYTES + 1);

  logic [WIDTH-1:0] word_q;
  logic [CW-1:0]    left_q;   // bytes still to send

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_q     <= '0;
      left_q     <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else if (load) begin
      word_q     <= data;
      left_q     <= CW'(NBYTES);
      dout_valid <= 1'b0;
    end else if (left_q != 0) begin
      dout       <= word_q[8*left_q-1 -: 8];
      left_q     <= left_q - 1'b1;
      dout_valid <= 1'b1;
    end else begin
      dout_valid <= 1'b0;
    end
  end

  assign busy = (left_q != 0);

  initial assert (WIDTH % 8 == 0 && WIDTH >= 16) else $error("WIDTH must be a multiple of 8");
endmodule
