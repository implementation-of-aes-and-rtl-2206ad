// tb_byte_shift_in: sends random bytes, with idle cycles between some of them,
// and checks that the register always holds the last WIDTH/8 bytes sent, the
// earliest in the most significant position.
module tb_byte_shift_in;
  localparam int unsigned W = 64;
  logic clk = 0, rst_n = 0, byte_valid = 0;
  logic [7:0] byte_in = '0;
  logic [W-1:0] data, model = '0;
  int checks = 0, failures = 0;

  byte_shift_in dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (data !== '0) begin failures++; $display("FAIL not cleared by reset"); end
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      byte_valid = ($urandom_range(0, 3) != 0);
      byte_in = 8'($urandom);
      @(posedge clk); #1;
      if (byte_valid) model = {model[W-9:0], byte_in};
      checks++;
      if (data !== model) begin failures++; $display("FAIL got=%h exp=%h", data, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
