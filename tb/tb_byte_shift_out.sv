// tb_byte_shift_out: loads random 128-bit words and checks that exactly 16
// bytes come out, most significant first, in the 16 cycles after load, that
// busy covers that time, and that a load in mid-stream restarts the sequence.
module tb_byte_shift_out;
  localparam int unsigned W = 128;
  logic clk = 0, rst_n = 0, load = 0;
  logic [W-1:0] data = '0;
  logic [7:0] dout;
  logic dout_valid, busy;
  int checks = 0, failures = 0;

  byte_shift_out #(.WIDTH(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic send(input logic [W-1:0] w, input int stop_after);
    @(negedge clk); data = w; load = 1;
    @(negedge clk); load = 0; data = '0;
    check(busy, "busy after load");
    for (int i = 0; i < W/8 && i < stop_after; i++) begin
      @(negedge clk);
      check(dout_valid, "valid");
      check(dout == w[W-1-8*i -: 8], $sformatf("byte %0d got %h exp %h", i, dout, w[W-1-8*i -: 8]));
    end
  endtask

  initial begin
    logic [W-1:0] w;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!dout_valid && !busy, "idle after reset");
    for (int n = 0; n < 6; n++) begin
      w = {$urandom, $urandom, $urandom, $urandom};
      send(w, (n == 2) ? 5 : W/8);
      if (n != 2) begin
        @(negedge clk);
        check(!dout_valid && !busy, "idle after last byte");
      end
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
