// tb_aes_key_ram: random writes and reads against a model of the RAM,
// checking the one-cycle read latency (the output only changes on a clock
// edge) and read-before-write on a collision.
module tb_aes_key_ram;
  logic clk = 0, we = 0;
  logic [3:0] waddr = '0, raddr = '0;
  logic [127:0] wdata = '0, rdata;
  logic [127:0] model [15];
  logic [127:0] exp;
  int checks = 0, failures = 0;

  aes_key_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    // Fill every word first so that every read has a defined value.
    for (int a = 0; a < 15; a++) begin
      @(negedge clk); we = 1; waddr = 4'(a); wdata = {$urandom, $urandom, $urandom, $urandom};
      model[a] = wdata;
    end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1);
      waddr = 4'($urandom_range(0, 14));
      raddr = 4'($urandom_range(0, 14));
      wdata = {$urandom, $urandom, $urandom, $urandom};
      exp = model[raddr];
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      checks++;
      if (rdata !== exp) begin failures++; $display("FAIL raddr=%0d got=%h exp=%h", raddr, rdata, exp); end
      // A new read address must not show before the next clock edge.
      raddr = raddr + 4'd1;
      if (raddr == 4'd15) raddr = 4'd0;
      #1;
      checks++;
      if (rdata !== exp) begin failures++; $display("FAIL read data changed without a clock edge"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
