// tb_aes_round_scheduler: the round loop with a key schedule and key RAM
// around it. For every known-answer vector the key is expanded, the block is
// encrypted and the ciphertext decrypted, and the results and the 2*Nr+3
// cycle latency are checked.
module tb_aes_round_scheduler;
  import aes_pkg::*;
  import aes_vectors_pkg::*;
  logic clk = 0, rst_n = 0, ks_start = 0, start = 0, decrypt = 0;
  key_size_e key_size = KEY128;
  logic [255:0] key = '0;
  logic ks_busy, ks_done, ram_we, busy, done;
  logic [3:0] nr, ram_waddr, ram_raddr;
  state_t ram_wdata, ram_rdata, din = '0, dout;
  int checks = 0, failures = 0;

  aes_key_schedule u_ks (.clk, .rst_n, .start(ks_start), .key_size, .key, .busy(ks_busy),
                         .done(ks_done), .nr, .ram_we, .ram_waddr, .ram_wdata);
  aes_key_ram u_ram (.clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
                     .raddr(ram_raddr), .rdata(ram_rdata));
  aes_round_scheduler dut (.clk, .rst_n, .start, .decrypt, .nr, .din, .key_raddr(ram_raddr),
                           .key_rdata(ram_rdata), .busy, .done, .dout);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic block(input logic dec, input state_t x, input state_t exp, input int nrounds);
    int lat;
    @(negedge clk); din = x; decrypt = dec; start = 1;
    @(negedge clk); start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    check(lat == 2 * nrounds + 3, $sformatf("latency %0d for Nr=%0d", lat, nrounds));
    check(dout == exp, $sformatf("dec=%0b in=%h got=%h exp=%h", dec, x, dout, exp));
  endtask

  initial begin
    int nrounds;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (AES_VEC[v]) begin
      @(negedge clk); key = AES_VEC[v].key; key_size = key_size_e'(AES_VEC[v].ks); ks_start = 1;
      @(negedge clk); ks_start = 0;
      while (!ks_done) @(negedge clk);
      nrounds = 10 + 2 * AES_VEC[v].ks;
      block(1'b0, AES_VEC[v].pt, AES_VEC[v].ct, nrounds);
      block(1'b1, AES_VEC[v].ct, AES_VEC[v].pt, nrounds);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
