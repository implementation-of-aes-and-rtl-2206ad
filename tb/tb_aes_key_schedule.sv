// tb_aes_key_schedule: expands the keys 000102..(16, 24 and 32 bytes) and
// compares round keys 0, 1, 3 and Nr written to the RAM port with the
// FIPS-197 schedule (computed separately), checks that every round key is
// written exactly once, that the expansion takes 4*(Nr+1) cycles, and that
// nr reports the round count.
module tb_aes_key_schedule;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  key_size_e key_size = KEY128;
  logic [255:0] key = '0;
  logic busy, done, ram_we;
  logic [3:0] nr, ram_waddr;
  state_t ram_wdata;
  state_t rk [15];
  int writes [15];
  int checks = 0, failures = 0;

  typedef struct packed { logic [1:0] ks; logic [3:0] nr; state_t k0, k1, k3, kn; } vec_t;
  localparam vec_t V [3] = '{
    '{2'd0, 4'd10, 128'h000102030405060708090a0b0c0d0e0f, 128'hd6aa74fdd2af72fadaa678f1d6ab76fe,
      128'hb6ff744ed2c2c9bf6c590cbf0469bf41, 128'h13111d7fe3944a17f307a78b4d2b30c5},
    '{2'd1, 4'd12, 128'h000102030405060708090a0b0c0d0e0f, 128'h10111213141516175846f2f95c43f4fe,
      128'h40f949b31cbabd4d48f043b810b7b342, 128'ha4970a331a78dc09c418c271e3a41d5d},
    '{2'd2, 4'd14, 128'h000102030405060708090a0b0c0d0e0f, 128'h101112131415161718191a1b1c1d1e1f,
      128'h1651a8cd0244beda1a5da4c10640bade, 128'h24fc79ccbf0979e9371ac23c6d68de36}};

  aes_key_schedule dut (.*);
  always #5 clk = ~clk;

  always @(negedge clk) if (ram_we) begin
    rk[ram_waddr] <= ram_wdata;
    writes[ram_waddr]++;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int cyc;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (V[v]) begin
      for (int a = 0; a < 15; a++) writes[a] = 0;
      @(negedge clk);
      key_size = key_size_e'(V[v].ks);
      for (int b = 0; b < 32; b++) key[255-8*b -: 8] = 8'(b);
      if (V[v].ks == 2'd0) key[127:0] = {4{32'hdeadbeef}};   // unused bits must not matter
      if (V[v].ks == 2'd1) key[63:0]  = {2{32'hdeadbeef}};
      start = 1;
      @(negedge clk); start = 0; cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc == 4 * (V[v].nr + 1) + 1, $sformatf("expansion took %0d cycles", cyc - 1));
      check(nr == V[v].nr, "nr");
      check(rk[0] == V[v].k0, $sformatf("rk0 %h", rk[0]));
      check(rk[1] == V[v].k1, $sformatf("rk1 %h", rk[1]));
      check(rk[3] == V[v].k3, $sformatf("rk3 %h", rk[3]));
      check(rk[V[v].nr] == V[v].kn, $sformatf("rk%0d %h", V[v].nr, rk[V[v].nr]));
      for (int a = 0; a < 15; a++)
        check(writes[a] == ((a <= V[v].nr) ? 1 : 0), $sformatf("writes to %0d: %0d", a, writes[a]));
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
