// tb_workload_throughput: the throughput workloads of the design, run on the
// full top level. Each engine encrypts a stream of six blocks (ECB, counting
// plaintexts) with the next block's bytes loaded while the current one is
// being processed, and each new block started as soon as the engine accepts
// it. Measured: clock cycles between successive starts, which set the
// sustained rate. Checked: every ciphertext, and the period of 49 cycles for
// Triple-DES and 2*Nr+3 = 23/27/31 cycles for AES-128/192/256. The rates at
// the clock frequencies reported for the original FPGA implementation
// (69 MHz Triple-DES, 30 MHz AES) are printed for comparison.
module tb_workload_throughput;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] tdes_key_byte = '0, tdes_din_byte = '0, tdes_dout_byte;
  logic tdes_key_byte_valid = 0, tdes_key_load_k1 = 0, tdes_key_load_k2 = 0;
  logic tdes_din_valid = 0, tdes_decrypt = 0, tdes_start = 0;
  logic tdes_busy, tdes_done, tdes_dout_valid;
  logic [7:0] aes_key_byte = '0, aes_din_byte = '0, aes_dout_byte;
  logic aes_key_byte_valid = 0, aes_key_expand = 0, aes_din_valid = 0, aes_decrypt = 0, aes_start = 0;
  key_size_e aes_key_size = KEY128;
  logic aes_key_busy, aes_key_done, aes_busy, aes_done, aes_dout_valid;
  int checks = 0, failures = 0;
  longint cycle = 0;

  localparam int NBLK = 6;
  localparam logic [63:0] TDES_K1 = 64'h38c275f34aed056a, TDES_K2 = 64'hd6ea8eeca4192fa1;
  localparam logic [63:0] TDES_PT0 = 64'h0123456789abcdef;
  localparam logic [63:0] TDES_CT [NBLK] = '{
    64'h821f4d40fed9d829, 64'h8526d1692a7913c1, 64'hb7913f9a2dc80dfc,
    64'hdb39b299ff26a540, 64'h77f29391c0d3f709, 64'h8fce1f3b4ec44ffb};
  // Keys are 00 01 02 ... (16, 24 or 32 bytes).
  localparam logic [127:0] AES_PT0 = 128'h00112233445566778899aabbccddeeff;
  localparam logic [127:0] AES_CT [3][NBLK] = '{
    '{128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'hdd78873daa5d87f8e497bef5411ece32,
      128'h967013bf1b116c4d3928b4bd63a52e80, 128'h79a3990dab3d3c114ea875fef81aee77,
      128'h45f1501d39855550bfbbc2d5348bdb1f, 128'h77f324cafbc218b4a702e8a1ff696f52},
    '{128'hdda97ca4864cdfe06eaf70a0ec0d7191, 128'h45c5ed98b36f4338cffadefa0c2b0628,
      128'h06c5489bfa9f0c4cfdba3da69460d684, 128'h5937a5d31af200c02a8d6ef6703c4cd9,
      128'h61e2f160d17a8db50842ba1f45ffbaff, 128'h03377d6b68eca97634906322c66092d2},
    '{128'h8ea2b7ca516745bfeafc49904b496089, 128'hf67f8ef24cf18cca790dad524e5db97b,
      128'h20bb06132030dc754076b91fefcf0c8e, 128'hb162f110c26b0828146368e80b525079,
      128'hd15d9473d4f657e35125cdf45a78b6ff, 128'hf71aa69cbcc35891e0374428940cb1d2}};

  crypto_fpga_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  function automatic void check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endfunction

  // Output collectors: compare every completed result with the expected stream.
  logic [63:0]  tdes_acc;
  logic [127:0] aes_acc;
  int tdes_nb = 0, tdes_idx = 0, aes_nb = 0, aes_idx = 0, aes_cfg = 0;
  always @(negedge clk) begin
    if (tdes_dout_valid) begin
      tdes_acc = {tdes_acc[55:0], tdes_dout_byte};
      if (++tdes_nb == 8) begin
        tdes_nb = 0;
        check(tdes_acc == TDES_CT[tdes_idx], $sformatf("tdes block %0d got %h", tdes_idx, tdes_acc));
        tdes_idx++;
      end
    end
    if (aes_dout_valid) begin
      aes_acc = {aes_acc[119:0], aes_dout_byte};
      if (++aes_nb == 16) begin
        aes_nb = 0;
        check(aes_acc == AES_CT[aes_cfg][aes_idx],
              $sformatf("aes cfg %0d block %0d got %h", aes_cfg, aes_idx, aes_acc));
        aes_idx++;
      end
    end
  end

  task automatic tdes_stream();
    longint t_prev = 0;
    logic [63:0] pt;
    for (int s = 0; s < 2; s++) begin
      logic [63:0] k = (s != 0) ? TDES_K2 : TDES_K1;
      for (int i = 7; i >= 0; i--) begin
        @(negedge clk); tdes_key_byte = k[8*i +: 8]; tdes_key_byte_valid = 1;
      end
      @(negedge clk); tdes_key_byte_valid = 0; tdes_key_load_k1 = !s; tdes_key_load_k2 = s;
      @(negedge clk); tdes_key_load_k1 = 0; tdes_key_load_k2 = 0;
    end
    pt = TDES_PT0;
    for (int i = 7; i >= 0; i--) begin
      @(negedge clk); tdes_din_byte = pt[8*i +: 8]; tdes_din_valid = 1;
    end
    @(negedge clk); tdes_din_valid = 0;
    for (int n = 0; n < NBLK; n++) begin
      while (tdes_busy) @(negedge clk);
      tdes_start = 1; tdes_decrypt = 0;
      if (n > 0) begin
        $display("tdes: %0d cycles per 64-bit block -> %0.1f Mbit/s at 69 MHz",
                 cycle - t_prev, 64.0 * 69.0 / real'(cycle - t_prev));
        check(cycle - t_prev == 49, $sformatf("tdes period %0d", cycle - t_prev));
      end
      t_prev = cycle;
      @(negedge clk); tdes_start = 0;
      if (n < NBLK - 1) begin   // next block goes in while this one runs
        pt = TDES_PT0 + 64'(n + 1);
        for (int i = 7; i >= 0; i--) begin
          tdes_din_byte = pt[8*i +: 8]; tdes_din_valid = 1;
          @(negedge clk);
        end
        tdes_din_valid = 0;
      end
    end
    while (tdes_idx < NBLK) @(negedge clk);
  endtask

  task automatic aes_stream(input int ks);
    longint t_prev = 0;
    logic [127:0] pt;
    int nr = 10 + 2 * ks;
    for (int i = 0; i < 16 + 8 * ks; i++) begin
      @(negedge clk); aes_key_byte = 8'(i); aes_key_byte_valid = 1;
    end
    @(negedge clk); aes_key_byte_valid = 0; aes_key_size = key_size_e'(ks); aes_key_expand = 1;
    @(negedge clk); aes_key_expand = 0;
    while (!aes_key_done) @(negedge clk);
    aes_cfg = ks; aes_idx = 0;
    pt = AES_PT0;
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); aes_din_byte = pt[127-8*i -: 8]; aes_din_valid = 1;
    end
    @(negedge clk); aes_din_valid = 0;
    for (int n = 0; n < NBLK; n++) begin
      while (aes_busy) @(negedge clk);
      aes_start = 1; aes_decrypt = 0;
      if (n > 0) begin
        $display("aes-%0d: %0d cycles per 128-bit block -> %0.1f Mbit/s at 30 MHz",
                 128 + 64 * ks, cycle - t_prev, 128.0 * 30.0 / real'(cycle - t_prev));
        check(cycle - t_prev == 2 * nr + 3, $sformatf("aes period %0d", cycle - t_prev));
      end
      t_prev = cycle;
      @(negedge clk); aes_start = 0;
      if (n < NBLK - 1) begin
        pt = AES_PT0 + 128'(n + 1);
        for (int i = 0; i < 16; i++) begin
          aes_din_byte = pt[127-8*i -: 8]; aes_din_valid = 1;
          @(negedge clk);
        end
        aes_din_valid = 0;
      end
    end
    while (aes_idx < NBLK) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      tdes_stream();
      for (int ks = 0; ks < 3; ks++) aes_stream(ks);
    join
    check(tdes_idx == NBLK, "tdes results missing");
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
