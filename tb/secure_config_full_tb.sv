// secure_config_full_tb: one complete secure configuration at the default
// sizes, with a bitstream as large as that of a Spartan-3 XC3S5000
// (13,271,936 bits = 103,687 words of 128 bits). The frame is protected
// with the reference CCM model, streamed in without pauses, decrypted and
// authenticated; the test checks startup, every decrypted word in the
// memory, a sample read through the user port, and the decryption time of
// 110 cycles per word, from which it prints the throughput at 350 MHz.
module secure_config_full_tb;
  import ccm_ref_pkg::*;
  import ccm_pkg::*;

  localparam int unsigned NWORDS = 103687;
  localparam int unsigned AW = 17;

  logic clk = 1'b0;
  logic rst_n;
  logic [127:0] key;
  logic cfg_start, cfg_busy, cfg_startup, cfg_abort;
  nonce_t nonce;
  nblk_t nblocks;
  logic bs_valid, bs_ready;
  logic [127:0] bs_data;
  logic ul_rd_en;
  logic [AW-1:0] ul_rd_addr;
  logic [127:0] ul_rd_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  secure_config_top dut (.*);

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    automatic logic [127:0] p [] = new[NWORDS];
    automatic logic [127:0] c [] = new[NWORDS];
    logic [127:0] y, mac;
    longint dec_cycles;
    int bad;
    rst_n = 1'b0; cfg_start = 1'b0; bs_valid = 1'b0; bs_data = '0;
    ul_rd_en = 1'b0; ul_rd_addr = '0; nblocks = '0;
    key   = {$urandom, $urandom, $urandom, $urandom};
    nonce = {$urandom, $urandom, $urandom};

    // protect the bitstream (sender side)
    y = aes128(key, ref_b0(nonce, NWORDS));
    for (int i = 0; i < NWORDS; i++) begin
      p[i] = {$urandom, $urandom, $urandom, $urandom};
      y = aes128(key, y ^ p[i]);
      c[i] = p[i] ^ aes128(key, ref_ctr(nonce, i + 1));
    end
    mac = y ^ aes128(key, ref_ctr(nonce, 0));

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    nblocks = nblk_t'(NWORDS); cfg_start = 1'b1;
    @(negedge clk);
    cfg_start = 1'b0;
    for (int i = 0; i <= NWORDS; i++) begin
      bs_valid = 1'b1;
      bs_data  = (i == 0) ? mac : c[i - 1];
      @(posedge clk);
      if (!bs_ready) begin failures++; $display("FAIL not ready at word %0d", i); end
      @(negedge clk);
    end
    bs_valid = 1'b0;
    dec_cycles = 0;
    while (cfg_busy) begin @(negedge clk); dec_cycles++; end

    check(cfg_startup && !cfg_abort, "bitstream accepted");
    bad = 0;
    for (int i = 0; i < NWORDS; i++) if (dut.u_mem.mem[i] !== p[i]) bad++;
    check(bad == 0, $sformatf("%0d decrypted words wrong", bad));
    for (int n = 0; n < 16; n++) begin
      automatic int a = (n == 15) ? NWORDS - 1 : int'($urandom % NWORDS);
      @(negedge clk); ul_rd_en = 1'b1; ul_rd_addr = AW'(a);
      @(negedge clk); ul_rd_en = 1'b0;
      check(ul_rd_data === p[a], $sformatf("user read word %0d", a));
    end
    check(dec_cycles >= 110 * (longint'(NWORDS) + 1) && dec_cycles <= 110 * (longint'(NWORDS) + 1) + 8,
          $sformatf("decrypt cycles %0d", dec_cycles));
    $display("decrypt+authenticate: %0d cycles for %0d bits, %0.1f Mbit/s at 350 MHz",
             dec_cycles, NWORDS * 128, 128.0 * NWORDS * 350.0 / real'(dec_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
