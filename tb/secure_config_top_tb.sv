// secure_config_top_tb: end-to-end test of the secure configuration unit.
//
// Builds CCM-protected frames with the reference model and feeds them in:
//   - a genuine frame with pauses in the stream (valid low) -> startup, and
//     the user logic reads back exactly the plaintext bitstream;
//   - a frame with a wrong MAC, and one with a flipped ciphertext bit ->
//     abort, and the loaded words are cleared to zero;
//   - a frame longer than the memory -> immediate abort;
//   - an empty bitstream (MAC only) -> startup.
// While a configuration is in progress the user-logic port must read zero.
// Decryption time is checked against 110 cycles per word. Each mechanism is
// counted and one that never happened counts as a failure.
module secure_config_top_tb;
  import ccm_ref_pkg::*;
  import ccm_pkg::*;

  localparam int unsigned DEPTH = 64;
  localparam int unsigned AW = $clog2(DEPTH);

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
  int n_stall = 0, n_startup = 0, n_abort_mac = 0, n_clear = 0, n_oversize = 0, n_gated = 0;

  always #5 clk = ~clk;

  secure_config_top #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Count cycles in which the unit is busy while the user port is being read.
  always @(negedge clk) if (rst_n && cfg_busy && ul_rd_en) begin
    n_gated++;
    checks++;
    if (ul_rd_data !== '0) begin failures++; $display("FAIL user port open while busy"); end
  end

  // Send one frame: MAC then words; random pauses when stall is set.
  task automatic configure(input logic [127:0] mac, input logic [127:0] w [], input int m,
                           input bit stall, output int dec_cycles);
    int sent = 0;
    @(negedge clk);
    nblocks = nblk_t'(m); cfg_start = 1'b1;
    @(negedge clk);
    cfg_start = 1'b0;
    while (sent <= m) begin
      if (stall && ($urandom % 3 == 0)) begin
        bs_valid = 1'b0;
        n_stall++;
      end else begin
        bs_valid = 1'b1;
        bs_data  = (sent == 0) ? mac : w[sent - 1];
      end
      @(posedge clk);
      if (bs_valid && bs_ready) sent++;
      @(negedge clk);
      bs_valid = 1'b0;
    end
    dec_cycles = 0;
    while (cfg_busy) begin @(negedge clk); dec_cycles++; end
  endtask

  task automatic make_frame(input int m, output logic [127:0] p [], output logic [127:0] c [],
                            output logic [127:0] mac);
    logic [127:0] y;
    p = new[m]; c = new[m];
    y = aes128(key, ref_b0(nonce, m));
    for (int i = 0; i < m; i++) begin
      p[i] = {$urandom, $urandom, $urandom, $urandom};
      y = aes128(key, y ^ p[i]);
      c[i] = p[i] ^ aes128(key, ref_ctr(nonce, i + 1));
    end
    mac = y ^ aes128(key, ref_ctr(nonce, 0));
  endtask

  task automatic read_word(input int a, output logic [127:0] d);
    @(negedge clk);
    ul_rd_en = 1'b1; ul_rd_addr = AW'(a);
    @(negedge clk);
    ul_rd_en = 1'b0;
    d = ul_rd_data;
  endtask

  initial begin
    automatic logic [127:0] p [], c [];
    logic [127:0] mac, d;
    int cyc, m;
    rst_n = 1'b0; cfg_start = 1'b0; bs_valid = 1'b0; bs_data = '0;
    ul_rd_en = 1'b0; ul_rd_addr = '0; nblocks = '0;
    key   = {$urandom, $urandom, $urandom, $urandom};
    nonce = {$urandom, $urandom, $urandom};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. genuine frame with stalls
    m = 9;
    make_frame(m, p, c, mac);
    fork
      begin
        // try to read while the unit works
        repeat (30) @(negedge clk);
        ul_rd_en = 1'b1; ul_rd_addr = '0;
        repeat (5) @(negedge clk);
        ul_rd_en = 1'b0;
      end
      configure(mac, c, m, 1'b1, cyc);
    join
    check(cfg_startup && !cfg_abort, "genuine frame accepted");
    // decrypt: 1 start + 110*(m+1)+3 CCM cycles + compare (2)
    check(cyc >= 110 * (m + 1) && cyc <= 110 * (m + 1) + 8, $sformatf("decrypt time %0d", cyc));
    if (cfg_startup) n_startup++;
    for (int i = 0; i < m; i++) begin
      read_word(i, d);
      check(d === p[i], $sformatf("readback word %0d", i));
    end

    // 2. wrong MAC
    nonce = {$urandom, $urandom, $urandom};
    m = 6;
    make_frame(m, p, c, mac);
    mac[0] = ~mac[0];
    configure(mac, c, m, 1'b0, cyc);
    check(cfg_abort && !cfg_startup, "wrong MAC aborted");
    if (cfg_abort) n_abort_mac++;
    begin
      automatic bit all_zero = 1'b1;
      for (int i = 0; i < m; i++) if (dut.u_mem.mem[i] !== '0) all_zero = 1'b0;
      check(all_zero, "memory cleared after abort");
      if (all_zero) n_clear++;
    end
    read_word(0, d);
    check(d === '0, "user port closed after abort");

    // 3. tampered ciphertext
    nonce = {$urandom, $urandom, $urandom};
    m = 4;
    make_frame(m, p, c, mac);
    c[2][77] = ~c[2][77];
    configure(mac, c, m, 1'b1, cyc);
    check(cfg_abort && !cfg_startup, "tampered bitstream aborted");
    if (cfg_abort) n_abort_mac++;

    // 4. frame larger than the memory
    @(negedge clk);
    nblocks = nblk_t'(DEPTH + 1); cfg_start = 1'b1;
    @(negedge clk);
    cfg_start = 1'b0;
    @(negedge clk);
    check(cfg_abort && !bs_ready, "oversized frame aborted");
    if (cfg_abort) n_oversize++;

    // 5. empty bitstream, then a full-memory one
    nonce = {$urandom, $urandom, $urandom};
    make_frame(0, p, c, mac);
    configure(mac, c, 0, 1'b0, cyc);
    check(cfg_startup, "empty frame accepted");
    if (cfg_startup) n_startup++;
    m = DEPTH;
    make_frame(m, p, c, mac);
    configure(mac, c, m, 1'b0, cyc);
    check(cfg_startup, "full-memory frame accepted");
    read_word(DEPTH - 1, d);
    check(d === p[DEPTH - 1], "last word of full memory");

    check(n_stall > 0, "stream stall happened");
    check(n_startup > 0, "startup happened");
    check(n_abort_mac > 0, "MAC-mismatch abort happened");
    check(n_clear > 0, "clear happened");
    check(n_oversize > 0, "oversize abort happened");
    check(n_gated > 0, "user port read while busy");
    $display("mechanisms: stall=%0d startup=%0d mac_abort=%0d clear=%0d oversize=%0d gated=%0d",
             n_stall, n_startup, n_abort_mac, n_clear, n_oversize, n_gated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
