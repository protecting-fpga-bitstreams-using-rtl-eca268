// cfg_ctrl_tb: the configuration controller against behavioural stand-ins
// for the CCM core and the MAC comparator. Checks that the MAC word is
// captured, that the frame words land at addresses 0..n-1 (with stream
// pauses), that the CCM core is started once and owns the memory ports while
// it runs, that a match leads to startup and opens the user port, and that a
// mismatch clears exactly the loaded words and aborts. Also an oversized
// frame must abort without loading.
module cfg_ctrl_tb;
  import ccm_pkg::*;
  localparam int unsigned DEPTH = 32;
  localparam int unsigned AW = 5;

  logic clk = 1'b0;
  logic rst_n, cfg_start, cfg_busy, cfg_startup, cfg_abort;
  nonce_t nonce;
  nblk_t nblocks;
  logic bs_valid, bs_ready;
  logic [127:0] bs_data;
  logic ccm_start, ccm_done, ccm_rd_en, ccm_wr_en;
  nonce_t ccm_nonce;
  nblk_t ccm_nblocks;
  logic [AW-1:0] ccm_rd_addr, ccm_wr_addr;
  logic [127:0] ccm_wr_data, mac_rx;
  logic cmp_en, cmp_valid, cmp_match;
  logic mem_rd_en, mem_wr_en;
  logic [AW-1:0] mem_rd_addr, mem_wr_addr;
  logic [127:0] mem_rd_data, mem_wr_data;
  logic ul_rd_en;
  logic [AW-1:0] ul_rd_addr;
  logic [127:0] ul_rd_data;
  logic [127:0] mem [DEPTH];
  logic match_wanted;
  int ccm_starts = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cfg_ctrl #(.DEPTH(DEPTH)) dut (.*);

  // memory model
  always_ff @(posedge clk) begin
    if (mem_wr_en) mem[mem_wr_addr] <= mem_wr_data;
    if (mem_rd_en) mem_rd_data <= mem[mem_rd_addr];
  end

  // CCM stand-in: after a start, writes ~word to address 0 then reports done
  initial begin
    ccm_done = 1'b0; ccm_rd_en = 1'b0; ccm_wr_en = 1'b0;
    ccm_rd_addr = '0; ccm_wr_addr = '0; ccm_wr_data = '0;
    forever begin
      @(posedge clk);
      if (ccm_start) begin
        ccm_starts++;
        repeat (5) @(negedge clk);
        ccm_wr_en = 1'b1; ccm_wr_addr = '0; ccm_wr_data = 128'hC0FFEE;
        @(negedge clk);
        ccm_wr_en = 1'b0;
        ccm_done = 1'b1;
        @(negedge clk);
        ccm_done = 1'b0;
      end
    end
  end

  // comparator stand-in
  always_ff @(posedge clk) begin
    cmp_valid <= cmp_en;
    if (cmp_en) cmp_match <= match_wanted;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input int n, input logic [127:0] mac, input logic [127:0] w []);
    int sent = 0;
    @(negedge clk);
    nblocks = nblk_t'(n); cfg_start = 1'b1;
    @(negedge clk);
    cfg_start = 1'b0;
    while (sent <= n) begin
      bs_valid = ($urandom % 3 != 0);
      bs_data = (sent == 0) ? mac : w[sent - 1];
      @(posedge clk);
      if (bs_valid && bs_ready) sent++;
      @(negedge clk);
      bs_valid = 1'b0;
    end
    while (cfg_busy) @(negedge clk);
  endtask

  initial begin
    automatic logic [127:0] w [] = new[8];
    logic [127:0] mac;
    int s0;
    rst_n = 1'b0; cfg_start = 1'b0; bs_valid = 1'b0; bs_data = '0; nonce = 96'h1234;
    nblocks = '0; ul_rd_en = 1'b0; ul_rd_addr = '0; match_wanted = 1'b1; cmp_match = 1'b0;
    for (int i = 0; i < DEPTH; i++) mem[i] = 128'hDEAD;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    foreach (w[i]) w[i] = {$urandom, $urandom, $urandom, $urandom};
    mac = {$urandom, $urandom, $urandom, $urandom};
    s0 = ccm_starts;
    send(8, mac, w);
    check(mac_rx === mac, "MAC captured");
    check(ccm_starts == s0 + 1, "CCM started once");
    check(ccm_nonce === 96'h1234 && ccm_nblocks == 8, "CCM parameters");
    check(mem[0] === 128'hC0FFEE, "CCM write reached memory");
    for (int i = 1; i < 8; i++) check(mem[i] === w[i], $sformatf("word %0d stored", i));
    check(mem[8] === 128'hDEAD, "nothing past the frame");
    check(cfg_startup && !cfg_abort, "startup on match");
    @(negedge clk); ul_rd_en = 1'b1; ul_rd_addr = 5'd3;
    @(negedge clk); ul_rd_en = 1'b0;
    check(ul_rd_data === w[3], "user read after startup");

    match_wanted = 1'b0;
    send(8, mac, w);
    check(cfg_abort && !cfg_startup, "abort on mismatch");
    for (int i = 0; i < 8; i++) check(mem[i] === '0, $sformatf("word %0d cleared", i));
    check(mem[8] === 128'hDEAD, "clear stops at the frame end");
    check(ul_rd_data === '0, "user port closed after abort");

    @(negedge clk); nblocks = nblk_t'(DEPTH + 1); cfg_start = 1'b1;
    @(negedge clk); cfg_start = 1'b0;
    check(cfg_abort && !bs_ready, "oversized frame aborted");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
