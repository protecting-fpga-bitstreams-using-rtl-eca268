// ccm_core_tb: runs the CCM core in both directions against the reference
// model. For several payload sizes (including an empty one) it encrypts a
// random payload and checks the ciphertext left in memory, the tag and the
// cycle count 110*(m+1)+3; then it decrypts that ciphertext and checks the
// recovered plaintext and that the tag equals the sender's; finally a
// tampered ciphertext must give a different tag.
module ccm_core_tb;
  import ccm_ref_pkg::*;
  import ccm_pkg::*;

  localparam int unsigned AW = 6;

  logic clk = 1'b0;
  logic rst_n, start, decrypt, busy, done;
  logic [127:0] key, tag;
  nonce_t nonce;
  nblk_t  nblocks;
  logic mem_rd_en, mem_wr_en, tb_wr;
  logic [AW-1:0] mem_rd_addr, mem_wr_addr, tb_addr;
  logic [127:0] mem_rd_data, mem_wr_data, tb_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ccm_core #(.AW(AW)) dut (.*);

  // The testbench writes the memory while the core is idle.
  bitstream_mem #(.DEPTH(1 << AW)) u_mem (
    .clk     (clk),
    .rd_en   (mem_rd_en),
    .rd_addr (mem_rd_addr),
    .rd_data (mem_rd_data),
    .wr_en   (mem_wr_en | tb_wr),
    .wr_addr (tb_wr ? tb_addr : mem_wr_addr),
    .wr_data (tb_wr ? tb_data : mem_wr_data)
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load_mem(input logic [127:0] d [], input int m);
    for (int i = 0; i < m; i++) begin
      @(negedge clk);
      tb_wr = 1'b1; tb_addr = AW'(i); tb_data = d[i];
    end
    @(negedge clk);
    tb_wr = 1'b0;
  endtask

  task automatic run(input bit dec, input int m, output int cycles);
    @(negedge clk);
    decrypt = dec; nblocks = nblk_t'(m); start = 1'b1;
    @(negedge clk);
    start = 1'b0; cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    automatic logic [127:0] p [], c [];
    logic [127:0] y, s0, exp_tag;
    int cyc;
    automatic int sizes [5] = '{0, 1, 2, 5, 12};
    rst_n = 1'b0; start = 1'b0; decrypt = 1'b0; tb_wr = 1'b0;
    tb_addr = '0; tb_data = '0; key = '0; nonce = '0; nblocks = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    foreach (sizes[si]) begin
      automatic int m = sizes[si];
      key   = {$urandom, $urandom, $urandom, $urandom};
      nonce = {$urandom, $urandom, $urandom};
      p = new[m]; c = new[m];
      for (int i = 0; i < m; i++) p[i] = {$urandom, $urandom, $urandom, $urandom};
      // reference CCM (SP 800-38C)
      y = aes128(key, ref_b0(nonce, m));
      for (int i = 0; i < m; i++) y = aes128(key, y ^ p[i]);
      s0 = aes128(key, ref_ctr(nonce, 0));
      exp_tag = y ^ s0;
      for (int i = 0; i < m; i++) c[i] = p[i] ^ aes128(key, ref_ctr(nonce, i + 1));

      // encryption
      load_mem(p, m);
      run(1'b0, m, cyc);
      check(tag === exp_tag, $sformatf("enc tag m=%0d", m));
      check(cyc == 110 * (m + 1) + 3, $sformatf("enc cycles m=%0d got %0d", m, cyc));
      for (int i = 0; i < m; i++)
        check(u_mem.mem[i] === c[i], $sformatf("ciphertext m=%0d i=%0d", m, i));

      // decryption of what is now in memory
      run(1'b1, m, cyc);
      check(tag === exp_tag, $sformatf("dec tag m=%0d", m));
      check(cyc == 110 * (m + 1) + 3, $sformatf("dec cycles m=%0d got %0d", m, cyc));
      for (int i = 0; i < m; i++)
        check(u_mem.mem[i] === p[i], $sformatf("plaintext m=%0d i=%0d", m, i));

      // tampered ciphertext: flip one bit, decrypt, tag must differ
      if (m > 0) begin
        c[m/2][5] = ~c[m/2][5];
        load_mem(c, m);
        run(1'b1, m, cyc);
        check(tag !== exp_tag, $sformatf("tamper m=%0d", m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
