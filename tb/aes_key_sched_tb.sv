// aes_key_sched_tb: expands the FIPS-197 Appendix A.1 key one round per
// step, supplying SubWord from the reference S-box as the core's S-boxes
// would, and checks all four words of every round key (round 1 starts
// a0fafe17, round 10 is d014f9a8 c9ee2589 e13f0cc8 b6630ca6), then repeats
// with random keys against the reference expansion.
module aes_key_sched_tb;
  import ccm_ref_pkg::*;
  logic clk = 1'b0;
  logic load, step;
  logic [127:0] key;
  logic [31:0] subword, rk_word, rot_w3;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes_key_sched dut (.*);

  // SubWord as done by the core's S-boxes
  always_comb for (int i = 0; i < 4; i++) subword[8*i +: 8] = sb(rot_w3[8*i +: 8]);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference round keys
  function automatic void expand(input logic [127:0] k, output logic [31:0] w [44]);
    logic [7:0] rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = k[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        for (int b = 0; b < 4; b++) t[8*b +: 8] = sb(t[8*b +: 8]);
        t ^= {rc, 24'h0};
        rc = gmul(rc, 2);
      end
      w[i] = w[i-4] ^ t;
    end
  endfunction

  task automatic run_key(input logic [127:0] k, output logic [31:0] got [44]);
    @(negedge clk);
    key = k; load = 1'b1; step = 1'b0;
    @(negedge clk);
    load = 1'b0;
    for (int r = 0; r <= 10; r++) begin
      for (int j = 0; j < 4; j++) begin
        sel = 2'(j); #1;
        got[4*r + j] = rk_word;
      end
      if (r < 10) begin
        step = 1'b1;
        @(negedge clk);
        step = 1'b0;
      end
    end
  endtask

  initial begin
    logic [31:0] w [44], g [44];
    logic [127:0] k;
    load = 1'b0; step = 1'b0; sel = '0; key = '0;
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c, g);
    checks += 2;
    if (g[4] !== 32'ha0fafe17) begin failures++; $display("FAIL w4 %h", g[4]); end
    if ({g[40], g[41], g[42], g[43]} !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++; $display("FAIL round 10 key");
    end
    for (int n = 0; n < 10; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      expand(k, w);
      run_key(k, g);
      for (int i = 0; i < 44; i++) begin
        checks++;
        if (g[i] !== w[i]) begin failures++; $display("FAIL key %h word %0d", k, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
