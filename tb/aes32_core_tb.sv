// aes32_core_tb: checks the 32-bit AES core against the FIPS-197 example
// vectors and against the reference model on random keys and blocks, and
// checks the 55-cycle latency and back-to-back operation (a new start in
// the cycle done is high).
module aes32_core_tb;
  import ccm_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  logic start;
  logic [127:0] din, key, dout;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  aes32_core dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_one(input logic [127:0] k, input logic [127:0] p, input logic [127:0] exp);
    int cyc = 0;
    @(negedge clk);
    key = k; din = p; start = 1'b1;
    @(negedge clk);
    start = 1'b0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (dout !== exp) begin failures++; $display("FAIL ct %h exp %h", dout, exp); end
    if (cyc != 55) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    logic [127:0] k, p, e;
    rst_n = 1'b0; start = 1'b0; din = '0; key = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // FIPS-197 Appendix C.1 and Appendix B
    run_one(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
            128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run_one(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
            128'h3925841d02dc09fbdc118597196a0b32);
    // self-check of the reference model itself
    checks++;
    if (aes128(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin failures++; $display("FAIL reference model"); end
    for (int n = 0; n < 20; n++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run_one(k, p, aes128(k, p));
    end
    // back-to-back: start again in the done cycle
    k = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk);
    key = k; din = 128'h1; start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (dout !== aes128(k, 128'h1)) begin failures++; $display("FAIL first of back-to-back %h %h", dout, aes128(k, 128'h1)); end
    din = 128'h2; start = 1'b1;
    @(negedge clk); start = 1'b0;
    repeat (54) @(negedge clk);
    checks++;
    if (!done || dout !== aes128(k, 128'h2)) begin failures++; $display("FAIL back-to-back"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
