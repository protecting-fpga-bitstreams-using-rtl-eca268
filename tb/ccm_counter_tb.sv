// ccm_counter_tb: checks CTR[0] after load and CTR[i] after i increments
// against the SP 800-38C counter-block format, holding when inc is low.
module ccm_counter_tb;
  import ccm_ref_pkg::*;
  import ccm_pkg::*;
  logic clk = 1'b0;
  logic rst_n, load, inc;
  nonce_t nonce;
  logic [127:0] ctr_block;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ccm_counter dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [95:0] n;
    int i;
    rst_n = 1'b0; load = 1'b0; inc = 1'b0; nonce = '0;
    @(negedge clk); rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++) begin
      n = {$urandom, $urandom, $urandom};
      @(negedge clk); nonce = n; load = 1'b1;
      @(negedge clk); load = 1'b0; nonce = '0; i = 0;
      for (int c = 0; c < 300; c++) begin
        checks++;
        if (ctr_block !== ref_ctr(n, i)) begin
          failures++; $display("FAIL ctr %0d: %h", i, ctr_block);
        end
        inc = ($urandom % 4 != 0);
        @(negedge clk);
        if (inc) i++;
        inc = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
