// mac_compare_tb: equal MACs, MACs differing in a single bit at every bit
// position, and random MACs; checks valid follows en by one cycle and that
// match holds between comparisons.
module mac_compare_tb;
  logic clk = 1'b0;
  logic rst_n, en, valid, match;
  logic [127:0] computed, received;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mac_compare dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input logic [127:0] a, input logic [127:0] b);
    @(negedge clk);
    en = 1'b1; computed = a; received = b;
    @(negedge clk);
    en = 1'b0; computed = ~a;
    checks += 2;
    if (!valid) begin failures++; $display("FAIL valid"); end
    if (match !== (a == b)) begin failures++; $display("FAIL match %h %h", a, b); end
    @(negedge clk);
    checks += 2;
    if (valid) begin failures++; $display("FAIL valid stuck"); end
    if (match !== (a == b)) begin failures++; $display("FAIL match not held"); end
  endtask

  initial begin
    logic [127:0] a;
    rst_n = 1'b0; en = 1'b0; computed = '0; received = '0;
    @(negedge clk); rst_n = 1'b1;
    a = {$urandom, $urandom, $urandom, $urandom};
    cmp(a, a);
    for (int b = 0; b < 128; b++) begin
      cmp(a, a ^ (128'h1 << b));
      cmp(a, a);
    end
    for (int n = 0; n < 20; n++) cmp({$urandom, $urandom, $urandom, $urandom}, a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
