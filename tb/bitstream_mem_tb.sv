// bitstream_mem_tb: random writes and reads against an associative-array
// model; checks one-cycle read latency, that rd_data holds while rd_en is
// low, and read-old-data when reading the address being written.
module bitstream_mem_tb;
  localparam int unsigned DEPTH = 256;
  localparam int unsigned AW = 8;
  logic clk = 1'b0;
  logic rd_en, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [127:0] rd_data, wr_data;
  logic [127:0] model [int];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bitstream_mem #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] exp, held;
    rd_en = 1'b0; wr_en = 1'b0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = AW'(a); wr_data = {$urandom, $urandom, $urandom, $urandom};
      model[a] = wr_data;
    end
    @(negedge clk); wr_en = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      rd_en = 1'b1; rd_addr = AW'($urandom);
      wr_en = ($urandom % 2 == 0);
      wr_addr = ($urandom % 4 == 0) ? rd_addr : AW'($urandom);
      wr_data = {$urandom, $urandom, $urandom, $urandom};
      exp = model[int'(rd_addr)];
      @(negedge clk);
      if (wr_en) model[int'(wr_addr)] = wr_data;
      rd_en = 1'b0; wr_en = 1'b0;
      checks++;
      if (rd_data !== exp) begin failures++; $display("FAIL read %0d", rd_addr); end
      held = rd_data;
      rd_addr = AW'($urandom);
      @(negedge clk);
      checks++;
      if (rd_data !== held) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
