// aes_mixcolumn_tb: the MixColumns test columns (db135345 -> 8e4da1bc,
// f20a225c -> 9fdc589d, 01010101 -> 01010101, c6c6c6c6 -> c6c6c6c6,
// d4d4d4d5 -> d5d5d7d6, 2d26314c -> 4d7ebdf8) and random columns against
// a multiply-by-matrix reference.
module aes_mixcolumn_tb;
  import ccm_ref_pkg::*;
  logic [31:0] din, dout;
  int checks = 0, failures = 0;

  aes_mixcolumn dut (.din, .dout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_mc(logic [31:0] a);
    byte unsigned m [4][4] = '{'{2,3,1,1}, '{1,2,3,1}, '{1,1,2,3}, '{3,1,1,2}};
    logic [31:0] r = '0;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        r[31-8*i -: 8] ^= gmul(m[i][j], a[31-8*j -: 8]);
    return r;
  endfunction

  task automatic t(input logic [31:0] a, input logic [31:0] e);
    din = a; #1;
    checks++;
    if (dout !== e) begin failures++; $display("FAIL mc(%h)=%h exp %h", a, dout, e); end
  endtask

  initial begin
    t(32'hdb135345, 32'h8e4da1bc);
    t(32'hf20a225c, 32'h9fdc589d);
    t(32'h01010101, 32'h01010101);
    t(32'hc6c6c6c6, 32'hc6c6c6c6);
    t(32'hd4d4d4d5, 32'hd5d5d7d6);
    t(32'h2d26314c, 32'h4d7ebdf8);
    for (int n = 0; n < 200; n++) begin
      logic [31:0] a = $urandom;
      t(a, ref_mc(a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
