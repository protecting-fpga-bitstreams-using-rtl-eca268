// aes_sbox4_tb: all 256 byte values through each of the four S-box lanes,
// compared with an S-box built from x^254 inversion in GF(2^8), plus the
// FIPS-197 spot values S(00)=63, S(53)=ed, S(ff)=16.
module aes_sbox4_tb;
  import ccm_ref_pkg::*;
  logic [31:0] din, dout;
  int checks = 0, failures = 0;

  aes_sbox4 dut (.din, .dout);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      din = {8'(x), 8'(x + 1), 8'(x + 2), 8'(x + 3)};
      #1;
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (dout[8*l +: 8] !== sb(din[8*l +: 8])) begin
          failures++;
          $display("FAIL S(%h)=%h", din[8*l +: 8], dout[8*l +: 8]);
        end
      end
    end
    din = 32'h0053ff00; #1;
    checks++;
    if (dout !== 32'h63ed1663) begin failures++; $display("FAIL spot values %h", dout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
