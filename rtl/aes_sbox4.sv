// aes_sbox4: the four AES S-boxes of the 32-bit AES core.
//
// Each of the four bytes of a 32-bit word is replaced by its SubBytes image.
// The S-boxes are one ROM of 256 bytes each (table built at elaboration by
// aes_pkg::gen_sbox), not a composite-field circuit, so the path through
// them is a single table look-up. The same four S-boxes serve both the data
// path (one state column per cycle) and the key schedule (SubWord), which is
// why only four are needed.
//
// Interface: din (32 bits) -> dout (32 bits), purely combinational.
module aes_sbox4
  import aes_pkg::*;
(
  input  word_t din,
  output word_t dout
);

  localparam sbox_table_t SBOX = gen_sbox();

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      dout[8*i +: 8] = SBOX[din[8*i +: 8]];
    end
  end

endmodule
