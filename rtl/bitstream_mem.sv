// bitstream_mem: the bitstream memory, 128-bit words.
//
// CCM is not an on-line mode: the whole bitstream is stored before it is
// processed, and the decrypted bitstream is written back here. This is a
// simple dual-port RAM, one write port and one read port, both synchronous.
// A read (rd_en high at a rising edge) returns mem[rd_addr] on rd_data from
// the next cycle on; rd_data holds its value until the next read. A write
// (wr_en high) stores wr_data at wr_addr at the rising edge. A read of the
// address written in the same cycle returns the old word.
// DEPTH defaults to 2^17 words (16 Mibit), enough for the bitstream of a
// Spartan-3 XC3S5000 (13,271,936 bits); the document gives no size.
module bitstream_mem #(
  parameter int unsigned DEPTH = 131072,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [127:0]  rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [127:0]  wr_data
);

  logic [127:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
