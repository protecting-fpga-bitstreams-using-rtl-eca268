// mac_compare: the "match" check between computed and received MAC.
//
// When en is high at a rising edge the full 128-bit MAC computed by CCM is
// compared with the MAC that came with the bitstream; one cycle later valid
// is high for one cycle and match tells whether all 128 bits were equal.
// match keeps its value until the next comparison.
module mac_compare (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [127:0] computed,
  input  logic [127:0] received,
  output logic         valid,
  output logic         match
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= 1'b0;
      match <= 1'b0;
    end else begin
      valid <= en;
      if (en) match <= (computed == received);
    end
  end

endmodule
