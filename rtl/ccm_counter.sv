// ccm_counter: the counter of the CCM data path.
//
// Produces the CCM counter blocks CTR[i] = flags | nonce | i (see ccm_pkg)
// that the AES core encrypts into the key-stream blocks S[i]. load clears the
// index to 0 and takes a new nonce; inc adds one to the index. The output
// block is combinational from the registers, so after a load it shows CTR[0]
// and after k increments CTR[k]. The index is Q_W (24) bits wide and wraps.
module ccm_counter
  import ccm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              inc,
  input  nonce_t            nonce,
  output logic [127:0]      ctr_block
);

  logic [Q_W-1:0] idx_q;
  nonce_t         nonce_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx_q   <= '0;
      nonce_q <= '0;
    end else if (load) begin
      idx_q   <= '0;
      nonce_q <= nonce;
    end else if (inc) begin
      idx_q   <= idx_q + 1'b1;
    end
  end

  assign ctr_block = make_ctr(nonce_q, idx_q);

endmodule
