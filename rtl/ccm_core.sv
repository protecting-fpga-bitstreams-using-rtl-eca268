// ccm_core: CCM authenticated encryption and decryption with one 32-bit AES.
//
// All data sits in an external block memory (addresses 0..nblocks-1, one
// 128-bit block per word). A single aes32_core does both jobs in two passes:
//   CBC pass: Y = E(... E(E(B0) ^ M[1]) ... ^ M[m])   (CBC-MAC of the payload)
//   CTR pass: S[i] = E(CTR[i]); C[i] = M[i] ^ S[i] written back in place
//   Tag = Y ^ S[0]
// The AES input is chosen by a 2:1 mux between the chaining XOR (memory word
// ^ previous AES result) and the counter block, as in the CTR+CBC data path.
// For encryption the CBC pass runs first over the plaintext, then the CTR
// pass replaces the plaintext by the ciphertext. For decryption (decrypt=1)
// the CTR pass runs first, turning the ciphertext into plaintext in place,
// and the CBC pass then authenticates that plaintext. In both orders the tag
// register keeps the result of the first pass (Y or S[0]) and XORs in the
// other one, so tag ends as Y ^ S[0]. A decryption's tag is the tag the
// sender computed if the data is authentic.
//
// Timing: each AES operation takes 55 cycles and the next operation starts
// in the cycle the previous one finishes, the memory word it needs having
// been prefetched. A run over m blocks takes (m+1) operations per pass, one
// set-up cycle per pass: counting the cycle in which start is sampled as the
// first, done is high in cycle 110*(m+1) + 3. That is 110 cycles, two AES
// operations, per 128-bit block.
// Interface: start (when busy is low) samples decrypt, key, nonce and
// nblocks; done pulses for one cycle when tag is valid; tag holds until the
// next start. The memory read port has one cycle of latency and rd_data
// must hold its value between reads.
// Formatting (ccm_pkg): 12-byte nonce, 128-bit tag, no associated data,
// whole blocks only. These are this design's choices.
module ccm_core
  import ccm_pkg::*;
#(
  parameter int unsigned AW = 17        // memory address width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            decrypt,
  input  logic [127:0]    key,
  input  nonce_t          nonce,
  input  nblk_t           nblocks,
  output logic            busy,
  output logic            done,
  output logic [127:0]    tag,
  // block memory
  output logic            mem_rd_en,
  output logic [AW-1:0]   mem_rd_addr,
  input  logic [127:0]    mem_rd_data,
  output logic            mem_wr_en,
  output logic [AW-1:0]   mem_wr_addr,
  output logic [127:0]    mem_wr_data
);

  typedef enum logic [1:0] {C_IDLE, C_PREP, C_RUN} state_e;
  typedef enum logic {P_CBC = 1'b0, P_CTR = 1'b1} pass_e;

  state_e         state_q;
  pass_e          pass_q;
  logic           first_q;       // running the first of the two passes
  nblk_t          m_q;           // number of payload blocks
  nblk_t          blk_q;         // index of the running AES operation
  nonce_t         nonce_q;
  logic [127:0]   key_q;
  logic [127:0]   tag_q;
  logic           done_q;

  logic           aes_start, aes_busy, aes_done;
  logic [127:0]   aes_din, aes_dout;
  logic           ctr_load, ctr_inc;
  logic [127:0]   ctr_block;
  nonce_t         ctr_nonce;
  logic           last_op;
  nblk_t          next_blk;

  assign last_op  = (blk_q == m_q);
  assign next_blk = blk_q + 1'b1;

  ccm_counter u_ctr (
    .clk       (clk),
    .rst_n     (rst_n),
    .load      (ctr_load),
    .inc       (ctr_inc),
    .nonce     (ctr_nonce),
    .ctr_block (ctr_block)
  );

  aes32_core u_aes (
    .clk   (clk),
    .rst_n (rst_n),
    .start (aes_start),
    .din   (aes_din),
    .key   (key_q),
    .busy  (aes_busy),
    .done  (aes_done),
    .dout  (aes_dout)
  );

  // Control and data path of one cycle.
  always_comb begin
    aes_start   = 1'b0;
    aes_din     = ctr_block;
    ctr_load    = 1'b0;
    ctr_inc     = 1'b0;
    ctr_nonce   = nonce_q;
    mem_rd_en   = 1'b0;
    mem_rd_addr = AW'(blk_q);
    mem_wr_en   = 1'b0;
    mem_wr_addr = AW'(blk_q - 1'b1);
    mem_wr_data = aes_dout ^ mem_rd_data;

    unique case (state_q)
      C_IDLE: begin
        if (start) begin
          ctr_load  = 1'b1;
          ctr_nonce = nonce;
        end
      end
      C_PREP: begin
        // Operation 0 of a pass: B0 or CTR[0]; prefetch block 1.
        aes_start   = 1'b1;
        aes_din     = (pass_q == P_CBC) ? make_b0(nonce_q, m_q) : ctr_block;
        ctr_inc     = (pass_q == P_CTR);
        mem_rd_en   = 1'b1;
        mem_rd_addr = '0;
      end
      C_RUN: begin
        if (aes_done) begin
          mem_wr_en = (pass_q == P_CTR) && (blk_q != '0);
          if (!last_op) begin
            aes_start   = 1'b1;
            aes_din     = (pass_q == P_CBC) ? (mem_rd_data ^ aes_dout) : ctr_block;
            ctr_inc     = (pass_q == P_CTR);
            // Prefetch: CBC op b+2 chains M[b+2] (address b+1); CTR op b+1
            // needs M[b+1] (address b) when it ends.
            mem_rd_en   = 1'b1;
            mem_rd_addr = (pass_q == P_CBC) ? AW'(next_blk) : AW'(blk_q);
          end else if (first_q) begin
            ctr_load = 1'b1;
          end
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= C_IDLE;
      pass_q  <= P_CBC;
      first_q <= 1'b0;
      done_q  <= 1'b0;
      blk_q   <= '0;
    end else begin
      done_q <= 1'b0;
      unique case (state_q)
        C_IDLE: begin
          if (start) begin
            state_q <= C_PREP;
            pass_q  <= decrypt ? P_CTR : P_CBC;
            first_q <= 1'b1;
            blk_q   <= '0;
          end
        end
        C_PREP: state_q <= C_RUN;
        C_RUN: begin
          if (aes_done) begin
            if (!last_op) begin
              blk_q <= next_blk;
            end else if (first_q) begin
              first_q <= 1'b0;
              pass_q  <= (pass_q == P_CBC) ? P_CTR : P_CBC;
              blk_q   <= '0;
              state_q <= C_PREP;
            end else begin
              state_q <= C_IDLE;
              done_q  <= 1'b1;
            end
          end
        end
        default: state_q <= C_IDLE;
      endcase
    end
  end

  // Parameters of a run and the tag register.
  always_ff @(posedge clk) begin
    if (state_q == C_IDLE && start) begin
      key_q     <= key;
      nonce_q   <= nonce;
      m_q       <= nblocks;
    end
    // S[0] (CTR op 0) and Y (last CBC op) go into the tag register.
    if (state_q == C_RUN && aes_done &&
        ((pass_q == P_CTR && blk_q == '0) || (pass_q == P_CBC && last_op)))
      tag_q <= first_q ? aes_dout : (tag_q ^ aes_dout);
  end

  assign busy = (state_q != C_IDLE);
  assign done = done_q;
  assign tag  = tag_q;

  // The AES core is only started when it is free.
  a_aes_free: assert property (@(posedge clk) disable iff (!rst_n) aes_start |-> !aes_busy);
  // Every write lands inside the payload.
  a_wr_range: assert property (@(posedge clk) disable iff (!rst_n)
                               mem_wr_en |-> (mem_wr_addr < AW'(m_q)) || (m_q >= nblk_t'(1 << AW)));

endmodule
