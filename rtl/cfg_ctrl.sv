// cfg_ctrl: configuration controller of the secure configuration unit.
//
// Sequences one authenticated configuration:
//   1. LOAD_MAC: the first word of the incoming frame is the bitstream MAC.
//   2. LOAD:     the nblocks encrypted 128-bit words that follow are written
//                to the bitstream memory (addresses 0..nblocks-1). The
//                stream uses a valid/ready handshake; the sender may pause.
//   3. DECRYPT:  the CCM core decrypts the memory in place and computes the
//                MAC of the plaintext; the memory ports are handed to it.
//   4. COMPARE:  the computed and received MACs are compared.
//   5. STARTUP on a match: cfg_startup is raised (the FPGA may go on to its
//      startup sequence) and the user-logic read port of the memory opens.
//      Otherwise CLEAR writes zero over every loaded word and ABORT raises
//      cfg_abort. A frame longer than the memory is aborted at once.
// Until a configuration is authenticated ul_rd_data reads as zero, so no
// unauthenticated plaintext leaves the unit. cfg_start is accepted in IDLE,
// STARTUP and ABORT and samples nonce and nblocks.
// The frame layout (MAC first), the handshake, the clearing of only the
// loaded words and the read gating are this design's choices.
module cfg_ctrl
  import ccm_pkg::*;
#(
  parameter int unsigned DEPTH = 131072,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // configuration request
  input  logic          cfg_start,
  input  nonce_t        nonce,
  input  nblk_t         nblocks,
  output logic          cfg_busy,
  output logic          cfg_startup,
  output logic          cfg_abort,
  // incoming frame: MAC, then the encrypted bitstream
  input  logic          bs_valid,
  input  logic [127:0]  bs_data,
  output logic          bs_ready,
  // CCM core
  output logic          ccm_start,
  output nonce_t        ccm_nonce,
  output nblk_t         ccm_nblocks,
  input  logic          ccm_done,
  input  logic          ccm_rd_en,
  input  logic [AW-1:0] ccm_rd_addr,
  input  logic          ccm_wr_en,
  input  logic [AW-1:0] ccm_wr_addr,
  input  logic [127:0]  ccm_wr_data,
  // MAC comparison
  output logic [127:0]  mac_rx,
  output logic          cmp_en,
  input  logic          cmp_valid,
  input  logic          cmp_match,
  // bitstream memory
  output logic          mem_rd_en,
  output logic [AW-1:0] mem_rd_addr,
  input  logic [127:0]  mem_rd_data,
  output logic          mem_wr_en,
  output logic [AW-1:0] mem_wr_addr,
  output logic [127:0]  mem_wr_data,
  // user-logic read port (open after a successful configuration)
  input  logic          ul_rd_en,
  input  logic [AW-1:0] ul_rd_addr,
  output logic [127:0]  ul_rd_data
);

  typedef enum logic [3:0] {
    G_IDLE, G_LOAD_MAC, G_LOAD, G_DEC_START, G_DECRYPT,
    G_COMPARE, G_CLEAR, G_STARTUP, G_ABORT
  } cfg_state_e;

  cfg_state_e   state_q;
  nonce_t       nonce_q;
  nblk_t        n_q;
  nblk_t        cnt_q;
  logic [127:0] mac_q;
  logic         accept;

  assign accept = cfg_start &&
                  (state_q == G_IDLE || state_q == G_STARTUP || state_q == G_ABORT);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= G_IDLE;
      cnt_q   <= '0;
      n_q     <= '0;
      nonce_q <= '0;
      mac_q   <= '0;
    end else if (accept) begin
      nonce_q <= nonce;
      n_q     <= nblocks;
      cnt_q   <= '0;
      state_q <= (32'(nblocks) > DEPTH) ? G_ABORT : G_LOAD_MAC;
    end else begin
      unique case (state_q)
        G_LOAD_MAC: if (bs_valid) begin
          mac_q   <= bs_data;
          state_q <= (n_q == '0) ? G_DEC_START : G_LOAD;
        end
        G_LOAD: if (bs_valid) begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == n_q - 1'b1) state_q <= G_DEC_START;
        end
        G_DEC_START: state_q <= G_DECRYPT;
        G_DECRYPT:   if (ccm_done) state_q <= G_COMPARE;
        G_COMPARE: if (cmp_valid) begin
          cnt_q   <= '0;
          if (cmp_match)       state_q <= G_STARTUP;
          else if (n_q == '0)  state_q <= G_ABORT;
          else                 state_q <= G_CLEAR;
        end
        G_CLEAR: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == n_q - 1'b1) state_q <= G_ABORT;
        end
        default: ;
      endcase
    end
  end

  // Memory port sharing between loader, CCM core, clearing and user logic.
  always_comb begin
    mem_rd_en   = 1'b0;
    mem_rd_addr = ul_rd_addr;
    mem_wr_en   = 1'b0;
    mem_wr_addr = AW'(cnt_q);
    mem_wr_data = bs_data;
    unique case (state_q)
      G_LOAD: mem_wr_en = bs_valid;
      G_DECRYPT: begin
        mem_rd_en   = ccm_rd_en;
        mem_rd_addr = ccm_rd_addr;
        mem_wr_en   = ccm_wr_en;
        mem_wr_addr = ccm_wr_addr;
        mem_wr_data = ccm_wr_data;
      end
      G_CLEAR: begin
        mem_wr_en   = 1'b1;
        mem_wr_data = '0;
      end
      G_STARTUP: mem_rd_en = ul_rd_en;
      default: ;
    endcase
  end

  assign bs_ready    = (state_q == G_LOAD_MAC) || (state_q == G_LOAD);
  assign ccm_start   = (state_q == G_DEC_START);
  assign ccm_nonce   = nonce_q;
  assign ccm_nblocks = n_q;
  assign cmp_en      = (state_q == G_DECRYPT) && ccm_done;
  assign mac_rx      = mac_q;
  assign cfg_busy    = !(state_q == G_IDLE || state_q == G_STARTUP || state_q == G_ABORT);
  assign cfg_startup = (state_q == G_STARTUP);
  assign cfg_abort   = (state_q == G_ABORT);
  assign ul_rd_data  = (state_q == G_STARTUP) ? mem_rd_data : '0;

  // The memory is never handed to the user logic before authentication.
  a_no_early_read: assert property (@(posedge clk) disable iff (!rst_n)
                                    (mem_rd_en && state_q != G_DECRYPT) |-> state_q == G_STARTUP);

endmodule
