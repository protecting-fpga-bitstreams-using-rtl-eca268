// secure_config_top: authenticated and encrypted FPGA configuration unit.
//
// The static (non-reconfigurable) part of an FPGA that accepts a bitstream
// only from a holder of the pre-loaded key. An incoming frame carries a
// 128-bit MAC followed by the CCM-encrypted bitstream. The frame is stored in
// the bitstream memory, decrypted in place by the compact CCM core (one
// 32-bit AES used for both CTR decryption and CBC-MAC), and the MAC the core
// computes over the plaintext is compared with the frame's MAC. On a match
// cfg_startup rises and the user logic may read the decrypted bitstream
// through ul_rd_*; on a mismatch the loaded bitstream is erased and
// cfg_abort rises.
//
// Blocks: cfg_ctrl (sequencing and memory sharing), ccm_core (with
// aes32_core and ccm_counter inside), bitstream_mem, mac_compare.
// Interface: key is the pre-loaded device key; cfg_start with nonce and
// nblocks (frame length in 128-bit words, MAC excluded) begins a
// configuration; bs_valid/bs_ready/bs_data carry the frame. Decryption
// plus authentication takes 110 cycles per 128-bit word after loading.
// DEPTH is the bitstream memory size in words.
module secure_config_top
  import ccm_pkg::*;
#(
  parameter int unsigned DEPTH = 131072
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [127:0]  key,
  input  logic          cfg_start,
  input  nonce_t        nonce,
  input  nblk_t         nblocks,
  output logic          cfg_busy,
  output logic          cfg_startup,
  output logic          cfg_abort,
  input  logic          bs_valid,
  input  logic [127:0]  bs_data,
  output logic          bs_ready,
  input  logic                     ul_rd_en,
  input  logic [$clog2(DEPTH)-1:0] ul_rd_addr,
  output logic [127:0]             ul_rd_data
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic          ccm_start, ccm_done, ccm_busy;
  nonce_t        ccm_nonce;
  nblk_t         ccm_nblocks;
  logic [127:0]  ccm_tag, mac_rx;
  logic          ccm_rd_en, ccm_wr_en;
  logic [AW-1:0] ccm_rd_addr, ccm_wr_addr;
  logic [127:0]  ccm_wr_data;
  logic          cmp_en, cmp_valid, cmp_match;
  logic          mem_rd_en, mem_wr_en;
  logic [AW-1:0] mem_rd_addr, mem_wr_addr;
  logic [127:0]  mem_rd_data, mem_wr_data;

  cfg_ctrl #(.DEPTH(DEPTH), .AW(AW)) u_ctrl (
    .clk, .rst_n,
    .cfg_start, .nonce, .nblocks, .cfg_busy, .cfg_startup, .cfg_abort,
    .bs_valid, .bs_data, .bs_ready,
    .ccm_start, .ccm_nonce, .ccm_nblocks, .ccm_done,
    .ccm_rd_en, .ccm_rd_addr, .ccm_wr_en, .ccm_wr_addr, .ccm_wr_data,
    .mac_rx, .cmp_en, .cmp_valid, .cmp_match,
    .mem_rd_en, .mem_rd_addr, .mem_rd_data, .mem_wr_en, .mem_wr_addr, .mem_wr_data,
    .ul_rd_en, .ul_rd_addr, .ul_rd_data
  );

  ccm_core #(.AW(AW)) u_ccm (
    .clk, .rst_n,
    .start       (ccm_start),
    .decrypt     (1'b1),
    .key         (key),
    .nonce       (ccm_nonce),
    .nblocks     (ccm_nblocks),
    .busy        (ccm_busy),
    .done        (ccm_done),
    .tag         (ccm_tag),
    .mem_rd_en   (ccm_rd_en),
    .mem_rd_addr (ccm_rd_addr),
    .mem_rd_data (mem_rd_data),
    .mem_wr_en   (ccm_wr_en),
    .mem_wr_addr (ccm_wr_addr),
    .mem_wr_data (ccm_wr_data)
  );

  bitstream_mem #(.DEPTH(DEPTH), .AW(AW)) u_mem (
    .clk, .rd_en (mem_rd_en), .rd_addr (mem_rd_addr), .rd_data (mem_rd_data),
    .wr_en (mem_wr_en), .wr_addr (mem_wr_addr), .wr_data (mem_wr_data)
  );

  mac_compare u_cmp (
    .clk, .rst_n,
    .en       (cmp_en),
    .computed (ccm_tag),
    .received (mac_rx),
    .valid    (cmp_valid),
    .match    (cmp_match)
  );

  // The CCM core is only started when idle.
  a_ccm_idle: assert property (@(posedge clk) disable iff (!rst_n) ccm_start |-> !ccm_busy);

endmodule
