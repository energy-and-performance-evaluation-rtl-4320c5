// soc_top: the two platforms that are compared, side by side: the AES-based
// system and the PRESENT-based system. Apart from the cipher in the coprocessor
// they are identical (same OPB, timer, block RAM and address map), and each
// brings out the OPB master and the two LMB ports of its own processor. They
// share the clock and the synchronous reset and nothing else. Comparing the
// two systems built this way is the original platform's; putting both in one
// top module is this design's way of delivering them together.
module soc_top
  import opb_pkg::*;
  import lmb_pkg::*;
  import crypto_pkg::*;
#(
  parameter int unsigned BRAM_DEPTH = 256
) (
  input  logic      clk,
  input  logic      rst,
  // AES-based system
  input  opb_req_t  aes_m_req,
  output opb_mrsp_t aes_m_rsp,
  input  lmb_req_t  aes_ilmb_req,
  output lmb_rsp_t  aes_ilmb_rsp,
  input  lmb_req_t  aes_dlmb_req,
  output lmb_rsp_t  aes_dlmb_rsp,
  // PRESENT-based system
  input  opb_req_t  pre_m_req,
  output opb_mrsp_t pre_m_rsp,
  input  lmb_req_t  pre_ilmb_req,
  output lmb_rsp_t  pre_ilmb_rsp,
  input  lmb_req_t  pre_dlmb_req,
  output lmb_rsp_t  pre_dlmb_rsp
);

  crypto_soc #(.CIPHER(CIPHER_AES), .BRAM_DEPTH(BRAM_DEPTH)) u_aes_sys (
    .clk, .rst,
    .m_req(aes_m_req), .m_rsp(aes_m_rsp),
    .ilmb_req(aes_ilmb_req), .ilmb_rsp(aes_ilmb_rsp),
    .dlmb_req(aes_dlmb_req), .dlmb_rsp(aes_dlmb_rsp)
  );

  crypto_soc #(.CIPHER(CIPHER_PRESENT), .BRAM_DEPTH(BRAM_DEPTH)) u_present_sys (
    .clk, .rst,
    .m_req(pre_m_req), .m_rsp(pre_m_rsp),
    .ilmb_req(pre_ilmb_req), .ilmb_rsp(pre_ilmb_rsp),
    .dlmb_req(pre_dlmb_req), .dlmb_rsp(pre_dlmb_rsp)
  );

endmodule
