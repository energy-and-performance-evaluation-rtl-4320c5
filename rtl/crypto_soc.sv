// crypto_soc: one SoC platform of the evaluation: a processor's buses with a
// crypto coprocessor, a hardware timer and on-chip block RAM.
//
// The processor itself sits outside this module: its OPB master port
// (m_req/m_rsp) and its instruction and data LMB ports (ilmb_*, dlmb_*) are
// brought out. Inside, the OPB (opb_bus) connects the master to two slaves, the
// coprocessor (crypto_coprocessor with the cipher chosen by CIPHER, at
// COPROC_BASE) and the timer (opb_timer, at TIMER_BASE). Two LMB wrappers
// (lmb_if) connect the ilmb to port A and the dlmb to port B of the block RAM
// (lmb_bram, BRAM_DEPTH words at address 0). All parts share one clock and one
// synchronous reset. The set of parts and their buses follow the platform's
// block diagram; the timer address and the memory address window are this
// design's choice. The processor's debug module is not part of this RTL.
// HAS_TIMER = 0 builds the platform without the timer, as it is configured for
// power estimation; the timer window then belongs to no slave.
module crypto_soc
  import opb_pkg::*;
  import lmb_pkg::*;
  import crypto_pkg::*;
#(
  parameter cipher_e     CIPHER      = CIPHER_AES,
  parameter logic [31:0] COPROC_BASE = 32'h8000_0000,
  parameter logic [31:0] TIMER_BASE  = 32'h8001_0000,
  parameter int unsigned BRAM_DEPTH  = 256,
  parameter bit          HAS_TIMER   = 1'b1
) (
  input  logic      clk,
  input  logic      rst,
  // OPB master port of the processor
  input  opb_req_t  m_req,
  output opb_mrsp_t m_rsp,
  // instruction and data LMB of the processor
  input  lmb_req_t  ilmb_req,
  output lmb_rsp_t  ilmb_rsp,
  input  lmb_req_t  dlmb_req,
  output lmb_rsp_t  dlmb_rsp
);

  localparam int unsigned AW       = $clog2(BRAM_DEPTH);
  localparam int unsigned LMB_AWID = AW + 2;

  opb_req_t opb;
  opb_rsp_t sl [2];

  opb_bus #(.NUM_SLAVES(2), .TIMEOUT(16)) u_opb (
    .clk, .rst, .m_req, .m_rsp, .opb, .sl
  );

  crypto_coprocessor #(.CIPHER(CIPHER), .C_BASEADDR(COPROC_BASE)) u_coproc (
    .clk, .rst, .opb, .sl(sl[0])
  );

  if (HAS_TIMER) begin : g_timer
    opb_timer #(.C_BASEADDR(TIMER_BASE)) u_timer (
      .clk, .rst, .opb, .sl(sl[1])
    );
  end else begin : g_no_timer
    assign sl[1] = '0;   // empty slot: accesses to the timer window time out
  end

  logic          a_en, b_en;
  logic [3:0]    a_we, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [31:0]   a_wdata, b_wdata, a_rdata, b_rdata;

  lmb_if #(.C_BASEADDR(32'h0), .C_AWIDTH(LMB_AWID), .AW(AW)) u_ilmb (
    .clk, .rst, .lmb(ilmb_req), .sl(ilmb_rsp),
    .bram_en(a_en), .bram_we(a_we), .bram_addr(a_addr),
    .bram_wdata(a_wdata), .bram_rdata(a_rdata)
  );

  lmb_if #(.C_BASEADDR(32'h0), .C_AWIDTH(LMB_AWID), .AW(AW)) u_dlmb (
    .clk, .rst, .lmb(dlmb_req), .sl(dlmb_rsp),
    .bram_en(b_en), .bram_we(b_we), .bram_addr(b_addr),
    .bram_wdata(b_wdata), .bram_rdata(b_rdata)
  );

  lmb_bram #(.DEPTH(BRAM_DEPTH)) u_bram (
    .clk,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );

endmodule
