// crypto_coprocessor: a block-cipher coprocessor as one OPB peripheral.
//
// Three layers, outermost first: the OPB slave interface (opb_ipif), which turns
// bus cycles in the coprocessor's 16-byte window into register strobes; the
// control shell (crypto_shell) with its memory-mapped registers, key/plaintext
// assembly and command decoder; and the crypto core, chosen by CIPHER: AES-128
// (128-bit key and block, 12 clocks per block) or PRESENT-80 (80-bit key, 64-bit
// block, 33 clocks per block).
//
// Interface: the OPB request of the bus and this slave's OPB reply. Every
// register access takes two clocks on the bus. The layering and the two cipher
// choices follow the platform's description; the base address default is the one
// its register map prints (0x8000_0000).
module crypto_coprocessor
  import opb_pkg::*;
  import crypto_pkg::*;
#(
  parameter cipher_e     CIPHER     = CIPHER_AES,
  parameter logic [31:0] C_BASEADDR = 32'h8000_0000
) (
  input  logic     clk,
  input  logic     rst,
  input  opb_req_t opb,
  output opb_rsp_t sl
);

  localparam int unsigned KEY_W = key_width(CIPHER);
  localparam int unsigned BLK_W = block_width(CIPHER);

  logic [NUM_REGS-1:0] wr_ce, rd_ce;
  logic [31:0]         wdata, rdata;
  logic [3:0]          be;
  logic [KEY_W-1:0]    key;
  logic [BLK_W-1:0]    pt, ct;
  logic                ld, done;

  opb_ipif #(
    .C_BASEADDR(C_BASEADDR),
    .C_AWIDTH  (4),
    .NUM_REGS  (NUM_REGS)
  ) u_ipif (
    .clk, .rst, .opb, .sl,
    .wr_ce, .rd_ce, .wdata, .be, .rdata
  );

  crypto_shell #(
    .KEY_W(KEY_W),
    .BLK_W(BLK_W)
  ) u_shell (
    .clk, .rst, .wr_ce, .rd_ce, .wdata, .rdata,
    .key, .pt, .ld, .ct, .done
  );

  if (CIPHER == CIPHER_AES) begin : g_aes
    aes128_core u_core (.clk, .rst, .ld, .key, .pt, .ct, .done);
  end else begin : g_present
    present80_core u_core (.clk, .rst, .ld, .key, .pt, .ct, .done);
  end

endmodule
