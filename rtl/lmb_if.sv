// lmb_if: Local Memory Bus wrapper, connecting one LMB (instruction or data
// side of the processor) to one port of the block RAM.
//
// In the clock where addrstrobe is high and the address falls in the window
// [C_BASEADDR, C_BASEADDR + 2**C_AWIDTH), the wrapper enables the RAM port and,
// for a write, sets the byte write enables from be; the RAM captures the write
// or reads the word at that clock edge. In the next clock the wrapper raises
// ready and passes the RAM's read data, so a read or a write takes two clocks,
// the on-chip memory access time of the platform. Outside the window the
// wrapper stays silent (ready and data zero) so that other LMB slaves could
// share the bus. The two-clock access is the platform's; the rest is this
// design's choice, since the platform only names the wrapper.
module lmb_if
  import lmb_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = 32'h0000_0000,
  parameter int unsigned C_AWIDTH   = 10,
  parameter int unsigned AW         = C_AWIDTH - 2
) (
  input  logic          clk,
  input  logic          rst,
  input  lmb_req_t      lmb,
  output lmb_rsp_t      sl,
  // block RAM port
  output logic          bram_en,
  output logic [3:0]    bram_we,
  output logic [AW-1:0] bram_addr,
  output logic [31:0]   bram_wdata,
  input  logic [31:0]   bram_rdata
);

  logic hit;
  logic rd_q;

  always_comb begin
    hit        = lmb.addrstrobe && (lmb.abus[31:C_AWIDTH] == C_BASEADDR[31:C_AWIDTH]);
    bram_en    = hit;
    bram_we    = (hit && lmb.writestrobe) ? lmb.be : 4'h0;
    bram_addr  = lmb.abus[C_AWIDTH-1:2];
    bram_wdata = lmb.wdbus;
    sl.dbus    = rd_q ? bram_rdata : 32'h0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sl.ready <= 1'b0;
      rd_q     <= 1'b0;
    end else begin
      sl.ready <= hit;
      rd_q     <= hit && lmb.readstrobe;
    end
  end

endmodule
