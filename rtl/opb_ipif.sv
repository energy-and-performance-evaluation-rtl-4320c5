// opb_ipif: OPB slave interface that turns bus cycles into register accesses.
//
// The slave owns an address window of 2**C_AWIDTH bytes starting at C_BASEADDR
// and NUM_REGS 32-bit registers at word offsets 0, 4, 8, ... in it. When a cycle
// with select high hits the window, the interface decodes it in that clock:
// a write raises wr_ce[index] for exactly that clock with wdata/be valid, a read
// raises rd_ce[index] and registers rdata. In the next clock it drives xferack
// (and the read data), so every access takes two clocks on the bus. An access
// inside the window but above the last register is acknowledged with errack
// and reads as zero. While not acknowledging, the reply is all zeros, as the
// OR-combined OPB requires. A cycle that is being acknowledged is not decoded a
// second time, even though the master still holds select in that clock.
//
// That a memory cycle on the OPB is decoded into a read from or a write into a
// coprocessor register is the platform's description; the two-clock timing, the
// window size and the error reply are this design's choices.
module opb_ipif
  import opb_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = 32'h8000_0000,
  parameter int unsigned C_AWIDTH   = 4,
  parameter int unsigned NUM_REGS   = 3
) (
  input  logic                clk,
  input  logic                rst,
  input  opb_req_t            opb,
  output opb_rsp_t            sl,
  // register side
  output logic [NUM_REGS-1:0] wr_ce,
  output logic [NUM_REGS-1:0] rd_ce,
  output logic [31:0]         wdata,
  output logic [3:0]          be,
  input  logic [31:0]         rdata
);

  localparam int unsigned IW = (C_AWIDTH > 2) ? C_AWIDTH - 2 : 1;

  logic          hit;
  logic          start;
  logic [IW-1:0] idx;
  logic          idx_ok;

  always_comb begin
    hit    = opb.abus[31:C_AWIDTH] == C_BASEADDR[31:C_AWIDTH];
    start  = opb.select && hit && !sl.xferack;
    idx    = opb.abus[C_AWIDTH-1:2];
    idx_ok = 32'(idx) < NUM_REGS;
    wdata  = opb.dbus;
    be     = opb.be;
    wr_ce  = '0;
    rd_ce  = '0;
    for (int i = 0; i < NUM_REGS; i++) begin
      if (start && 32'(idx) == i) begin
        rd_ce[i] = opb.rnw;
        wr_ce[i] = !opb.rnw;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sl <= '0;
    end else begin
      sl.xferack <= start;
      sl.errack  <= start && !idx_ok;
      sl.dbus    <= (start && opb.rnw && idx_ok) ? rdata : 32'h0;
      sl.retry   <= 1'b0;
      sl.toutsup <= 1'b0;
    end
  end

  // Bus rules this slave keeps: one acknowledge per cycle, errack only with
  // xferack, no read data outside an acknowledge.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!(sl.xferack && start)) else $error("opb_ipif: cycle decoded while acknowledging");
      assert (!sl.errack || sl.xferack) else $error("opb_ipif: errack without xferack");
      assert (sl.xferack || sl.dbus == 32'h0) else $error("opb_ipif: data driven while idle");
    end
  end

endmodule
