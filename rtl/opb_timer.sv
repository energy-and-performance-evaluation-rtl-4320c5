// opb_timer: hardware cycle counter on the OPB, used to measure how many clocks
// a piece of software or a coprocessor run takes.
//
// Two registers in a 16-byte window at C_BASEADDR:
//   0x0 control  write: bit 0 run (1 counts, 0 holds), bit 1 clear (1 zeroes
//                the count in that clock); read: bit 0 run
//   0x4 count    read: the 32-bit number of clocks counted while running
// Software starts it, does its work, stops it and reads the count; the count
// includes the bus cycles of the start and stop writes. Register access goes
// through opb_ipif and takes two clocks. That the platform has a timer for
// measuring speed is the platform's; its registers are this design's own.
module opb_timer
  import opb_pkg::*;
#(
  parameter logic [31:0] C_BASEADDR = 32'h8001_0000,
  parameter int unsigned CNT_W      = 32
) (
  input  logic     clk,
  input  logic     rst,
  input  opb_req_t opb,
  output opb_rsp_t sl
);

  localparam int unsigned REG_CTRL  = 0;
  localparam int unsigned REG_COUNT = 1;

  logic [1:0]       wr_ce, rd_ce;
  logic [31:0]      wdata, rdata;
  logic [3:0]       be;
  logic             run_q;
  logic [CNT_W-1:0] count_q;

  opb_ipif #(
    .C_BASEADDR(C_BASEADDR),
    .C_AWIDTH  (4),
    .NUM_REGS  (2)
  ) u_ipif (
    .clk, .rst, .opb, .sl,
    .wr_ce, .rd_ce, .wdata, .be, .rdata
  );

  always_comb begin
    rdata = 32'h0;
    if (rd_ce[REG_CTRL])  rdata = {31'h0, run_q};
    if (rd_ce[REG_COUNT]) rdata = 32'(count_q);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      run_q   <= 1'b0;
      count_q <= '0;
    end else begin
      if (wr_ce[REG_CTRL]) run_q <= wdata[0];
      if (wr_ce[REG_CTRL] && wdata[1]) count_q <= '0;
      else if (run_q)                  count_q <= count_q + CNT_W'(1);
    end
  end

endmodule
