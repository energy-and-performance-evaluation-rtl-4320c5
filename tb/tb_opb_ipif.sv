// tb_opb_ipif: drives OPB cycles into the slave interface and checks that each
// hit produces exactly one register strobe of the right index with the write
// data, that reads return the register side's data, that every access is
// acknowledged in the clock after select (two clocks in all), that a word
// beyond the registers gets errack, that other addresses get no reply, and that
// the reply is zero while idle.
module tb_opb_ipif;
  timeunit 1ns;
  timeprecision 1ps;
  import opb_pkg::*;

  localparam logic [31:0] BASE = 32'h8000_0000;

  logic       clk = 0, rst = 1;
  opb_req_t   opb = '0;
  opb_rsp_t   sl;
  logic [2:0] wr_ce, rd_ce;
  logic [31:0] wdata, rdata;
  logic [3:0] be;
  int checks = 0, failures = 0;
  int wr_cnt [3], rd_cnt [3];
  logic [31:0] last_wdata;

  opb_ipif #(.C_BASEADDR(BASE), .C_AWIDTH(4), .NUM_REGS(3)) dut (.*);

  always #5 clk = ~clk;

  // register side: register i reads as 0x5EC0_0000 + i
  always_comb begin
    rdata = 32'h0;
    for (int i = 0; i < 3; i++) if (rd_ce[i]) rdata = 32'h5EC0_0000 + i;
  end

  always @(posedge clk) begin
    for (int i = 0; i < 3; i++) begin
      if (wr_ce[i]) begin wr_cnt[i]++; last_wdata = wdata; end
      if (rd_ce[i]) rd_cnt[i]++;
    end
    if (!rst && !sl.xferack && sl.dbus != 0) begin failures++; $display("data driven while idle"); end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input logic [31:0] a, input logic rnw, input logic [31:0] wd,
                      output logic [31:0] rd, output int cyc, output logic err, output logic ack);
    @(negedge clk);
    opb.abus = a; opb.rnw = rnw; opb.dbus = rnw ? 32'h0 : wd; opb.be = 4'hF; opb.select = 1;
    cyc = 1;
    do begin @(negedge clk); cyc++; end while (!sl.xferack && cyc < 20);
    ack = sl.xferack; rd = sl.dbus; err = sl.errack;
    // like a real master, drop select only after the edge that samples xferack
    @(posedge clk); #1;
    opb = '0;
  endtask

  initial begin
    logic [31:0] rd; int cyc; logic err, ack;
    for (int i = 0; i < 3; i++) begin wr_cnt[i] = 0; rd_cnt[i] = 0; end
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 3; i++) begin
      logic [31:0] d;
      d = $urandom;
      xfer(BASE + 4*i, 1'b0, d, rd, cyc, err, ack);
      checks += 4;
      if (!ack || err) begin failures++; $display("write %0d not acknowledged", i); end
      if (cyc != 2) begin failures++; $display("write took %0d clocks", cyc); end
      if (wr_cnt[i] != 1) begin failures++; $display("wr_ce[%0d] pulsed %0d times", i, wr_cnt[i]); end
      if (last_wdata != d) begin failures++; $display("write data %h, expected %h", last_wdata, d); end
    end
    for (int i = 0; i < 3; i++) begin
      xfer(BASE + 4*i, 1'b1, 0, rd, cyc, err, ack);
      checks += 4;
      if (!ack || err) begin failures++; $display("read %0d not acknowledged", i); end
      if (cyc != 2) begin failures++; $display("read took %0d clocks", cyc); end
      if (rd_cnt[i] != 1) begin failures++; $display("rd_ce[%0d] pulsed %0d times", i, rd_cnt[i]); end
      if (rd != 32'h5EC0_0000 + i) begin failures++; $display("read %h", rd); end
    end
    // word 3 is inside the window but has no register
    xfer(BASE + 12, 1'b1, 0, rd, cyc, err, ack);
    checks += 2;
    if (!ack || !err) begin failures++; $display("no errack for missing register"); end
    if (rd != 0) begin failures++; $display("missing register read %h", rd); end
    // outside the window: no reply
    xfer(BASE + 32'h10, 1'b0, 32'h1234, rd, cyc, err, ack);
    checks += 2;
    if (ack) begin failures++; $display("acknowledged a foreign address"); end
    if (wr_cnt[0] + wr_cnt[1] + wr_cnt[2] != 3) begin failures++; $display("foreign write strobed"); end
    // back-to-back writes
    for (int n = 0; n < 10; n++) begin
      int i;
      i = n % 3;
      xfer(BASE + 4*i, 1'b0, n, rd, cyc, err, ack);
    end
    checks++;
    if (wr_cnt[0] != 5 || wr_cnt[1] != 4 || wr_cnt[2] != 4) begin
      failures++; $display("strobe counts %0d %0d %0d", wr_cnt[0], wr_cnt[1], wr_cnt[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
