// tb_opb_timer: starts the timer over the OPB, lets random numbers of clocks
// pass, stops it and reads the count. The expected count is the number of
// clocks between the decode clock of the start write and that of the stop
// write. Also checks that a stopped timer holds, that clear zeroes it, that the
// control register reads back and that each access takes two clocks.
module tb_opb_timer;
  timeunit 1ns;
  timeprecision 1ps;
  import opb_pkg::*;

  localparam logic [31:0] BASE = 32'h8001_0000;

  logic     clk = 0, rst = 1;
  opb_req_t opb = '0;
  opb_rsp_t sl;
  int checks = 0, failures = 0;
  int unsigned cyc_now = 0;

  opb_timer #(.C_BASEADDR(BASE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc_now++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // returns the clock number of the posedge that decodes the cycle
  task automatic xfer(input logic [31:0] a, input logic rnw, input logic [31:0] wd,
                      output logic [31:0] rd, output int unsigned dec);
    int cyc;
    @(negedge clk);
    opb.abus = a; opb.rnw = rnw; opb.dbus = rnw ? 32'h0 : wd; opb.be = 4'hF; opb.select = 1;
    dec = cyc_now + 1;
    cyc = 1;
    do begin @(negedge clk); cyc++; end while (!sl.xferack && cyc < 20);
    rd = sl.dbus;
    checks++;
    if (cyc != 2) begin failures++; $display("access took %0d clocks", cyc); end
    @(posedge clk); #1;   // select drops after the edge that samples xferack
    opb = '0;
  endtask

  initial begin
    logic [31:0] rd, prev;
    int unsigned t0, t1, dummy;
    repeat (3) @(negedge clk); rst = 0;
    for (int it = 0; it < 8; it++) begin
      int w;
      w = $urandom_range(0, 300);
      xfer(BASE, 1'b0, 32'h3, rd, t0);            // clear and run
      repeat (w) @(negedge clk);
      xfer(BASE, 1'b0, 32'h0, rd, t1);            // stop
      xfer(BASE + 4, 1'b1, 0, rd, dummy);
      checks++;
      if (rd != t1 - t0) begin failures++; $display("count %0d, expected %0d", rd, t1 - t0); end
      prev = rd;
      repeat (20) @(negedge clk);
      xfer(BASE + 4, 1'b1, 0, rd, dummy);
      checks++;
      if (rd != prev) begin failures++; $display("stopped timer moved: %0d -> %0d", prev, rd); end
    end
    xfer(BASE, 1'b0, 32'h1, rd, t0);
    xfer(BASE, 1'b1, 0, rd, dummy);
    checks++;
    if (rd != 32'h1) begin failures++; $display("control reads %h", rd); end
    xfer(BASE, 1'b0, 32'h2, rd, t1);              // clear and stop
    xfer(BASE + 4, 1'b1, 0, rd, dummy);
    checks++;
    if (rd != 0) begin failures++; $display("count %0d after clear", rd); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
