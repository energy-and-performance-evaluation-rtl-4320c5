// tb_opb_bus: two behavioural slaves on the bus. Slave 0 owns 0x1000_0000..0x1000_00FF
// and answers after 1 clock, slave 1 owns 0x2000_0000..0x2000_00FF and answers
// after 5 clocks, except at 0x2000_0080 where it suppresses the timeout and
// answers after 30 clocks, and at 0x2000_0040 where it asks for a retry. Each
// slave returns the address XOR a slave-specific constant. Checks that read
// data and acknowledges reach the master from either slave, that an address
// nobody owns ends in timeout after exactly 16 clocks of select, that
// toutsup prevents the timeout, and that retry reaches the master.
module tb_opb_bus;
  timeunit 1ns;
  timeprecision 1ps;
  import opb_pkg::*;

  logic      clk = 0, rst = 1;
  opb_req_t  m_req = '0, opb;
  opb_mrsp_t m_rsp;
  opb_rsp_t  sl [2];
  int checks = 0, failures = 0;

  opb_bus #(.NUM_SLAVES(2), .TIMEOUT(16)) dut (.*);

  always #5 clk = ~clk;

  // behavioural slaves
  int wait_c [2];
  for (genvar g = 0; g < 2; g++) begin : g_sl
    always @(posedge clk) begin
      logic mine;
      int lat;
      mine = opb.select && opb.abus[31:8] == (g == 0 ? 24'h100000 : 24'h200000);
      lat  = (g == 0) ? 1 : (opb.abus[7:0] == 8'h80 ? 30 : 5);
      sl[g] <= '0;
      if (rst || !mine || sl[g].xferack || sl[g].retry) begin
        wait_c[g] <= 0;
      end else begin
        wait_c[g] <= wait_c[g] + 1;
        sl[g].toutsup <= (g == 1 && opb.abus[7:0] == 8'h80);
        if (g == 1 && opb.abus[7:0] == 8'h40) begin
          sl[g].retry <= 1;
        end else if (wait_c[g] + 1 == lat) begin
          sl[g].xferack <= 1;
          sl[g].dbus    <= opb.rnw ? (opb.abus ^ (g == 0 ? 32'hA5A5_0000 : 32'h5A5A_0000)) : 32'h0;
        end
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic xfer(input logic [31:0] a, output logic [31:0] rd, output int cyc,
                      output logic ack, output logic tout, output logic rty);
    @(negedge clk);
    m_req.abus = a; m_req.rnw = 1; m_req.be = 4'hF; m_req.select = 1;
    cyc = 1;
    while (!m_rsp.xferack && !m_rsp.timeout && !m_rsp.retry && cyc < 60) begin
      @(negedge clk); cyc++;
    end
    ack = m_rsp.xferack; tout = m_rsp.timeout; rty = m_rsp.retry; rd = m_rsp.dbus;
    m_req = '0;
  endtask

  initial begin
    logic [31:0] rd; int cyc; logic ack, tout, rty;
    sl[0] = '0; sl[1] = '0;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 6; i++) begin
      logic [31:0] a;
      a = (i % 2 == 0) ? 32'h1000_0000 + 4*i : 32'h2000_0000 + 4*i;
      xfer(a, rd, cyc, ack, tout, rty);
      checks += 3;
      if (!ack || tout) begin failures++; $display("no ack from %h", a); end
      if (rd != (a ^ ((i % 2 == 0) ? 32'hA5A5_0000 : 32'h5A5A_0000))) begin failures++; $display("read %h from %h", rd, a); end
      if (cyc != ((i % 2 == 0) ? 2 : 6)) begin failures++; $display("%0d clocks from %h", cyc, a); end
    end
    xfer(32'h3000_0000, rd, cyc, ack, tout, rty);
    checks += 2;
    if (!tout || ack) begin failures++; $display("no timeout for unowned address"); end
    if (cyc != 16) begin failures++; $display("timeout after %0d clocks, expected 16", cyc); end
    xfer(32'h2000_0080, rd, cyc, ack, tout, rty);
    checks += 2;
    if (!ack || tout) begin failures++; $display("toutsup did not hold off the timeout"); end
    if (cyc != 31) begin failures++; $display("slow slave took %0d clocks", cyc); end
    xfer(32'h2000_0040, rd, cyc, ack, tout, rty);
    checks++;
    if (!rty || ack) begin failures++; $display("retry not passed on"); end
    // a second cycle to the unowned address times out again after 16 clocks
    xfer(32'h3000_0004, rd, cyc, ack, tout, rty);
    checks++;
    if (!tout || cyc != 16) begin failures++; $display("second timeout after %0d clocks", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
