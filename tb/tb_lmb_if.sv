// tb_lmb_if: an LMB wrapper in front of a block RAM. Random word and byte
// writes and reads are compared with a model array; every access must be
// answered with ready in the clock after addrstrobe (two clocks in all), and
// an access outside the wrapper's 1 KB window must get no answer and change
// nothing.
module tb_lmb_if;
  timeunit 1ns;
  timeprecision 1ps;
  import lmb_pkg::*;

  logic       clk = 0, rst = 1;
  lmb_req_t   lmb = '0;
  lmb_rsp_t   sl;
  logic       bram_en;
  logic [3:0] bram_we;
  logic [7:0] bram_addr;
  logic [31:0] bram_wdata, bram_rdata;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  lmb_if #(.C_BASEADDR(32'h0), .C_AWIDTH(10)) dut (.*);

  lmb_bram #(.DEPTH(256)) u_ram (
    .clk,
    .a_en(bram_en), .a_we(bram_we), .a_addr(bram_addr), .a_wdata(bram_wdata), .a_rdata(bram_rdata),
    .b_en(1'b0), .b_we(4'h0), .b_addr(8'h0), .b_wdata(32'h0), .b_rdata()
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(logic [31:0] a, logic wr, logic [31:0] d, logic [3:0] be,
                        output logic [31:0] rd, output int cyc);
    @(negedge clk);
    lmb.abus = a; lmb.wdbus = d; lmb.be = be; lmb.addrstrobe = 1;
    lmb.readstrobe = !wr; lmb.writestrobe = wr;
    cyc = 1;
    @(negedge clk); lmb = '0; cyc++;
    while (!sl.ready && cyc < 10) begin @(negedge clk); cyc++; end
    rd = sl.dbus;
  endtask

  initial begin
    logic [31:0] rd; int cyc;
    repeat (3) @(negedge clk); rst = 0;
    for (int i = 0; i < 256; i++) begin
      model[i] = $urandom;
      access(4*i, 1'b1, model[i], 4'hF, rd, cyc);
      checks++;
      if (cyc != 2) begin failures++; $display("write took %0d clocks", cyc); end
    end
    for (int n = 0; n < 500; n++) begin
      int w; logic [3:0] be; logic [31:0] d;
      w = $urandom_range(0, 255);
      if (n % 2 == 0) begin
        be = 4'($urandom); d = $urandom;
        access(4*w, 1'b1, d, be, rd, cyc);
        for (int i = 0; i < 4; i++) if (be[i]) model[w][8*i +: 8] = d[8*i +: 8];
      end else begin
        access(4*w, 1'b0, 0, 4'hF, rd, cyc);
        checks++;
        if (rd !== model[w]) begin failures++; $display("word %0d read %h, expected %h", w, rd, model[w]); end
      end
      checks++;
      if (cyc != 2) begin failures++; $display("access took %0d clocks", cyc); end
    end
    // outside the window
    access(32'h400, 1'b1, 32'hDEAD_BEEF, 4'hF, rd, cyc);
    checks++;
    if (cyc != 10 || sl.ready) begin failures++; $display("answered outside its window"); end
    access(32'h0, 1'b0, 0, 4'hF, rd, cyc);
    checks++;
    if (rd !== model[0]) begin failures++; $display("foreign write changed word 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
