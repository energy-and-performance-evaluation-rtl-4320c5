// tb_lmb_bram: random reads and byte-masked writes on both ports of the block
// RAM, compared with a model array. Checks the one-clock read latency, the
// read-first behaviour when a port reads and writes the same word, and that
// port B's byte wins when both ports write the same byte in one clock.
module tb_lmb_bram;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int DEPTH = 256;

  logic        clk = 0;
  logic        a_en = 0, b_en = 0;
  logic [3:0]  a_we = 0, b_we = 0;
  logic [7:0]  a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  lmb_bram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d, logic [3:0] we);
    for (int i = 0; i < 4; i++) if (we[i]) old[8*i +: 8] = d[8*i +: 8];
    return old;
  endfunction

  initial begin
    logic [31:0] exp_a, exp_b;
    logic        chk_a, chk_b;
    // fill through port A
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); a_en = 1; a_we = 4'hF; a_addr = 8'(i); a_wdata = $urandom; model[i] = a_wdata;
    end
    @(negedge clk); a_en = 0; a_we = 0;
    chk_a = 0; chk_b = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // results of the previous clock
      if (chk_a) begin checks++; if (a_rdata !== exp_a) begin failures++; $display("A read %h, expected %h", a_rdata, exp_a); end end
      if (chk_b) begin checks++; if (b_rdata !== exp_b) begin failures++; $display("B read %h, expected %h", b_rdata, exp_b); end end
      a_en = $urandom_range(0, 1); b_en = $urandom_range(0, 1);
      a_we = (n % 3 == 0) ? 4'($urandom) : 4'h0;
      b_we = (n % 5 == 0) ? 4'($urandom) : 4'h0;
      a_addr = (n % 7 == 0) ? 8'h10 : 8'($urandom);
      b_addr = (n % 7 == 0) ? 8'h10 : 8'($urandom);
      a_wdata = $urandom; b_wdata = $urandom;
      chk_a = a_en; chk_b = b_en;
      exp_a = model[a_addr]; exp_b = model[b_addr];
      if (a_en) model[a_addr] = merge(model[a_addr], a_wdata, a_we);
      if (b_en) model[b_addr] = merge(model[b_addr], b_wdata, b_we);
    end
    @(negedge clk); a_en = 0; b_en = 0;
    // read everything back through port B
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); b_en = 1; b_addr = 8'(i);
      @(negedge clk); b_en = 0;
      checks++;
      if (b_rdata !== model[i]) begin failures++; $display("word %0d %h, expected %h", i, b_rdata, model[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
