// tb_crypto_shell: drives the shell's register strobes directly, with a small
// model of a PRESENT-shaped core (80-bit key, 64-bit block) that answers ld
// after 30 clocks with ct = pt ^ key[63:0]. Checks the word-by-word assembly of
// key and plaintext, the ld pulse one clock after START, the busy and done bits
// of the status word, the word-by-word ciphertext read-out, read-back of the
// registers and the error flag for bad indices, unknown opcodes and START while
// busy.
module tb_crypto_shell;
  timeunit 1ns;
  timeprecision 1ps;
  import crypto_pkg::*;

  logic        clk = 0, rst = 1;
  logic [2:0]  wr_ce = '0, rd_ce = '0;
  logic [31:0] wdata = '0, rdata;
  logic [79:0] key;
  logic [63:0] pt, ct;
  logic        ld, done;
  int checks = 0, failures = 0;
  int ld_pulses = 0;

  crypto_shell #(.KEY_W(80), .BLK_W(64)) dut (.*);

  always #5 clk = ~clk;

  // core model
  int cnt = 0;
  always @(posedge clk) begin
    if (rst) begin done <= 0; ct <= '0; cnt <= 0; end
    else if (ld) begin done <= 0; cnt <= 30; ld_pulses++; end
    else if (cnt > 1) cnt <= cnt - 1;
    else if (cnt == 1) begin cnt <= 0; done <= 1; ct <= pt ^ key[63:0]; end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int r, logic [31:0] d);
    @(negedge clk); wr_ce = 3'(1 << r); wdata = d;
    @(negedge clk); wr_ce = '0;
  endtask

  task automatic rdreg(int r, output logic [31:0] d);
    @(negedge clk); rd_ce = 3'(1 << r); #1 d = rdata;
    @(negedge clk); rd_ce = '0;
  endtask

  task automatic cmd(opcode_e op, int idx, logic [31:0] d = 0);
    wr(REG_DATA_IN, d);
    wr(REG_INSTR, make_cmd(op, 4'(idx)));
  endtask

  task automatic status(output logic [31:0] s);
    cmd(OP_STATUS, 0);
    rdreg(REG_DATA_OUT, s);
  endtask

  initial begin
    logic [31:0] d, s;
    logic [79:0] k;
    logic [63:0] p, exp;
    repeat (3) @(negedge clk); rst = 0;
    for (int it = 0; it < 5; it++) begin
      k = {16'($urandom), $urandom, $urandom};
      p = {$urandom, $urandom};
      for (int i = 0; i < 3; i++) cmd(OP_KEY, i, 32'(k >> (32*i)));
      for (int i = 0; i < 2; i++) cmd(OP_PT, i, 32'(p >> (32*i)));
      checks += 2;
      if (key !== k) begin failures++; $display("key %h, expected %h", key, k); end
      if (pt !== p) begin failures++; $display("pt %h, expected %h", pt, p); end
      // START: ld must follow in the next clock, exactly once
      wr(REG_DATA_IN, 0);
      @(negedge clk); wr_ce = 3'b001; wdata = make_cmd(OP_START, 0);
      @(negedge clk); wr_ce = '0;
      checks++;
      if (!ld) begin failures++; $display("no ld one clock after START"); end
      @(negedge clk);
      checks++;
      if (ld) begin failures++; $display("ld longer than one clock"); end
      status(s);
      checks++;
      if (s[ST_BUSY] !== 1'b1 || s[ST_DONE] !== 1'b0) begin failures++; $display("status %h while busy", s); end
      // START while busy is an error
      cmd(OP_START, 0);
      repeat (30) @(negedge clk);
      status(s);
      checks++;
      if (s != 32'h5) begin failures++; $display("status %h after done with error, expected 5", s); end
      status(s);
      checks++;
      if (s != 32'h1) begin failures++; $display("error flag not cleared: %h", s); end
      exp = p ^ k[63:0];
      for (int i = 0; i < 2; i++) begin
        cmd(OP_CT, i);
        rdreg(REG_DATA_OUT, d);
        checks++;
        if (d !== 32'(exp >> (32*i))) begin failures++; $display("ct word %0d %h", i, d); end
      end
    end
    checks++;
    if (ld_pulses != 5) begin failures++; $display("%0d ld pulses, expected 5", ld_pulses); end
    // read-back of instructions and data_in
    wr(REG_DATA_IN, 32'hCAFE_F00D);
    rdreg(REG_DATA_IN, d);
    checks++;
    if (d != 32'hCAFE_F00D) begin failures++; $display("data_in read %h", d); end
    wr(REG_INSTR, make_cmd(OP_NOP, 0));
    rdreg(REG_INSTR, d);
    checks++;
    if (d != 32'h0) begin failures++; $display("instr read %h", d); end
    // illegal commands
    k = key;
    cmd(OP_KEY, 3, 32'hFFFF_FFFF);
    status(s);
    checks += 2;
    if (!s[ST_ERR]) begin failures++; $display("no error for key word 3"); end
    if (key !== k) begin failures++; $display("key changed by bad index"); end
    cmd(OP_CT, 2);
    status(s);
    checks++;
    if (!s[ST_ERR]) begin failures++; $display("no error for ct word 2"); end
    wr(REG_INSTR, 32'hF000_0000);
    status(s);
    checks++;
    if (!s[ST_ERR]) begin failures++; $display("no error for unknown opcode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
