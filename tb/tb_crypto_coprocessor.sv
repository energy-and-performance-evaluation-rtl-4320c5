// tb_crypto_coprocessor: an AES-128 and a PRESENT-80 coprocessor, each driven
// over its own OPB by the command sequence a software driver issues: key words,
// plaintext words, START, STATUS polls until done, ciphertext words. Results
// are compared with the reference models. The core latency is checked through
// the bus: a STATUS command decoded L clocks after the START command must still
// see busy, one decoded L+1 clocks after must see done (L = 12 for AES, 33 for
// PRESENT, the clocks from ld to done plus the clock from START to ld). Also
// checks the errack for the unused word of the window.
module tb_crypto_coprocessor;
  timeunit 1ns;
  timeprecision 1ps;
  import opb_pkg::*;
  import crypto_pkg::*;
  import tb_ref_pkg::*;

  localparam logic [31:0] BASE = 32'h8000_0000;

  logic        clk = 0, rst = 1;
  opb_req_t    req [2];
  opb_rsp_t    rsp [2];
  int checks = 0, failures = 0;
  int unsigned cyc_now = 0;
  int busy_polls = 0;

  crypto_coprocessor #(.CIPHER(CIPHER_AES),     .C_BASEADDR(BASE)) u_aes (.clk, .rst, .opb(req[0]), .sl(rsp[0]));
  crypto_coprocessor #(.CIPHER(CIPHER_PRESENT), .C_BASEADDR(BASE)) u_pre (.clk, .rst, .opb(req[1]), .sl(rsp[1]));

  always #5 clk = ~clk;
  always @(posedge clk) cyc_now++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One OPB cycle on system s; dec is the number of the clock edge that decodes it.
  task automatic xfer(int s, logic [31:0] a, logic rnw, logic [31:0] wd,
                      output logic [31:0] rd, output logic err, output int unsigned dec,
                      input bit sync = 1);
    int cyc;
    if (sync) @(negedge clk);
    req[s].abus = a; req[s].rnw = rnw; req[s].dbus = rnw ? 32'h0 : wd;
    req[s].be = 4'hF; req[s].select = 1; req[s].seqaddr = 0;
    dec = cyc_now + 1;
    cyc = 1;
    do begin @(negedge clk); cyc++; end while (!rsp[s].xferack && cyc < 20);
    rd = rsp[s].dbus; err = rsp[s].errack;
    checks++;
    if (cyc != 2) begin failures++; $display("OPB access took %0d clocks", cyc); end
    @(posedge clk); #1;   // select drops after the edge that samples xferack
    req[s] = '0;
  endtask

  task automatic wr(int s, int unsigned off, logic [31:0] d);
    logic [31:0] rd; logic err; int unsigned dec;
    xfer(s, BASE + off, 1'b0, d, rd, err, dec);
  endtask

  task automatic rdw(int s, int unsigned off, output logic [31:0] d);
    logic err; int unsigned dec;
    xfer(s, BASE + off, 1'b1, 0, d, err, dec);
  endtask

  task automatic status(int s, output logic [31:0] st);
    wr(s, 0, make_cmd(OP_STATUS, 0));
    rdw(s, 4, st);
  endtask

  task automatic load(int s, logic [127:0] k, logic [127:0] p, int kw, int bw);
    for (int i = 0; i < kw; i++) begin wr(s, 8, 32'(k >> (32*i))); wr(s, 0, make_cmd(OP_KEY, 4'(i))); end
    for (int i = 0; i < bw; i++) begin wr(s, 8, 32'(p >> (32*i))); wr(s, 0, make_cmd(OP_PT, 4'(i))); end
  endtask

  task automatic read_ct(int s, int bw, output logic [127:0] c);
    logic [31:0] d;
    c = '0;
    for (int i = 0; i < bw; i++) begin
      wr(s, 0, make_cmd(OP_CT, 4'(i)));
      rdw(s, 4, d);
      c[32*i +: 32] = d;
    end
  endtask

  task automatic encrypt(int s, logic [127:0] k, logic [127:0] p, output logic [127:0] c);
    logic [31:0] st;
    int kw, bw;
    kw = (s == 0) ? 4 : 3;
    bw = (s == 0) ? 4 : 2;
    load(s, k, p, kw, bw);
    wr(s, 0, make_cmd(OP_START, 0));
    do begin
      status(s, st);
      if (st[ST_BUSY]) busy_polls++;
    end while (!st[ST_DONE]);
    read_ct(s, bw, c);
  endtask

  // START, then a STATUS command decoded exactly `gap` clocks later.
  task automatic start_and_probe(int s, int gap, output logic [31:0] st);
    logic [31:0] rd; logic err; int unsigned d0, d1;
    xfer(s, BASE, 1'b0, make_cmd(OP_START, 0), rd, err, d0);
    do @(negedge clk); while (cyc_now + 1 < d0 + gap);
    xfer(s, BASE, 1'b0, make_cmd(OP_STATUS, 0), rd, err, d1, 0);
    checks++;
    if (d1 != d0 + gap) begin failures++; $display("probe at +%0d, wanted +%0d", d1 - d0, gap); end
    rdw(s, 4, st);
  endtask

  initial begin
    logic [127:0] k, p, c, exp;
    logic [31:0] st, rd;
    logic err;
    int unsigned dec;
    req[0] = '0; req[1] = '0;
    repeat (3) @(negedge clk); rst = 0;
    // published vectors
    encrypt(0, 128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, c);
    checks++;
    if (c !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin failures++; $display("AES vector: %h", c); end
    encrypt(1, 128'h0, 128'h0, c);
    checks++;
    if (c[63:0] !== 64'h5579C1387B228445) begin failures++; $display("PRESENT vector: %h", c[63:0]); end
    for (int i = 0; i < 10; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      encrypt(0, k, p, c);
      exp = aes_ref(k, p);
      checks++;
      if (c !== exp) begin failures++; $display("AES %h, expected %h", c, exp); end
      k[127:80] = '0; p[127:64] = '0;
      encrypt(1, k, p, c);
      exp = 128'(present_ref(k[79:0], p[63:0]));
      checks++;
      if (c !== exp) begin failures++; $display("PRESENT %h, expected %h", c, exp); end
    end
    checks++;
    if (busy_polls == 0) begin failures++; $display("never polled a busy coprocessor"); end
    // latency through the bus
    for (int s = 0; s < 2; s++) begin
      int lat;
      lat = (s == 0) ? 12 : 33;
      start_and_probe(s, lat, st);
      checks++;
      if (!st[ST_BUSY] || st[ST_DONE]) begin failures++; $display("sys %0d: status %h at +%0d", s, st, lat); end
      repeat (40) @(negedge clk);
      start_and_probe(s, lat + 1, st);
      checks++;
      if (st[ST_BUSY] || !st[ST_DONE]) begin failures++; $display("sys %0d: status %h at +%0d", s, st, lat + 1); end
    end
    // unused word of the window
    xfer(0, BASE + 12, 1'b1, 0, rd, err, dec);
    checks++;
    if (!err) begin failures++; $display("no errack for offset 0xC"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
