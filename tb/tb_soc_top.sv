// tb_soc_top: end-to-end run of both platforms at their default sizes, the
// AES-based and the PRESENT-based system working at the same time. A model of
// each processor keeps its key and plaintext in block RAM (written and read
// back over the data LMB), fetches "program" words over the instruction LMB,
// and drives its coprocessor over the OPB with the command sequence of a
// software driver. The hardware timer measures runs of 4, 10 and 100
// encryptions, each with a fresh key. Every ciphertext is compared with the
// reference model and stored back into block RAM.
//
// Mechanisms that must each happen at least once (a failure is counted for
// any that never does): key and plaintext words loaded one at a time, a
// ciphertext read out word by word, a STATUS poll that finds the coprocessor
// busy, a START refused because the coprocessor is busy, a command with a bad
// word index, an errack for an unused register, an OPB timeout at an address
// nobody owns, a timer run, a stopped timer that holds, instruction fetches and
// data reads and writes on the LMBs.
module tb_soc_top;
  timeunit 1ns;
  timeprecision 1ps;
  import opb_pkg::*;
  import lmb_pkg::*;
  import crypto_pkg::*;
  import tb_ref_pkg::*;

  localparam logic [31:0] CP = 32'h8000_0000;   // coprocessor
  localparam logic [31:0] TM = 32'h8001_0000;   // timer

  logic      clk = 0, rst = 1;
  opb_req_t  m_req [2];
  opb_mrsp_t m_rsp [2];
  lmb_req_t  il_req [2], dl_req [2];
  lmb_rsp_t  il_rsp [2], dl_rsp [2];
  int checks = 0, failures = 0;
  int unsigned cyc_now = 0;

  // mechanism counters, per system
  int n_keyw [2], n_ptw [2], n_ctw [2], n_busy [2], n_start_err [2], n_idx_err [2];
  int n_runs [2];
  int n_errack [2], n_tout [2], n_timer [2], n_hold [2], n_ifetch [2], n_drd [2], n_dwr [2];

  soc_top dut (
    .clk, .rst,
    .aes_m_req(m_req[0]), .aes_m_rsp(m_rsp[0]),
    .aes_ilmb_req(il_req[0]), .aes_ilmb_rsp(il_rsp[0]),
    .aes_dlmb_req(dl_req[0]), .aes_dlmb_rsp(dl_rsp[0]),
    .pre_m_req(m_req[1]), .pre_m_rsp(m_rsp[1]),
    .pre_ilmb_req(il_req[1]), .pre_ilmb_rsp(il_rsp[1]),
    .pre_dlmb_req(dl_req[1]), .pre_dlmb_rsp(dl_rsp[1])
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc_now++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- bus models of the processor ----------------
  task automatic opb(int s, logic [31:0] a, logic rnw, logic [31:0] wd, output logic [31:0] rd,
                     output logic err, output logic tout, output int unsigned dec);
    int cyc;
    @(negedge clk);
    m_req[s].abus = a; m_req[s].rnw = rnw; m_req[s].dbus = rnw ? 32'h0 : wd;
    m_req[s].be = 4'hF; m_req[s].select = 1; m_req[s].seqaddr = 0;
    dec = cyc_now + 1;
    cyc = 1;
    do begin @(negedge clk); cyc++; end while (!m_rsp[s].xferack && !m_rsp[s].timeout && cyc < 40);
    rd = m_rsp[s].dbus; err = m_rsp[s].errack; tout = m_rsp[s].timeout;
    if (!tout) begin
      checks++;
      if (cyc != 2) begin failures++; $display("sys %0d: OPB access took %0d clocks", s, cyc); end
    end
    @(posedge clk); #1;   // select drops after the edge that samples xferack
    m_req[s] = '0;
  endtask

  task automatic wr(int s, logic [31:0] a, logic [31:0] d);
    logic [31:0] rd; logic err, tout; int unsigned dec;
    opb(s, a, 1'b0, d, rd, err, tout, dec);
  endtask

  task automatic rdw(int s, logic [31:0] a, output logic [31:0] d);
    logic err, tout; int unsigned dec;
    opb(s, a, 1'b1, 0, d, err, tout, dec);
  endtask

  // side 0 = instruction LMB, 1 = data LMB
  task automatic lmb(int s, int side, logic [31:0] a, logic w, logic [31:0] d, output logic [31:0] rd);
    lmb_req_t r;
    int cyc;
    r = '0;
    r.abus = a; r.wdbus = d; r.be = 4'hF; r.addrstrobe = 1; r.readstrobe = !w; r.writestrobe = w;
    @(negedge clk);
    if (side == 0) il_req[s] = r; else dl_req[s] = r;
    @(negedge clk);
    il_req[s] = (side == 0) ? LMB_REQ_IDLE : il_req[s];
    dl_req[s] = (side == 1) ? LMB_REQ_IDLE : dl_req[s];
    cyc = 2;
    rd = (side == 0) ? il_rsp[s].dbus : dl_rsp[s].dbus;
    checks++;
    if (!((side == 0) ? il_rsp[s].ready : dl_rsp[s].ready)) begin
      failures++; $display("sys %0d: LMB access not ready after 2 clocks", s);
    end
    if (side == 0) n_ifetch[s]++;
    else if (w)    n_dwr[s]++;
    else           n_drd[s]++;
  endtask

  // ---------------- driver ----------------
  task automatic status(int s, output logic [31:0] st);
    wr(s, CP, make_cmd(OP_STATUS, 0));
    rdw(s, CP + 4, st);
  endtask

  // One encryption: key and plaintext come from block RAM words 16.., the
  // ciphertext goes to words 32..
  task automatic encrypt_from_ram(int s, output logic [127:0] c);
    logic [31:0] d, st;
    int kw, bw;
    kw = (s == 0) ? 4 : 3;
    bw = (s == 0) ? 4 : 2;
    for (int i = 0; i < kw; i++) begin
      lmb(s, 1, 32'h40 + 4*i, 1'b0, 0, d);
      wr(s, CP + 8, d); wr(s, CP, make_cmd(OP_KEY, 4'(i))); n_keyw[s]++;
    end
    for (int i = 0; i < bw; i++) begin
      lmb(s, 1, 32'h60 + 4*i, 1'b0, 0, d);
      wr(s, CP + 8, d); wr(s, CP, make_cmd(OP_PT, 4'(i))); n_ptw[s]++;
    end
    wr(s, CP, make_cmd(OP_START, 0));
    // the second START of every 8th run comes while busy and must be refused
    n_runs[s]++;
    if (n_runs[s] % 8 == 1) begin
      wr(s, CP, make_cmd(OP_START, 0));
      status(s, st);
      if (st[ST_ERR]) n_start_err[s]++;
      else begin failures++; $display("sys %0d: START while busy not refused", s); end
      checks++;
    end
    do begin
      status(s, st);
      if (st[ST_BUSY]) n_busy[s]++;
    end while (!st[ST_DONE]);
    c = '0;
    for (int i = 0; i < bw; i++) begin
      wr(s, CP, make_cmd(OP_CT, 4'(i)));
      rdw(s, CP + 4, d);
      c[32*i +: 32] = d;
      n_ctw[s]++;
      lmb(s, 1, 32'h80 + 4*i, 1'b1, d, d);
    end
  endtask

  task automatic run_workload(int s, int n_enc);
    logic [127:0] k, p, c, exp;
    logic [31:0] rd, cnt, cnt2;
    logic err, tout;
    int unsigned t0, t1;
    opb(s, TM, 1'b0, 32'h3, rd, err, tout, t0);     // clear and start the timer
    for (int e = 0; e < n_enc; e++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      if (s == 1) begin k[127:80] = '0; p[127:64] = '0; end
      // "program" fetch and placing the data in memory
      lmb(s, 0, 32'h0 + 4*(e % 16), 1'b0, 0, rd);
      checks++;
      if (rd !== 32'hC0DE_0000 + 32'(e % 16)) begin failures++; $display("sys %0d: fetched %h", s, rd); end
      for (int i = 0; i < 4; i++) lmb(s, 1, 32'h40 + 4*i, 1'b1, k[32*i +: 32], rd);
      for (int i = 0; i < 4; i++) lmb(s, 1, 32'h60 + 4*i, 1'b1, p[32*i +: 32], rd);
      encrypt_from_ram(s, c);
      exp = (s == 0) ? aes_ref(k, p) : 128'(present_ref(k[79:0], p[63:0]));
      checks++;
      if (c !== exp) begin failures++; $display("sys %0d: ct %h, expected %h", s, c, exp); end
      lmb(s, 1, 32'h80, 1'b0, 0, rd);
      checks++;
      if (rd !== exp[31:0]) begin failures++; $display("sys %0d: stored ct word %h", s, rd); end
    end
    opb(s, TM, 1'b0, 32'h0, rd, err, tout, t1);     // stop
    rdw(s, TM + 4, cnt);
    n_timer[s]++;
    checks++;
    if (cnt != t1 - t0) begin failures++; $display("sys %0d: timer %0d, expected %0d", s, cnt, t1 - t0); end
    repeat (5) @(negedge clk);
    rdw(s, TM + 4, cnt2);
    checks++;
    if (cnt2 != cnt) begin failures++; $display("sys %0d: stopped timer moved", s); end
    else n_hold[s]++;
    $display("%s system: %0d encryptions in %0d clocks (%0d per encryption, core alone %0d)",
             s == 0 ? "AES-128" : "PRESENT-80", n_enc, cnt, cnt / n_enc, s == 0 ? 12 : 33);
  endtask

  task automatic bus_errors(int s);
    logic [31:0] rd, st; logic err, tout; int unsigned dec;
    opb(s, CP + 12, 1'b1, 0, rd, err, tout, dec);
    checks++;
    if (err) n_errack[s]++; else begin failures++; $display("sys %0d: no errack", s); end
    opb(s, 32'h9000_0000, 1'b1, 0, rd, err, tout, dec);
    checks++;
    if (tout) n_tout[s]++; else begin failures++; $display("sys %0d: no timeout", s); end
    wr(s, CP, make_cmd(OP_PT, 4'd7));
    status(s, st);
    checks++;
    if (st[ST_ERR]) n_idx_err[s]++; else begin failures++; $display("sys %0d: bad index accepted", s); end
  endtask

  task automatic system_run(int s);
    logic [31:0] rd;
    for (int i = 0; i < 16; i++) lmb(s, 1, 4*i, 1'b1, 32'hC0DE_0000 + i, rd);
    bus_errors(s);
    run_workload(s, 4);
    run_workload(s, 10);
    run_workload(s, 100);
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never happened: %s", what); end
  endtask

  initial begin
    for (int s = 0; s < 2; s++) begin
      m_req[s] = '0; il_req[s] = '0; dl_req[s] = '0;
      n_keyw[s] = 0; n_ptw[s] = 0; n_ctw[s] = 0; n_busy[s] = 0; n_start_err[s] = 0; n_idx_err[s] = 0;
      n_runs[s] = 0; n_errack[s] = 0; n_tout[s] = 0; n_timer[s] = 0; n_hold[s] = 0; n_ifetch[s] = 0; n_drd[s] = 0; n_dwr[s] = 0;
    end
    repeat (3) @(negedge clk); rst = 0;
    fork
      system_run(0);
      system_run(1);
    join
    for (int s = 0; s < 2; s++) begin
      $display("sys %0d: key words %0d, pt words %0d, ct words %0d, busy polls %0d, refused STARTs %0d, bad indices %0d,",
               s, n_keyw[s], n_ptw[s], n_ctw[s], n_busy[s], n_start_err[s], n_idx_err[s]);
      $display("       erracks %0d, timeouts %0d, timer runs %0d, timer holds %0d, fetches %0d, LMB reads %0d, LMB writes %0d",
               n_errack[s], n_tout[s], n_timer[s], n_hold[s], n_ifetch[s], n_drd[s], n_dwr[s]);
      need("key word load", n_keyw[s]);
      need("plaintext word load", n_ptw[s]);
      need("ciphertext word read", n_ctw[s]);
      need("busy poll", n_busy[s]);
      need("START refused while busy", n_start_err[s]);
      need("bad word index", n_idx_err[s]);
      need("errack", n_errack[s]);
      need("OPB timeout", n_tout[s]);
      need("timer run", n_timer[s]);
      need("stopped timer holds", n_hold[s]);
      need("instruction fetch", n_ifetch[s]);
      need("LMB data read", n_drd[s]);
      need("LMB data write", n_dwr[s]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
