// tb_present80_core: checks the PRESENT-80 core against the four published test
// vectors and 40 random blocks from the reference model, and checks that every
// encryption takes 33 clocks from the ld clock to done.
module tb_present80_core;
  timeunit 1ns;
  timeprecision 1ps;
  import tb_ref_pkg::*;

  logic        clk = 0, rst = 1, ld = 0;
  logic [79:0] key = '0;
  logic [63:0] pt = '0, ct;
  logic        done;
  int checks = 0, failures = 0;

  present80_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [79:0] k, logic [63:0] p, logic [63:0] exp);
    int n;
    @(negedge clk); key = k; pt = p; ld = 1;
    @(negedge clk); ld = 0; n = 1;
    checks++;
    if (done) begin failures++; $display("done not cleared by ld"); end
    while (!done && n < 100) begin @(negedge clk); n++; end
    checks += 2;
    if (n != 33) begin failures++; $display("latency %0d, expected 33", n); end
    if (ct !== exp) begin failures++; $display("key %h pt %h: ct %h, expected %h", k, p, ct, exp); end
    repeat (3) @(negedge clk);
    checks++;
    if (!done || ct !== exp) begin failures++; $display("result not held"); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    run(80'h0, 64'h0, 64'h5579C1387B228445);
    run(80'hFFFFFFFFFFFFFFFFFFFF, 64'h0, 64'hE72C46C0F5945049);
    run(80'h0, 64'hFFFFFFFFFFFFFFFF, 64'hA112FFC72F68417B);
    run(80'hFFFFFFFFFFFFFFFFFFFF, 64'hFFFFFFFFFFFFFFFF, 64'h3333DCD3213210D2);
    for (int i = 0; i < 40; i++) begin
      logic [79:0] k; logic [63:0] p;
      k = {$urandom, $urandom, 16'($urandom)};
      p = {$urandom, $urandom};
      run(k, p, present_ref(k, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
