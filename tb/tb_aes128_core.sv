// tb_aes128_core: checks the AES-128 core against the FIPS-197 examples and 40
// random blocks from the reference model, and checks that every encryption
// takes 12 clocks from the ld clock to done.
module tb_aes128_core;
  timeunit 1ns;
  timeprecision 1ps;
  import tb_ref_pkg::*;

  logic         clk = 0, rst = 1, ld = 0;
  logic [127:0] key = '0, pt = '0, ct;
  logic         done;
  int checks = 0, failures = 0;

  aes128_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] k, logic [127:0] p, logic [127:0] exp);
    int n;
    @(negedge clk); key = k; pt = p; ld = 1;
    @(negedge clk); ld = 0; n = 1;
    checks++;
    if (done) begin failures++; $display("done not cleared by ld"); end
    while (!done && n < 100) begin @(negedge clk); n++; end
    checks += 2;
    if (n != 12) begin failures++; $display("latency %0d, expected 12", n); end
    if (ct !== exp) begin failures++; $display("key %h pt %h: ct %h, expected %h", k, p, ct, exp); end
    repeat (2) @(negedge clk);
    checks++;
    if (!done || ct !== exp) begin failures++; $display("result not held"); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    checks++;
    if (aes_ref(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++; $display("reference model disagrees with FIPS-197");
    end
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    for (int i = 0; i < 40; i++) begin
      logic [127:0] k, p;
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, aes_ref(k, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
