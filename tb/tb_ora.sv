// tb_ora: self-checking test of the output response analyzer.
// Three runs of 100 random patterns: all answers correct and the right
// golden signature (pass expected); one answer wrong (error flag, count 1,
// fail); all answers correct but a wrong golden signature (fail). Expected
// answers and signatures are computed here independently.
`timescale 1ns/1ps
module tb_ora;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, capture = 1'b0, check = 1'b0;
  logic [7:0] pattern = '0, resp = '0, err_count;
  logic [4:0] golden = '0, signature;
  logic err_flag, done, pass;
  int checks = 0, failures = 0;

  ora dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int bad_at, input bit bad_golden, output logic [4:0] sig);
    logic [4:0] m, r;
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    chk(!done && !err_flag && signature == 0, "clear");
    m = '0;
    for (int k = 0; k < 100; k++) begin
      pattern = 8'($urandom);
      r = 5'(pattern[3:0]) + 5'(pattern[7:4]);
      resp = {3'b000, r};
      if (k == bad_at) resp = resp ^ 8'h04;
      m = {m[3], m[2], m[1] ^ m[4], m[0], m[4]} ^ resp[4:0];
      capture = 1'b1;
      @(negedge clk);
      capture = 1'b0;
      if (k % 3 == 0) @(negedge clk);
    end
    chk(signature == m, "signature");
    golden = bad_golden ? ~m : m;
    check = 1'b1;
    @(negedge clk);
    check = 1'b0;
    chk(done, "verdict valid");
    sig = m;
  endtask

  initial begin
    logic [4:0] s;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run(-1, 1'b0, s);
    chk(pass && !err_flag && err_count == 0, "good run passes");
    run(37, 1'b0, s);
    chk(!pass && err_flag && err_count == 1, "wrong answer fails");
    run(-1, 1'b1, s);
    chk(!pass && !err_flag, "wrong signature fails");
    // an answer with a stray upper bit is an error
    @(negedge clk); clear = 1'b1; @(negedge clk); clear = 1'b0;
    pattern = 8'h21; resp = 8'h83; capture = 1'b1;
    @(negedge clk); capture = 1'b0;
    chk(err_flag, "upper frame bits checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
