// tb_misr: self-checking test of the 5-stage MISR.
// Random response streams are compacted and the register compared after
// every clock with a model written from the ring structure (stage i takes
// stage i-1, stage 0 takes stage 4, stage 2 also XORs stage 4, each XORs its
// response bit). Also checked:
// clear and hold (en low), and that a single flipped response bit changes
// the final signature.
`timescale 1ns/1ps
module tb_misr;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, en = 1'b0;
  logic [4:0] resp = '0, signature, model = '0;
  int checks = 0, failures = 0;

  misr dut (.*);

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

  function automatic logic [4:0] step(logic [4:0] m, logic [4:0] r);
    return {m[3], m[2], m[1] ^ m[4], m[0], m[4]} ^ r;
  endfunction

  initial begin
    logic [4:0] stream [64];
    logic [4:0] sig_good, m;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    chk(signature == '0, "reset");
    for (int k = 0; k < 300; k++) begin
      en = 1'($urandom_range(0, 3) != 0);
      resp = 5'($urandom);
      @(negedge clk);
      if (en) model = step(model, resp);
      chk(signature == model, "signature follows model");
    end
    en = 1'b0; clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    chk(signature == '0, "clear");
    // Single-bit error detection on a 64-word stream.
    foreach (stream[i]) stream[i] = 5'($urandom);
    m = '0;
    foreach (stream[i]) m = step(m, stream[i]);
    sig_good = m;
    for (int t = 0; t < 2; t++) begin
      clear = 1'b1; @(negedge clk); clear = 1'b0;
      en = 1'b1;
      foreach (stream[i]) begin
        resp = stream[i];
        if (t == 1 && i == 17) resp[2] = ~resp[2];
        @(negedge clk);
      end
      en = 1'b0;
      if (t == 0) chk(signature == sig_good, "good stream signature");
      else        chk(signature != sig_good, "flipped bit changes signature");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
