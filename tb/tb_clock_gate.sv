// tb_clock_gate: self-checking test of the clock-gating cell.
// A random enable is changed in both clock phases. The gated clock must be
// high exactly when clk is high and the enable was high at the preceding
// rising edge of clk, so a change of the enable during the high phase must
// neither cut a pulse short nor create one. Rising edges of gclk are counted
// against the number of enabled cycles.
`timescale 1ns/1ps
module tb_clock_gate;
  logic clk = 1'b0, en = 1'b0, gclk;
  int checks = 0, failures = 0;
  int exp_edges = 0, got_edges = 0;
  logic en_at_rise = 1'b0;

  clock_gate dut (.clk(clk), .en(en), .gclk(gclk));

  always @(posedge gclk) got_edges++;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // settle the latch with clk low
    en = 1'b0;
    #5;
    for (int cyc = 0; cyc < 400; cyc++) begin
      // low phase: new enable
      en = 1'($urandom_range(0, 1));
      #2;
      chk(gclk, 1'b0, "gclk low while clk low");
      #3;
      clk = 1'b1;
      en_at_rise = en;
      if (en_at_rise) exp_edges++;
      #1;
      chk(gclk, en_at_rise, "gclk after rising edge");
      // high phase: enable toggles, gated clock must not follow
      en = ~en;
      #2;
      chk(gclk, en_at_rise, "gclk held during high phase");
      #2;
      clk = 1'b0;
      #1;
      chk(gclk, 1'b0, "gclk after falling edge");
    end
    checks++;
    if (got_edges != exp_edges) begin
      failures++;
      $display("FAIL edge count %0d expected %0d", got_edges, exp_edges);
    end
    $display("gated clock edges %0d of 400 cycles", got_edges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
