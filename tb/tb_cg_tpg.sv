// tb_cg_tpg: self-checking test of the clock-gated LFSR pattern generator.
// For several seeds (including 0, which must act as 1) the generator runs a
// full cycle with gating on and once with gating off. Checked: every pattern
// against an independent model of x^8+x^6+x^5+x^4+1, that the cycle holds 255
// distinct patterns, that cycle_done pulses exactly after the 255th shift,
// and that with gating on each stage receives a clock edge only when its
// value changes (stage clock enables counted at every edge) while with gating off
// every stage is clocked on every shift.
`timescale 1ns/1ps
module tb_cg_tpg;
  localparam int N = 8;
  logic clk = 1'b0, rst = 1'b1, load = 1'b0, shift = 1'b0, gate_en = 1'b1;
  logic [N-1:0] seed = '0, pattern, clk_active;
  logic serial_out, cycle_done;
  int checks = 0, failures = 0;
  int stage_edges = 0;

  cg_tpg dut (.*);

  always #5 clk = ~clk;

  // Stage clock edges: stages enabled at a rising edge of clk.
  always @(posedge clk) if (!rst) stage_edges += $countones(clk_active);

  function automatic logic [N-1:0] model_next(logic [N-1:0] s);
    logic fb;
    fb = s[7] ^ s[5] ^ s[4] ^ s[3];
    return {s[6:0], fb};
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_cycle(input logic [N-1:0] s, input bit gate);
    logic [N-1:0] exp;
    bit seen [256];
    int changed_bits, edges0, done_at;
    gate_en = gate;
    @(negedge clk);
    seed = s; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    exp = (s == 0) ? 8'd1 : s;
    chk(pattern == exp, "seed loaded");
    foreach (seen[i]) seen[i] = 0;
    changed_bits = 0;
    edges0 = stage_edges;
    done_at = -1;
    for (int k = 1; k <= 255; k++) begin
      seen[pattern] = 1;
      shift = 1'b1;
      #1;
      if (gate) chk(clk_active == (model_next(pattern) ^ pattern), "per-stage enable = input differs from output");
      else      chk(clk_active == '1, "all stages enabled without gating");
      @(negedge clk);
      shift = 1'b0;
      changed_bits += $countones(model_next(exp) ^ exp);
      exp = model_next(exp);
      chk(pattern == exp, "pattern sequence");
      if (cycle_done) done_at = k;
      if (cycle_done && k != 255) $display("cycle_done early at %0d", k);
      // idle cycle between shifts: nothing may be clocked
      #1;
      chk(clk_active == '0, "no stage clocked while idle");
      @(negedge clk);
      if (cycle_done && done_at < 0) done_at = k;
    end
    chk(done_at == 255, "cycle_done after 255 shifts");
    chk(pattern == ((s == 0) ? 8'd1 : s), "back at seed after 255 shifts");
    begin
      int distinct = 0;
      foreach (seen[i]) distinct += seen[i];
      chk(distinct == 255 && !seen[0], "255 distinct non-zero patterns");
    end
    if (gate) chk(stage_edges - edges0 == changed_bits, "gated edges equal bit changes");
    else      chk(stage_edges - edges0 == 255 * N, "ungated: every stage clocked per shift");
    $display("seed %02h gate %0d: %0d stage clock edges for 255 shifts (ungated would be %0d)",
             s, gate, stage_edges - edges0, 255 * N);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    chk(pattern == '0, "reset clears LFSR");
    run_cycle(8'h01, 1'b1);
    run_cycle(8'h01, 1'b0);
    run_cycle(8'h00, 1'b1);
    run_cycle(8'hA5, 1'b1);
    run_cycle(8'($urandom_range(1, 255)), 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
