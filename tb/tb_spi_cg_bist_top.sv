// tb_spi_cg_bist_top: end-to-end test of the SPI-based clock-gated BIST at
// its default parameters. Runs complete self-tests of the adder in the slave
// over the SPI link:
//   1. seed 1, gating on, correct adder        -> pass
//   2. seed 1, gating off, correct adder       -> pass, same signature
//   3. seed 1, gating on, adder faulty         -> fail, 128 mismatches
//   4. random seed, gating on, correct adder   -> pass
// then switches to normal mode and checks the adder's primary output against
// the functional inputs. The signature is predicted here from the seed, and
// SPI frames (cs rising edges) are counted on the pins. Each mechanism of the
// design is counted and must occur: clock gating of generator stages,
// ungated operation, completion of the full 255-pattern cycle, fault
// detection, pass verdict, mode switch to normal operation.
`timescale 1ns/1ps
module tb_spi_cg_bist_top;
  logic clk = 1'b0, rst = 1'b1, test = 1'b0, cg_enable = 1'b1;
  logic mode_select = 1'b1, fault_inject = 1'b0;
  logic [7:0] seed = 8'h01, func_in = '0, err_count, tpg_clk_active;
  logic [8:0] frames;
  logic [4:0] po, signature;
  logic busy, test_done, test_pass, cs, sclk, mosi, miso;
  int checks = 0, failures = 0;

  spi_cg_bist_top dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int n_gated_shift = 0, n_ungated_shift = 0, n_cycles_done = 0;
  int n_fault_detected = 0, n_pass = 0, n_mode_switch = 0;
  int stage_clks = 0, cs_frames = 0;

  always @(posedge clk) if (!rst) begin
    stage_clks += $countones(tpg_clk_active);
    if (tpg_clk_active != '0 && tpg_clk_active != '1) n_gated_shift++;
    if (tpg_clk_active == '1 && !cg_enable) n_ungated_shift++;
  end
  always @(posedge cs) if (!rst) cs_frames++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [4:0] add_nib(logic [7:0] w);
    return 5'(w[3:0]) + 5'(w[7:4]);
  endfunction

  function automatic logic [4:0] exp_sig(logic [7:0] s);
    logic [7:0] p;
    logic [4:0] m;
    p = (s == 0) ? 8'd1 : s;
    m = '0;
    for (int k = 0; k < 255; k++) begin
      m = {m[3], m[2], m[1] ^ m[4], m[0], m[4]} ^ add_nib(p);
      p = {p[6:0], p[7] ^ p[5] ^ p[4] ^ p[3]};
    end
    return m;
  endfunction

  task automatic self_test(input logic [7:0] s, input bit gate, input bit fault,
                           output int stage, output int cycles);
    int f0, t0;
    seed = s; cg_enable = gate; fault_inject = fault; mode_select = 1'b1;
    f0 = cs_frames;
    stage_clks = 0;
    @(negedge clk);
    test = 1'b1;
    t0 = int'($time / 10);
    @(negedge clk);
    test = 1'b0;
    while (!test_done) @(negedge clk);
    cycles = int'($time / 10) - t0;
    stage = stage_clks;
    chk(cs_frames - f0 == 256, "256 SPI frames on the pins");
    if (frames == 9'd256) n_cycles_done++;
    if (test_pass) n_pass++;
    if (!test_pass && fault) n_fault_detected++;
    @(negedge clk);
    chk(!busy, "idle after verdict");
  endtask

  initial begin
    int st_g, st_u, cyc;
    logic [7:0] rs;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);

    self_test(8'h01, 1, 0, st_g, cyc);
    chk(test_pass && err_count == 0, "run 1 passes");
    chk(signature == exp_sig(8'h01), "run 1 signature");
    $display("run 1: %0d cycles, signature %h, generator stage clocks %0d", cyc, signature, st_g);

    self_test(8'h01, 0, 0, st_u, cyc);
    chk(test_pass && signature == exp_sig(8'h01), "run 2 passes, same signature");
    chk(st_g < st_u, "gating saves generator stage clocks");
    $display("run 2: ungated generator stage clocks %0d", st_u);

    self_test(8'h01, 1, 1, st_g, cyc);
    chk(!test_pass, "run 3 detects the fault");
    chk(err_count == 8'd128, "run 3 mismatch count");
    chk(signature != exp_sig(8'h01), "run 3 signature differs from golden");
    $display("run 3: faulty adder, %0d mismatches, signature %h", err_count, signature);

    rs = 8'($urandom_range(2, 255));
    self_test(rs, 1, 0, st_g, cyc);
    chk(test_pass && signature == exp_sig(rs), "run 4 passes");
    $display("run 4: seed %h signature %h", rs, signature);

    // normal mode
    mode_select = 1'b0;
    n_mode_switch++;
    for (int k = 0; k < 30; k++) begin
      func_in = 8'($urandom);
      @(negedge clk);
      chk(po == add_nib(func_in), "normal-mode adder output");
    end

    checks++; if (n_gated_shift == 0)    begin failures++; $display("FAIL no gated shift"); end
    checks++; if (n_ungated_shift == 0)  begin failures++; $display("FAIL no ungated shift"); end
    checks++; if (n_cycles_done != 4)    begin failures++; $display("FAIL pattern cycles %0d", n_cycles_done); end
    checks++; if (n_fault_detected == 0) begin failures++; $display("FAIL fault never detected"); end
    checks++; if (n_pass != 3)           begin failures++; $display("FAIL pass verdicts %0d", n_pass); end
    checks++; if (n_mode_switch == 0)    begin failures++; $display("FAIL no mode switch"); end
    $display("mechanisms: gated shifts %0d, ungated shifts %0d, full cycles %0d, faults detected %0d, passes %0d, mode switches %0d",
             n_gated_shift, n_ungated_shift, n_cycles_done, n_fault_detected, n_pass, n_mode_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
