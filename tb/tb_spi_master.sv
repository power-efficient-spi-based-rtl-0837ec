// tb_spi_master: self-checking test of the BIST master (pattern generator,
// controller, SPI engine, analyzer, ROM) against a behavioural SPI slave that
// adds the two nibbles of each received word and returns the result in the
// next frame. Runs: good slave with gating on and off (pass, same signature,
// far fewer generator stage clocks with gating), faulty slave (bit 0 of the
// sum stuck at 0: fail, and the error count equals the number of affected
// patterns). The expected signature is computed here from the seed. The test
// length is checked against 256 frames of 39 cycles.
`timescale 1ns/1ps
module tb_spi_master;
  logic clk = 1'b0, rst = 1'b1, test = 1'b0, cg_enable = 1'b1;
  logic [7:0] seed = 8'h01, err_count, tpg_clk_active;
  logic [8:0] frames;
  logic cs_n, sclk, mosi, miso, busy, test_done, test_pass;
  logic [4:0] signature;
  int checks = 0, failures = 0;

  spi_master dut (.*);

  always #5 clk = ~clk;

  // Behavioural slave
  bit slave_fault = 0;
  logic [7:0] s_rx = '0, s_last = '0, s_tx = '0;
  assign miso = s_tx[7];
  function automatic logic [7:0] answer(logic [7:0] w, bit f);
    logic [4:0] r;
    r = 5'(w[3:0]) + 5'(w[7:4]);
    if (f) r[0] = 1'b0;
    return {3'b000, r};
  endfunction
  always @(negedge cs_n) s_tx = answer(s_last, slave_fault);
  always @(posedge cs_n) s_last = s_rx;
  always @(posedge sclk) s_rx = {s_rx[6:0], mosi};
  always @(negedge sclk) s_tx = {s_tx[6:0], 1'b0};

  int stage_clks;
  always @(posedge clk) if (!rst) stage_clks += $countones(tpg_clk_active);

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

  function automatic logic [4:0] exp_sig(logic [7:0] s);
    logic [7:0] p;
    logic [4:0] m;
    p = (s == 0) ? 8'd1 : s;
    m = '0;
    for (int k = 0; k < 255; k++) begin
      m = {m[3], m[2], m[1] ^ m[4], m[0], m[4]} ^ answer(p, 0)[4:0];
      p = {p[6:0], p[7] ^ p[5] ^ p[4] ^ p[3]};
    end
    return m;
  endfunction

  task automatic run(input logic [7:0] s, input bit gate, input bit fault,
                     output int clks, output int stage);
    int t0;
    seed = s; cg_enable = gate; slave_fault = fault;
    s_last = '0;
    @(negedge clk);
    test = 1'b1;
    t0 = int'($time / 10);
    stage_clks = 0;
    @(negedge clk);
    test = 1'b0;
    chk(busy && !test_done, "test started");
    while (!test_done) @(negedge clk);
    clks = int'($time / 10) - t0;
    stage = stage_clks;
    @(negedge clk);
    chk(!busy, "idle after verdict");
    chk(frames == 9'd256, "256 frames");
  endtask

  initial begin
    int c_gate, c_nogate, c_fault, st_gate, st_nogate, st_fault;
    logic [4:0] sig_gate;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);

    run(8'h01, 1, 0, c_gate, st_gate);
    chk(test_pass, "good slave passes (gated)");
    chk(err_count == 0, "no errors (gated)");
    chk(signature == exp_sig(8'h01), "signature (gated)");
    sig_gate = signature;
    chk(c_gate >= 256 * 39 - 8 && c_gate <= 256 * 39 + 8, "test length");

    run(8'h01, 0, 0, c_nogate, st_nogate);
    chk(test_pass && signature == sig_gate, "ungated run gives the same result");
    chk(st_gate < st_nogate, "gating reduces generator stage clocks");

    run(8'h01, 1, 1, c_fault, st_fault);
    chk(!test_pass, "faulty slave fails");
    begin
      int affected = 0;
      for (int p = 1; p < 256; p++) affected += answer(8'(p), 0)[0];
      chk(err_count == 8'(affected), "error count = patterns with odd sum");
      $display("faulty run: err_count %0d (expected %0d)", err_count, affected);
    end

    run(8'h6B, 1, 0, c_gate, st_gate);
    chk(test_pass && signature == exp_sig(8'h6B), "second seed passes");

    $display("test length %0d cycles; generator stage clocks gated %0d / ungated %0d",
             c_gate, st_gate, st_nogate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
