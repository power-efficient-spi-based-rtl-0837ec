// tb_spi_slave: self-checking test of the BIST slave (SPI engine, controller,
// input multiplexer, 4-bit adder) driven by a mode-0 SPI master model in the
// testbench. In test mode every frame must return the sum of the two nibbles
// of the word sent in the previous frame, in both the correct and the faulty
// state of the adder; in normal mode po and the returned word must follow
// the functional inputs.
`timescale 1ns/1ps
module tb_spi_slave;
  logic clk = 1'b0, rst = 1'b1, cs_n = 1'b1, sclk = 1'b0, mosi = 1'b0, miso;
  logic mode_select = 1'b1, fault_inject = 1'b0;
  logic [7:0] func_in = '0;
  logic [4:0] po;
  int checks = 0, failures = 0;

  spi_slave dut (.*);

  always #5 clk = ~clk;

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

  task automatic frame(input logic [7:0] m_word, output logic [7:0] got);
    got = '0;
    @(negedge clk);
    cs_n = 1'b0;
    mosi = m_word[7];
    for (int i = 0; i < 8; i++) begin
      repeat (2) @(negedge clk);
      sclk = 1'b1;
      got = {got[6:0], miso};
      repeat (2) @(negedge clk);
      sclk = 1'b0;
      if (i < 7) mosi = m_word[6 - i];
    end
    repeat (2) @(negedge clk);
    cs_n = 1'b1;
    repeat (4) @(negedge clk);
  endtask

  function automatic logic [7:0] sum_of(logic [7:0] w, bit f);
    logic [4:0] r;
    r = 5'(w[3:0]) + 5'(w[7:4]);
    if (f) r[0] = 1'b0;
    return {3'b000, r};
  endfunction

  initial begin
    logic [7:0] prev, w, got;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int f = 0; f < 2; f++) begin
      fault_inject = 1'(f);
      mode_select = 1'b1;
      frame(8'h00, got);
      prev = 8'h00;
      for (int k = 0; k < 60; k++) begin
        w = 8'($urandom);
        if (k == 0) w = 8'hFF;
        frame(w, got);
        chk(got == sum_of(prev, f), "answer to previous frame");
        chk(po == sum_of(w, f)[4:0], "po in test mode");
        prev = w;
      end
    end
    fault_inject = 1'b0;
    mode_select = 1'b0;
    for (int k = 0; k < 20; k++) begin
      func_in = 8'($urandom);
      repeat (2) @(negedge clk);
      chk(po == sum_of(func_in, 0)[4:0], "po follows functional inputs");
      frame(8'h77, got);
      chk(got == sum_of(func_in, 0), "normal mode answer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
