// tb_spi_slave_phy: self-checking test of the SPI slave shift engine, driven
// by a mode-0 master model in the testbench (SCLK = clk/4). Random words are
// exchanged; checked are both received words, the single rx_valid pulse per
// frame, and that a frame cut short (fewer than 8 SCLK pulses) is discarded.
`timescale 1ns/1ps
module tb_spi_slave_phy;
  logic clk = 1'b0, rst = 1'b1, cs_n = 1'b1, sclk = 1'b0, mosi = 1'b0, miso;
  logic [7:0] tx_data = '0, rx_data;
  logic rx_valid;
  int checks = 0, failures = 0, valids = 0;

  spi_slave_phy #(.W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rx_valid) valids++;

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

  task automatic frame(input logic [7:0] m_word, input int nbits, output logic [7:0] got);
    got = '0;
    @(negedge clk);
    cs_n = 1'b0;
    mosi = m_word[7];
    for (int i = 0; i < nbits; i++) begin
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

  initial begin
    logic [7:0] got;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 40; k++) begin
      logic [7:0] m_word, s_word;
      int v0;
      m_word = 8'($urandom); s_word = 8'($urandom);
      tx_data = s_word;
      v0 = valids;
      frame(m_word, 8, got);
      chk(got == s_word, "master model received slave word");
      chk(rx_data == m_word, "slave received master word");
      chk(valids - v0 == 1, "one rx_valid per frame");
    end
    begin
      int v0;
      logic [7:0] keep;
      keep = rx_data;
      v0 = valids;
      frame(8'h5A, 5, got);
      chk(valids == v0 && rx_data == keep, "short frame discarded");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
