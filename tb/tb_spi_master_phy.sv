// tb_spi_master_phy: self-checking test of the SPI master shift engine
// against a mode-0 slave model written in the testbench. Random words are
// exchanged in both directions; checked are the received words on both
// sides, MSB-first order, SCLK idle low and only toggling under chip select,
// eight SCLK pulses per frame, the SCLK period (2*CLK_DIV cycles) and the
// transfer length (start to ready again = (2*8+1)*CLK_DIV + GAP + 1 cycles).
`timescale 1ns/1ps
module tb_spi_master_phy;
  localparam int CLK_DIV = 2, GAP = 4;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [7:0] tx_data = '0, rx_data;
  logic ready, done, cs_n, sclk, mosi, miso;
  int checks = 0, failures = 0;

  spi_master_phy #(.W(8), .CLK_DIV(CLK_DIV), .GAP(GAP)) dut (.*);

  always #5 clk = ~clk;

  // Slave model: shifts in on SCLK rise, shifts out on SCLK fall.
  logic [7:0] s_tx, s_rx, s_tx_word;
  int sclk_pulses;
  assign miso = s_tx[7];
  always @(negedge cs_n) begin s_tx = s_tx_word; sclk_pulses = 0; end
  always @(posedge sclk) begin s_rx = {s_rx[6:0], mosi}; sclk_pulses++; end
  always @(negedge sclk) s_tx = {s_tx[6:0], 1'b0};

  // SCLK period measurement
  int last_rise = -1, cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge sclk) begin
    if (last_rise >= 0 && !cs_n && sclk_pulses > 1) begin
      checks++;
      if (cyc - last_rise != 2 * CLK_DIV) begin
        failures++;
        $display("FAIL sclk period %0d", cyc - last_rise);
      end
    end
    last_rise = cyc;
  end

  always @(posedge clk) if (!rst && sclk && cs_n) begin
    failures++;
    $display("FAIL sclk high without chip select");
  end

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

  initial begin
    s_tx = '0; s_rx = '0; s_tx_word = '0; sclk_pulses = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    chk(cs_n && !sclk && ready, "idle state");
    for (int k = 0; k < 50; k++) begin
      int t0, len;
      logic [7:0] m_word, sl_word;
      m_word = 8'($urandom); sl_word = 8'($urandom);
      if (k == 0) begin m_word = 8'h80; sl_word = 8'h01; end
      s_tx_word = sl_word;
      tx_data = m_word;
      start = 1'b1;
      t0 = cyc;
      @(negedge clk);
      start = 1'b0;
      tx_data = 8'($urandom);       // must have been latched at start
      while (!done) @(negedge clk);
      chk(rx_data == sl_word, "master received slave word");
      chk(s_rx == m_word, "slave received master word");
      chk(sclk_pulses == 8, "eight SCLK pulses");
      chk(cs_n, "chip select released at done");
      while (!ready) @(negedge clk);
      len = cyc - t0;
      chk(len == (2 * 8 + 1) * CLK_DIV + GAP + 1, "transfer length");
      if (k == 0) $display("transfer length %0d cycles", len);
      repeat (k % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
