// spi_slave_phy: SPI slave shift engine, W-bit frames, mode 0, MSB first.
//
// The slave runs on the system clock and samples SCLK and CS as ordinary
// synchronous inputs (master and slave share clk in this design; SCLK is at
// most clk/4). While cs_n is high the transmit shift register is reloaded
// from tx_data every cycle, so MISO already shows the first bit when the
// master selects the slave. A rising SCLK edge shifts MOSI into the receive
// register, a falling edge shifts the next transmit bit onto MISO. When cs_n
// rises after exactly W bits, rx_valid pulses for one cycle and rx_data holds
// the received frame until the next one.
//
// Timing: edges are seen one clk after the master makes them; rx_valid comes
// one clk after cs_n rises. tx_data must be stable from then until cs_n falls.
// The signals follow the document; sampling on the system clock, the mode and
// the frame check are this design's choices.
module spi_slave_phy #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         cs_n,
  input  logic         sclk,
  input  logic         mosi,
  output logic         miso,
  input  logic [W-1:0] tx_data,
  output logic         rx_valid,
  output logic [W-1:0] rx_data
);
  logic                 sclk_q, cs_q;
  logic [W-1:0]         tx_sh, rx_sh;
  logic [$clog2(W+1)-1:0] nbits;

  assign miso = tx_sh[W-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sclk_q   <= 1'b0;
      cs_q     <= 1'b1;
      tx_sh    <= '0;
      rx_sh    <= '0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
      nbits    <= '0;
    end else begin
      sclk_q   <= sclk;
      cs_q     <= cs_n;
      rx_valid <= 1'b0;
      if (cs_n) begin
        tx_sh <= tx_data;
        nbits <= '0;
        if (!cs_q && nbits == ($clog2(W+1))'(W)) begin
          rx_valid <= 1'b1;
          rx_data  <= rx_sh;
        end
      end else begin
        if (sclk && !sclk_q) begin
          rx_sh <= {rx_sh[W-2:0], mosi};
          nbits <= nbits + 1'b1;
        end
        if (!sclk && sclk_q) tx_sh <= {tx_sh[W-2:0], 1'b0};
      end
    end
  end
endmodule
