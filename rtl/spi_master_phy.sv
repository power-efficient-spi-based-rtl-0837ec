// spi_master_phy: SPI master shift engine, one W-bit full-duplex transfer per
// start pulse.
//
// SPI mode 0 (clock idle low, data sampled on the rising SCLK edge and changed
// on the falling edge), most significant bit first, one slave with an
// active-low chip select. SCLK runs at clk / (2*CLK_DIV). A transfer:
// cs_n falls and the first MOSI bit is driven; after CLK_DIV cycles SCLK
// rises and MISO is sampled; after CLK_DIV more SCLK falls and the next MOSI
// bit is driven; after W bits cs_n stays low for CLK_DIV cycles, then rises,
// done pulses for one cycle with rx_data valid, and cs_n stays high for at
// least GAP cycles before the next transfer can begin.
//
// Timing: a transfer occupies (2*W + 1)*CLK_DIV + GAP + 1 cycles from start
// to the first cycle in which ready is high again; done pulses GAP cycles
// before that. CLK_DIV must be at least 2 so that a slave that updates MISO
// one cycle after the falling edge meets the sampling point.
// The signal set (CS, SCLK, MOSI, MISO) and the 8-bit frame follow the
// document; the mode, bit order, divider and gap are this design's choices.
module spi_master_phy #(
  parameter int unsigned W       = 8,
  parameter int unsigned CLK_DIV = 2,
  parameter int unsigned GAP     = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] tx_data,
  output logic         ready,
  output logic         done,
  output logic [W-1:0] rx_data,
  output logic         cs_n,
  output logic         sclk,
  output logic         mosi,
  input  logic         miso
);
  typedef enum logic [1:0] {S_IDLE, S_XFER, S_HOLD, S_GAP} state_t;

  localparam int unsigned CW = $clog2(CLK_DIV + GAP + 1);

  state_t               state;
  logic [CW-1:0]        cnt;
  logic [$clog2(W)-1:0] bit_idx;
  logic [W-1:0]         tx_sh, rx_sh;

  assign ready = (state == S_IDLE);
  assign mosi  = tx_sh[W-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      cnt     <= '0;
      bit_idx <= '0;
      tx_sh   <= '0;
      rx_sh   <= '0;
      rx_data <= '0;
      cs_n    <= 1'b1;
      sclk    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            tx_sh   <= tx_data;
            cs_n    <= 1'b0;
            cnt     <= '0;
            bit_idx <= '0;
            state   <= S_XFER;
          end
        end
        S_XFER: begin
          if (cnt == CW'(CLK_DIV - 1)) begin
            cnt <= '0;
            if (!sclk) begin
              sclk  <= 1'b1;
              rx_sh <= {rx_sh[W-2:0], miso};
            end else begin
              sclk <= 1'b0;
              if (bit_idx == $clog2(W)'(W - 1)) begin
                state <= S_HOLD;
              end else begin
                bit_idx <= bit_idx + 1'b1;
                tx_sh   <= {tx_sh[W-2:0], 1'b0};
              end
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_HOLD: begin
          if (cnt == CW'(CLK_DIV - 1)) begin
            cnt     <= '0;
            cs_n    <= 1'b1;
            done    <= 1'b1;
            rx_data <= rx_sh;
            state   <= S_GAP;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_GAP: begin
          if (cnt == CW'(GAP - 1)) begin
            cnt   <= '0;
            state <= S_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert (CLK_DIV >= 2 && GAP >= 2)
    else $error("spi_master_phy: CLK_DIV and GAP must be at least 2");
  // The chip select is high whenever the engine is idle.
  a_cs_idle: assert property (@(posedge clk) disable iff (rst) (state == S_IDLE) |-> cs_n);
  // SCLK only toggles while the slave is selected.
  a_sclk_cs: assert property (@(posedge clk) disable iff (rst) sclk |-> !cs_n);
endmodule
