// spi_master: the master side of the SPI-based clock-gated BIST.
//
// Holds the clock-gated LFSR pattern generator, the output response analyzer
// with its golden-signature ROM, the test controller and the SPI shift engine.
// A test pulse starts a self-test of the circuit under test that sits in the
// slave: every LFSR pattern is shifted out on MOSI, the slave's answer comes
// back on MISO one frame later and is checked and compacted by the analyzer,
// and at the end test_done rises with test_pass telling good from faulty.
//
// Interface: clk, rst (synchronous, active high); test (start pulse), seed,
// cg_enable (1: per-stage clock gating of the generator on, 0: every stage
// clocked on each shift, as an ungated LFSR); SPI pins cs_n, sclk, mosi, miso;
// results test_done (held until the next test), test_pass, signature,
// err_count; busy while a test runs; tpg_clk_active shows which generator
// stages receive a clock edge at the next rising clk edge; frames counts the
// SPI frames of the current test.
// Timing: one test is 2^8 SPI frames of (2*8+1)*CLK_DIV + GAP + 1 cycles each
// plus a few cycles; 256 * 39 + ~6 cycles at the defaults.
// Placing generator and analyzer in the master follows the document's block
// diagram; placing the test controller there too, the seed and cg_enable
// inputs and the error count are this design's choices.
module spi_master
  import bist_pkg::*;
#(
  parameter int unsigned CLK_DIV = 2,
  parameter int unsigned GAP     = 4
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     test,
  input  pattern_t seed,
  input  logic     cg_enable,
  output logic     cs_n,
  output logic     sclk,
  output logic     mosi,
  input  logic     miso,
  output logic     busy,
  output logic     test_done,
  output logic     test_pass,
  output resp_t    signature,
  output logic [7:0] err_count,
  output logic [TPG_W-1:0] tpg_clk_active,
  output logic [TPG_W:0]   frames
);
  pattern_t tpg_pattern, seed_q, spi_rx, ora_pattern;
  logic     tpg_load, tpg_shift, tpg_cycle_done;
  logic     spi_start, spi_ready, spi_done;
  logic     ora_clear, ora_capture, ora_check;
  resp_t    golden;

  cg_tpg u_tpg (
    .clk       (clk),
    .rst       (rst),
    .load      (tpg_load),
    .seed      (seed),
    .shift     (tpg_shift),
    .gate_en   (cg_enable),
    .pattern   (tpg_pattern),
    .serial_out(),
    .cycle_done(tpg_cycle_done),
    .clk_active(tpg_clk_active)
  );

  bist_controller u_ctrl (
    .clk           (clk),
    .rst           (rst),
    .test          (test),
    .seed          (seed),
    .seed_q        (seed_q),
    .tpg_load      (tpg_load),
    .tpg_shift     (tpg_shift),
    .tpg_cycle_done(tpg_cycle_done),
    .tpg_pattern   (tpg_pattern),
    .spi_start     (spi_start),
    .spi_ready     (spi_ready),
    .spi_done      (spi_done),
    .ora_clear     (ora_clear),
    .ora_capture   (ora_capture),
    .ora_pattern   (ora_pattern),
    .ora_check     (ora_check),
    .busy          (busy),
    .frames        (frames)
  );

  spi_master_phy #(.W(TPG_W), .CLK_DIV(CLK_DIV), .GAP(GAP)) u_phy (
    .clk    (clk),
    .rst    (rst),
    .start  (spi_start),
    .tx_data(tpg_pattern),
    .ready  (spi_ready),
    .done   (spi_done),
    .rx_data(spi_rx),
    .cs_n   (cs_n),
    .sclk   (sclk),
    .mosi   (mosi),
    .miso   (miso)
  );

  golden_rom u_rom (
    .clk (clk),
    .addr(seed_q),
    .data(golden)
  );

  ora u_ora (
    .clk      (clk),
    .rst      (rst),
    .clear    (ora_clear),
    .capture  (ora_capture),
    .pattern  (ora_pattern),
    .resp     (spi_rx),
    .check    (ora_check),
    .golden   (golden),
    .signature(signature),
    .err_flag (),
    .err_count(err_count),
    .done     (test_done),
    .pass     (test_pass)
  );
endmodule
