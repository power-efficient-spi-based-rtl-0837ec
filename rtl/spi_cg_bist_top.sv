// spi_cg_bist_top: SPI-based built-in self-test with a clock-gated pattern
// generator.
//
// An SPI master and one SPI slave share the system clock. The master holds
// the clock-gated LFSR test pattern generator, the output response analyzer
// (MISR, expected-result comparison, golden-signature ROM) and the test
// controller; the slave holds the circuit under test, a 4-bit adder, behind
// an input multiplexer. A pulse on test runs a complete self-test: the 255
// LFSR patterns travel to the slave over MOSI, the adder's answers return over
// MISO, and test_done / test_pass give the verdict. The SPI pins are brought
// out so the link can be observed.
//
// Ports: clk, rst (synchronous, active high); test (start pulse); seed (LFSR
// seed, 0 acts as 1); cg_enable (clock gating of the generator on/off);
// mode_select (1: the CUT takes the SPI patterns; 0: it takes func_in and
// drives po); fault_inject (faulty state of the CUT); results test_done,
// test_pass, signature, err_count, busy; SPI pins cs, sclk, mosi, miso
// (cs active low); tpg_clk_active (generator stages clocked at the next
// edge, for activity measurement); frames (SPI frames of the current test).
// Timing at the defaults: about 10,000 clk cycles per self-test (256 SPI
// frames of 39 cycles).
// The partition into master (generator, analyzer) and slave (controller, CUT)
// and the port names clk, rst, mode_select, cs, sclk, mosi, test_pass follow
// the document; the remaining ports are this design's choices.
module spi_cg_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned CLK_DIV = 2,
  parameter int unsigned GAP     = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       test,
  input  pattern_t   seed,
  input  logic       cg_enable,
  input  logic       mode_select,
  input  logic       fault_inject,
  input  pattern_t   func_in,
  output resp_t      po,
  output logic       busy,
  output logic       test_done,
  output logic       test_pass,
  output resp_t      signature,
  output logic [7:0] err_count,
  output logic       cs,
  output logic       sclk,
  output logic       mosi,
  output logic       miso,
  output logic [TPG_W-1:0] tpg_clk_active,
  output logic [TPG_W:0]   frames
);
  spi_master #(.CLK_DIV(CLK_DIV), .GAP(GAP)) u_master (
    .clk      (clk),
    .rst      (rst),
    .test     (test),
    .seed     (seed),
    .cg_enable(cg_enable),
    .cs_n     (cs),
    .sclk     (sclk),
    .mosi     (mosi),
    .miso     (miso),
    .busy     (busy),
    .test_done(test_done),
    .test_pass(test_pass),
    .signature(signature),
    .err_count(err_count),
    .tpg_clk_active(tpg_clk_active),
    .frames   (frames)
  );

  spi_slave u_slave (
    .clk         (clk),
    .rst         (rst),
    .cs_n        (cs),
    .sclk        (sclk),
    .mosi        (mosi),
    .miso        (miso),
    .mode_select (mode_select),
    .func_in     (func_in),
    .fault_inject(fault_inject),
    .po          (po)
  );
endmodule
