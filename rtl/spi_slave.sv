// spi_slave: the slave side of the SPI-based BIST, holding the circuit under
// test (a 4-bit adder) and its controller.
//
// Every SPI frame from the master carries one 8-bit word. The slave
// controller keeps the last received word; in test mode (mode_select = 1) the
// input multiplexer applies it to the adder as two 4-bit operands (low nibble
// a, high nibble b), in normal mode the functional inputs func_in are applied
// instead. The adder's 5-bit result ({carry, sum}, zero-extended to 8 bits) is
// what the slave shifts back on MISO in the next frame, and is also brought
// out as the primary output po. fault_inject puts the adder in its faulty
// state.
//
// Interface: clk, rst (synchronous, active high); SPI pins cs_n, sclk, mosi,
// miso; mode_select; func_in; fault_inject; po.
// Timing: the answer to a frame is ready two clk cycles after cs_n rises at the end of that frame
// and is sent in the next frame.
// The slave contents (controller and CUT) and mode_select follow the
// document's block diagrams; the operand split, the answer framing and the
// functional inputs are this design's choices.
module spi_slave
  import bist_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       cs_n,
  input  logic       sclk,
  input  logic       mosi,
  output logic       miso,
  input  logic       mode_select,
  input  pattern_t   func_in,
  input  logic       fault_inject,
  output resp_t      po
);
  pattern_t rx_word, cut_in, tx_word;
  logic     rx_valid;
  logic [OPND_W-1:0] sum;
  logic     cout;

  spi_slave_phy #(.W(TPG_W)) u_phy (
    .clk     (clk),
    .rst     (rst),
    .cs_n    (cs_n),
    .sclk    (sclk),
    .mosi    (mosi),
    .miso    (miso),
    .tx_data (tx_word),
    .rx_valid(rx_valid),
    .rx_data (rx_word)
  );

  test_mux #(.W(TPG_W)) u_mux (
    .test_mode(mode_select),
    .test_in  (rx_word),
    .func_in  (func_in),
    .cut_in   (cut_in)
  );

  cut_adder #(.W(OPND_W)) u_cut (
    .a       (cut_in[OPND_W-1:0]),
    .b       (cut_in[TPG_W-1:OPND_W]),
    .fault_en(fault_inject),
    .sum     (sum),
    .cout    (cout)
  );

  // Slave controller: one cycle after a frame has been received (the CUT has
  // then settled on the new word) it registers the CUT answer to be shifted
  // out in the next frame. In normal mode the answer follows func_in.
  logic ans_load;

  always_ff @(posedge clk) begin
    if (rst) begin
      ans_load <= 1'b0;
      tx_word  <= '0;
    end else begin
      ans_load <= rx_valid;
      if (ans_load || !mode_select) tx_word <= pattern_t'({cout, sum});
    end
  end

  assign po = {cout, sum};
endmodule
