// test_mux: input multiplexer in front of the circuit under test.
//
// In test mode (test_mode = 1) the CUT receives the test pattern; in normal
// mode it receives the functional inputs. Combinational. The multiplexer is
// part of the document's BIST architecture; its select encoding is this
// design's choice.
module test_mux #(
  parameter int unsigned W = 8
) (
  input  logic         test_mode,
  input  logic [W-1:0] test_in,
  input  logic [W-1:0] func_in,
  output logic [W-1:0] cut_in
);
  always_comb cut_in = test_mode ? test_in : func_in;
endmodule
