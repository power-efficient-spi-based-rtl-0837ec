// misr: multiple-input signature register.
//
// A W-stage shift register (W = 5, one stage per response bit: sum[3:0] and
// carry-out). On every enabled clock each stage takes the previous stage's
// value XORed with its own response bit; stage 0 takes the last stage's value
// XORed with response bit 0. Every stage selected by FB takes the last
// stage's value (stage 0 instead of its missing predecessor, the others in
// addition to it). The default FB, stages 0 and 2, makes the feedback the
// primitive polynomial x^5+x^2+1; FB = 5'b00001 gives a plain ring, which
// aliases far more often (a stuck-at-0 on sum bit 0 of the adder leaves the
// ring's 255-pattern signature unchanged). After a test the register holds a
// signature of the whole response stream.
//
// Interface: clear zeroes the register, en compacts resp into it; both act at
// the rising edge of clk, clear first. rst is synchronous, active high.
// The shift-and-XOR structure with feedback from the last stage to the first
// follows the document; the width (5 instead of 4, so that the carry-out is
// compacted too) and the extra feedback tap are this design's choices.
module misr
  import bist_pkg::*;
#(
  parameter int unsigned W  = RESP_W,
  parameter logic [W-1:0] FB = W'(MISR_FB)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         clear,
  input  logic         en,
  input  logic [W-1:0] resp,
  output logic [W-1:0] signature
);
  logic [W-1:0] m;

  always_ff @(posedge clk) begin
    if (rst || clear) m <= '0;
    else if (en)      m <= {m[W-2:0], 1'b0} ^ (m[W-1] ? FB : '0) ^ resp;
  end

  assign signature = m;
endmodule
