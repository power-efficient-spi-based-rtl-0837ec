// cut_adder: the circuit under test, a W-bit ripple-carry adder (W = 4).
//
// Adds two W-bit operands and produces a W-bit sum and a carry-out. The carry
// chain is written out bit by bit, as the gates of a ripple adder. The block
// has two operational states: the correct one, and a faulty one used to show
// that the BIST catches a defect. With fault_en high, sum bit FAULT_BIT is
// stuck at FAULT_VAL (stuck-at-0 on sum[0] by default).
//
// Purely combinational. The 4-bit width and the two states follow the
// document; the ripple structure and the kind and place of the injected fault
// are this design's choices.
module cut_adder #(
  parameter int unsigned W         = 4,
  parameter int unsigned FAULT_BIT = 0,
  parameter bit          FAULT_VAL = 1'b0
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         fault_en,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0]   c;
  logic [W-1:0] s;

  assign c[0] = 1'b0;
  for (genvar i = 0; i < W; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  always_comb begin
    sum = s;
    if (fault_en) sum[FAULT_BIT] = FAULT_VAL;
  end
  assign cout = c[W];
endmodule
