// golden_rom: read-only memory of golden signatures, one per seed.
//
// Entry s holds the MISR signature a fault-free circuit under test leaves
// after the full 255-pattern LFSR cycle started from seed s (seed 0 behaves
// as seed 1). The contents are computed at elaboration time by
// bist_pkg::golden_signature, which models the pattern generator, the adder
// and the MISR bit for bit.
//
// Interface: addr is the seed; data appears one clock after addr (registered
// read, as a synchronous ROM macro would give). The document stores the
// golden signature in a ROM; indexing it by seed and computing its contents
// are this design's choices.
module golden_rom
  import bist_pkg::*;
#(
  parameter int unsigned AW = TPG_W,
  parameter int unsigned DW = RESP_W
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);
  logic [DW-1:0] mem [2**AW];

  for (genvar s = 0; s < 2**AW; s++) begin : g_init
    localparam logic [DW-1:0] SIG = DW'(golden_signature(pattern_t'(s)));
    assign mem[s] = SIG;
  end

  always_ff @(posedge clk) data <= mem[addr];
endmodule
