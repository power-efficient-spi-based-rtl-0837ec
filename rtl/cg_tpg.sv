// cg_tpg: clock-gated LFSR test pattern generator.
//
// An N-stage Fibonacci LFSR (8 stages, 255 patterns per cycle) whose every
// stage has its own gated clock. Before each shift the input of a stage (the
// seed bit while loading, otherwise the previous stage or the feedback) is
// compared with its output; when they are equal the stage's clock is gated
// off, since clocking it would not change it. Only stages that actually change
// receive a clock edge, which is where the power saving comes from. The
// sequence is identical to that of an ungated LFSR.
//
// Interface:
//   load     - load seed (an all-zero seed is replaced by 1)
//   shift    - advance one pattern this cycle
//   gate_en  - 1: gate stages whose value would not change;
//              0: clock every stage whenever load/shift (ungated behaviour)
//   pattern  - current LFSR state, the test pattern
//   serial_out - feedback bit (next bit shifted in)
//   cycle_done - one-cycle pulse, registered, when a shift brings the LFSR back
//              to the loaded seed: one full cycle of 2^N-1 patterns is complete
//   clk_active - per-stage enable presented to the gates this cycle (which
//              stages will be clocked at the next edge)
// Timing: load and shift act at the next rising edge of clk; rst is
// synchronous and active high.
//
// Follows the document: seed load through a per-stage multiplexer, XOR
// feedback, per-stage gating on "input equals output", an end-of-cycle flag.
// This design's choices: the feedback polynomial (bist_pkg::LFSR_TAPS), the
// gate_en input and the synchronous reset.
module cg_tpg
  import bist_pkg::*;
#(
  parameter int unsigned N = TPG_W,
  parameter logic [N-1:0] TAPS = N'(LFSR_TAPS)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [N-1:0] seed,
  input  logic         shift,
  input  logic         gate_en,
  output logic [N-1:0] pattern,
  output logic         serial_out,
  output logic         cycle_done,
  output logic [N-1:0] clk_active
);
  logic [N-1:0] q, d, gclk;
  logic [N-1:0] seed_q;
  logic [N-1:0] seed_ok;
  logic         fb;

  assign seed_ok = (seed == '0) ? N'(1) : seed;
  assign fb      = ^(q & TAPS);

  // Per-stage input multiplexer: seed bit when loading, shift data otherwise.
  always_comb begin
    if (rst)       d = '0;
    else if (load) d = seed_ok;
    else           d = {q[N-2:0], fb};
  end

  // Per-stage clock enable: clock only the stages whose input differs from
  // their output, and only when the generator is asked to act.
  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (rst || load || shift)
        clk_active[i] = gate_en ? (d[i] != q[i]) : 1'b1;
      else
        clk_active[i] = 1'b0;
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_stage
    clock_gate u_cg (.clk(clk), .en(clk_active[i]), .gclk(gclk[i]));
    logic q_r;
    always_ff @(posedge gclk[i]) q_r <= d[i];
    assign q[i] = q_r;
  end

  // Seed copy and end-of-cycle flag run on the free clock.
  always_ff @(posedge clk) begin
    if (rst) begin
      seed_q     <= '0;
      cycle_done <= 1'b0;
    end else begin
      cycle_done <= 1'b0;
      if (load) seed_q <= seed_ok;
      else if (shift && ({q[N-2:0], fb} == seed_q)) cycle_done <= 1'b1;
    end
  end

  assign pattern    = q;
  assign serial_out = fb;
endmodule
