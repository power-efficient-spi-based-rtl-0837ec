// bist_controller: test controller of the SPI-based BIST (master side).
//
// On a test pulse it loads the seed into the clock-gated pattern generator,
// clears the output response analyzer, and then sends one pattern per SPI
// frame to the slave, advancing the generator by one step per frame. The
// slave answers each pattern in the following frame, so the response received
// in frame k belongs to the pattern sent in frame k-1: the controller keeps
// the previous pattern and hands it to the analyzer together with the
// response. When the generator reports that its cycle is complete (all 255
// patterns sent), one more frame is sent only to collect the last response,
// then the analyzer is asked for its verdict.
//
// Interface (synchronous to clk, rst active high):
//   test        - start pulse (ignored while busy)
//   seed        - seed for this test, latched at start (also the ROM address)
//   tpg_load/tpg_shift/tpg_cycle_done/tpg_pattern - pattern generator
//   spi_start/spi_ready/spi_done - SPI master shift engine
//   ora_*       - analyzer control; ora_pattern is the pattern whose
//                 response the SPI engine has just received
//   busy, frames - test running / frames sent so far in this test
// Timing: 2^N SPI frames per test plus a few cycles of setup and verdict.
// The controller's duties (pattern selection, gating the generator, triggering
// the analyzer) follow the document; the one-frame pipeline and the FSM
// are this design's choices.
module bist_controller
  import bist_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      test,
  input  pattern_t  seed,
  output pattern_t  seed_q,
  // pattern generator
  output logic      tpg_load,
  output logic      tpg_shift,
  input  logic      tpg_cycle_done,
  input  pattern_t  tpg_pattern,
  // SPI master
  output logic      spi_start,
  input  logic      spi_ready,
  input  logic      spi_done,
  // output response analyzer
  output logic      ora_clear,
  output logic      ora_capture,
  output pattern_t  ora_pattern,
  output logic      ora_check,
  // status
  output logic      busy,
  output logic [TPG_W:0] frames
);
  typedef enum logic [2:0] {C_IDLE, C_SEND, C_WAIT, C_CHECK, C_VERDICT} cstate_t;

  cstate_t  state;
  pattern_t pat_cur;       // pattern in flight
  logic     first;         // no response to collect in the current frame
  logic     flush;         // all patterns sent
  logic     last;          // the frame in flight only collects a response

  assign busy        = (state != C_IDLE);

  always_comb begin
    tpg_load    = (state == C_IDLE) && test;
    ora_clear   = (state == C_IDLE) && test;
    spi_start   = (state == C_SEND) && spi_ready;
    tpg_shift   = spi_start && !flush;
    ora_capture = (state == C_WAIT) && spi_done && !first;
    ora_check   = (state == C_CHECK);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= C_IDLE;
      seed_q      <= pattern_t'(1);
      pat_cur     <= '0;
      ora_pattern <= '0;
      first       <= 1'b1;
      flush       <= 1'b0;
      last        <= 1'b0;
      frames      <= '0;
    end else begin
      if (tpg_cycle_done) flush <= 1'b1;
      unique case (state)
        C_IDLE: begin
          if (test) begin
            seed_q <= legal_seed(seed);
            first  <= 1'b1;
            flush  <= 1'b0;
            last   <= 1'b0;
            frames <= '0;
            state  <= C_SEND;
          end
        end
        C_SEND: begin
          if (spi_ready) begin
            ora_pattern <= pat_cur;
            pat_cur     <= tpg_pattern;
            last        <= flush;
            frames      <= frames + 1'b1;
            state       <= C_WAIT;
          end
        end
        C_WAIT: begin
          if (spi_done) begin
            first <= 1'b0;
            state <= last ? C_CHECK : C_SEND;
          end
        end
        C_CHECK:   state <= C_VERDICT;
        C_VERDICT: state <= C_IDLE;
        default:   state <= C_IDLE;
      endcase
    end
  end

  // The generator is never loaded and advanced in the same cycle.
  a_load_shift: assert property (@(posedge clk) disable iff (rst) !(tpg_load && tpg_shift));
  // A response is only captured at the end of a frame.
  a_capture: assert property (@(posedge clk) disable iff (rst) ora_capture |-> spi_done);
endmodule
