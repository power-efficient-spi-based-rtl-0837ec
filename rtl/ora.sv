// ora: output response analyzer.
//
// Two checks run side by side on every captured response of the circuit
// under test:
//   * compaction: the response goes into a MISR; at the end of the test the
//     MISR signature is compared with the golden signature read from ROM;
//   * per-pattern comparison: an expected-result generator (a reference adder
//     fed with the same pattern) gives the correct sum and carry-out, and any
//     difference sets a sticky error flag and is counted.
// The verdict (pass = no per-pattern error and signature equal to golden) is
// produced when check is pulsed.
//
// Interface (all synchronous to clk, rst active high):
//   clear     - start of test: clear MISR, error flag, count and verdict
//   capture   - resp is the CUT's answer to pattern, as the 8-bit SPI frame
//               {000, carry, sum}; compare the whole frame, compact its
//               low 5 bits
//   check     - compare signature with golden; verdict valid the next cycle
//   signature - current MISR contents
//   err_flag / err_count - per-pattern mismatches so far (count saturates)
//   done / pass - verdict valid / good (1) or faulty (0)
// Both checks are described in the document; running them together and the
// saturating error count are this design's choices.
module ora
  import bist_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic        capture,
  input  pattern_t    pattern,
  input  pattern_t    resp,
  input  logic        check,
  input  resp_t       golden,
  output resp_t       signature,
  output logic        err_flag,
  output logic [7:0]  err_count,
  output logic        done,
  output logic        pass
);
  pattern_t expected;

  // Expected result generator; the unused upper bits of the frame must be 0.
  assign expected = pattern_t'(add_ref(pattern));

  misr u_misr (
    .clk      (clk),
    .rst      (rst),
    .clear    (clear),
    .en       (capture),
    .resp     (resp[RESP_W-1:0]),
    .signature(signature)
  );

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      err_flag  <= 1'b0;
      err_count <= '0;
      done      <= 1'b0;
      pass      <= 1'b0;
    end else begin
      if (capture && resp != expected) begin
        err_flag <= 1'b1;
        if (err_count != '1) err_count <= err_count + 8'd1;
      end
      if (check) begin
        done <= 1'b1;
        pass <= !err_flag && (signature == golden);
      end
    end
  end
endmodule
