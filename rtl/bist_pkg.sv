// bist_pkg: types, sizes and reference functions shared by the SPI-based
// clock-gated BIST.
//
// The sizes follow the design: an 8-bit LFSR pattern generator (255 patterns
// per cycle), split into two 4-bit operands for a 4-bit adder under test whose
// 5-bit response (sum and carry-out) is compacted by a 5-stage MISR. The LFSR
// feedback polynomial, the operand split and the MISR width are this design's
// choices.
//
// The functions below are the bit-exact behaviour of the LFSR, the adder and
// the MISR. The golden-signature ROM evaluates them at elaboration time, so the
// stored signatures always match the hardware that produces them.
package bist_pkg;

  localparam int unsigned TPG_W   = 8;            // LFSR / SPI frame width
  localparam int unsigned OPND_W  = TPG_W / 2;    // adder operand width
  localparam int unsigned RESP_W  = OPND_W + 1;   // sum + carry-out
  localparam int unsigned N_PATTERNS = (1 << TPG_W) - 1;  // 255

  // Fibonacci LFSR taps (bit i set: stage i feeds the XOR), x^8+x^6+x^5+x^4+1.
  localparam logic [TPG_W-1:0] LFSR_TAPS = 8'b1011_1000;
  // MISR feedback (bit i set: the last stage feeds stage i),
  // x^5+x^2+1, primitive. 5'b00001 would be a plain ring.
  localparam logic [RESP_W-1:0] MISR_FB = 5'b00101;

  typedef logic [TPG_W-1:0]  pattern_t;
  typedef logic [RESP_W-1:0] resp_t;

  // Next LFSR state: shift towards the MSB, feedback into bit 0.
  function automatic pattern_t lfsr_next(pattern_t s);
    return {s[TPG_W-2:0], ^(s & LFSR_TAPS)};
  endfunction

  // Fault-free response of the adder to one pattern: low nibble + high nibble.
  function automatic resp_t add_ref(pattern_t p);
    return resp_t'(p[OPND_W-1:0]) + resp_t'(p[TPG_W-1:OPND_W]);
  endfunction

  // Next MISR state for response r.
  function automatic resp_t misr_next(resp_t m, resp_t r);
    resp_t sh;
    sh = {m[RESP_W-2:0], 1'b0};
    return sh ^ (m[RESP_W-1] ? MISR_FB : '0) ^ r;
  endfunction

  // An all-zero seed would lock the LFSR; it is replaced by 1.
  function automatic pattern_t legal_seed(pattern_t s);
    return (s == '0) ? pattern_t'(1) : s;
  endfunction

  // Signature left in a cleared MISR after the full pattern cycle from seed s.
  function automatic resp_t golden_signature(pattern_t s);
    pattern_t p;
    resp_t m;
    p = legal_seed(s);
    m = '0;
    for (int unsigned i = 0; i < N_PATTERNS; i++) begin
      m = misr_next(m, add_ref(p));
      p = lfsr_next(p);
    end
    return m;
  endfunction

endpackage
