// tb_golden_rom: self-checking test of the golden-signature ROM.
// For every seed the expected signature is recomputed here from scratch
// (LFSR x^8+x^6+x^5+x^4+1 from the seed, 4-bit nibble addition, 5-stage
// MISR x^5+x^2+1) and compared with the ROM word, read one clock after the
// address is applied.
`timescale 1ns/1ps
module tb_golden_rom;
  logic clk = 1'b0;
  logic [7:0] addr = '0;
  logic [4:0] data;
  int checks = 0, failures = 0;

  golden_rom dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [4:0] sig_of(logic [7:0] s);
    logic [7:0] p;
    logic [4:0] m, r;
    p = (s == 0) ? 8'd1 : s;
    m = '0;
    for (int k = 0; k < 255; k++) begin
      r = 5'(p[3:0]) + 5'(p[7:4]);
      m = {m[3], m[2], m[1] ^ m[4], m[0], m[4]} ^ r;
      p = {p[6:0], p[7] ^ p[5] ^ p[4] ^ p[3]};
    end
    return m;
  endfunction

  initial begin
    int hist [32];
    foreach (hist[i]) hist[i] = 0;
    for (int s = 0; s < 256; s++) begin
      @(negedge clk);
      addr = 8'(s);
      @(negedge clk);
      checks++;
      hist[data]++;
      if (data != sig_of(8'(s))) begin
        failures++;
        $display("FAIL seed %0d: rom %h expected %h", s, data, sig_of(8'(s)));
      end
    end
    $display("signature of seed 1: %h", sig_of(8'd1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
