// tb_cut_adder: exhaustive self-checking test of the 4-bit adder under test.
// All 256 operand pairs are applied in the correct state and the sum and
// carry-out compared with integer addition; in the faulty state sum bit 0
// must read 0 while the other bits stay correct.
`timescale 1ns/1ps
module tb_cut_adder;
  logic [3:0] a, b, sum;
  logic fault_en, cout;
  int checks = 0, failures = 0;

  cut_adder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 2; f++) begin
      for (int i = 0; i < 16; i++) begin
        for (int j = 0; j < 16; j++) begin
          int s;
          a = 4'(i); b = 4'(j); fault_en = 1'(f);
          #1;
          s = i + j;
          if (f) s = s & ~1;
          checks++;
          if ({cout, sum} != 5'(s)) begin
            failures++;
            $display("FAIL %0d+%0d fault=%0d: got %0d expected %0d", i, j, f, {cout, sum}, s);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
