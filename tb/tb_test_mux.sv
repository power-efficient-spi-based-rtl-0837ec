// tb_test_mux: self-checking test of the CUT input multiplexer with random
// test and functional words in both modes.
`timescale 1ns/1ps
module tb_test_mux;
  logic test_mode;
  logic [7:0] test_in, func_in, cut_in;
  int checks = 0, failures = 0;

  test_mux #(.W(8)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      test_in = 8'($urandom); func_in = 8'($urandom); test_mode = 1'(k & 1);
      #1;
      checks++;
      if (cut_in != (test_mode ? test_in : func_in)) begin
        failures++;
        $display("FAIL mode %0d: got %h", test_mode, cut_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
