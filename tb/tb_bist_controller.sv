// tb_bist_controller: self-checking test of the BIST test controller with
// behavioural stand-ins for its neighbours: an LFSR (x^8+x^6+x^5+x^4+1) with
// load/shift and a registered cycle-done pulse, and an SPI engine that takes
// a random number of cycles per frame and answers each frame with a word
// derived from the pattern sent in the previous frame. Checked for several
// seeds: 256 frames, 255 shifts, one load, 255 captures each pairing the
// answer with the pattern it belongs to and covering every pattern once, one
// check at the end, busy dropping afterwards, and the latched seed.
`timescale 1ns/1ps
module tb_bist_controller;
  logic clk = 1'b0, rst = 1'b1, test = 1'b0;
  logic [7:0] seed = '0, seed_q, tpg_pattern, spi_rx, ora_pattern;
  logic tpg_load, tpg_shift, tpg_cycle_done, spi_start, spi_ready, spi_done;
  logic ora_clear, ora_capture, ora_check, busy;
  logic [8:0] frames;
  int checks = 0, failures = 0;

  bist_controller dut (.*);

  always #5 clk = ~clk;

  // LFSR stand-in
  logic [7:0] lfsr, lfsr_seed;
  logic cdone;
  assign tpg_pattern = lfsr;
  assign tpg_cycle_done = cdone;
  function automatic logic [7:0] nxt(logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction
  always_ff @(posedge clk) begin
    cdone <= 1'b0;
    if (tpg_load) begin lfsr <= (seed == 0) ? 8'd1 : seed; lfsr_seed <= (seed == 0) ? 8'd1 : seed; end
    else if (tpg_shift) begin
      lfsr <= nxt(lfsr);
      if (nxt(lfsr) == lfsr_seed) cdone <= 1'b1;
    end
  end

  // SPI stand-in: answer = ~previous word sent
  logic [7:0] sent_prev, sent_cur;
  int busy_cnt;
  assign spi_ready = (busy_cnt == 0);
  always_ff @(posedge clk) begin
    spi_done <= 1'b0;
    if (rst) begin busy_cnt <= 0; sent_cur <= '0; end
    else if (spi_start) begin
      sent_prev <= sent_cur;
      sent_cur  <= tpg_pattern;
      busy_cnt  <= $urandom_range(3, 12);
    end else if (busy_cnt > 0) begin
      busy_cnt <= busy_cnt - 1;
      if (busy_cnt == 3) begin spi_done <= 1'b1; spi_rx <= ~sent_prev; end
    end
  end

  int n_frames, n_shift, n_load, n_cap, n_check;
  bit covered [256];
  always @(posedge clk) if (!rst) begin
    if (spi_start) n_frames++;
    if (tpg_shift) n_shift++;
    if (tpg_load) n_load++;
    if (ora_check) n_check++;
    if (ora_capture) begin
      n_cap++;
      covered[ora_pattern] = 1;
      checks++;
      if (spi_rx != ~ora_pattern) begin
        failures++;
        $display("FAIL capture pairs answer %h with pattern %h", spi_rx, ora_pattern);
      end
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] seeds [3] = '{8'h01, 8'h00, 8'h9C};
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    chk(!busy, "idle after reset");
    foreach (seeds[j]) begin
      int ncov;
      n_frames = 0; n_shift = 0; n_load = 0; n_cap = 0; n_check = 0;
      foreach (covered[i]) covered[i] = 0;
      seed = seeds[j];
      test = 1'b1;
      @(negedge clk);
      test = 1'b0;
      seed = 8'hFF;    // must have been latched
      chk(busy, "busy after test pulse");
      while (busy) @(negedge clk);
      ncov = 0;
      foreach (covered[i]) ncov += covered[i];
      chk(n_load == 1, "one seed load");
      chk(n_frames == 256, "256 frames");
      chk(frames == 9'd256, "frame counter");
      chk(n_shift == 255, "255 shifts");
      chk(n_cap == 255, "255 captures");
      chk(ncov == 255 && !covered[0], "every pattern captured once");
      chk(n_check == 1, "one verdict request");
      chk(seed_q == ((seeds[j] == 0) ? 8'd1 : seeds[j]), "seed latched");
      $display("seed %02h: frames %0d shifts %0d captures %0d", seeds[j], n_frames, n_shift, n_cap);
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
