// tb_beat_counter - checks the beat counter and its peak capture.
//
// q is driven with alternating low and high runs of random length (1 to 600
// cycles, so some low runs pass the 9-bit limit of 511). A low run of L
// cycles must produce exactly one peak equal to min(L, 511), strobed on the
// cycle after q is first sampled high; count must be zero while q is high.
`timescale 1ns/1ps
module tb_beat_counter;

  import trng_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b1, q = 1'b1;
  count_t count, count_max;
  logic   max_valid, saturated;
  int     checks = 0, failures = 0;
  int     peaks = 0, sat_seen = 0;

  beat_counter dut (
    .clk(clk), .rst_n(rst_n), .q(q), .count(count),
    .count_max(count_max), .max_valid(max_valid), .saturated(saturated)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Reference: length of the current low run and expected strobe.
  int  low_len = 0;
  int  exp_peak = -1;
  logic prev_q = 1'b1;

  always @(posedge clk) begin
    if (rst_n) begin
      // Expected values after this edge, from q as sampled now.
      exp_peak = -1;
      if (q && !prev_q) exp_peak = (low_len > 511) ? 511 : low_len;
      if (q) low_len = 0; else low_len++;
      prev_q = q;
      #1;
      check(max_valid == (exp_peak >= 0), "max_valid timing");
      if (exp_peak >= 0) begin
        peaks++;
        check(int'(count_max) == exp_peak,
              $sformatf("peak %0d expected %0d", count_max, exp_peak));
      end
      check(int'(count) == ((low_len > 511) ? 511 : low_len), "running count");
      check(saturated == (low_len >= 511), "saturated flag");
      if (saturated) sat_seen++;
    end
  end

  // Reset falls shortly after time 0 so that asynchronous resets see an edge.
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r < 60; r++) begin
      int len;
      len = (r == 7) ? 600 : 1 + int'($urandom % 300);
      @(negedge clk) q = 1'b0;
      repeat (len - 1) @(negedge clk);
      @(negedge clk) q = 1'b1;
      repeat (int'($urandom % 20)) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    check(peaks == 60, $sformatf("%0d peaks, expected 60", peaks));
    check(sat_seen > 0, "saturation never reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
