// tb_beat_dff - checks the beat frequency detector flip-flop.
//
// clk_b (10.1 ns) samples clk_a (10.0 ns). The faster clock gains 0.1 ns per
// clk_b period, so the sampled level must form a square wave whose period
// is T_A / (T_B - T_A) = 100 clk_b cycles, high and low for 50 each. Checks:
// q equals clk_a as the testbench saw it at the sampling edge(s) before, for
// a one-stage and a two-stage instance, and the run lengths of q.
`timescale 1ns/1ps
module tb_beat_dff;

  logic clk_a = 1'b0, clk_b = 1'b0, rst_n = 1'b1;
  logic q1, q2;
  int checks = 0, failures = 0;

  beat_dff dut1 (.clk(clk_b), .rst_n(rst_n), .a_clk(clk_a), .q(q1));
  beat_dff #(.STAGES(2)) dut2 (.clk(clk_b), .rst_n(rst_n), .a_clk(clk_a), .q(q2));

  // Reset falls shortly after time 0 so that asynchronous resets see an edge.
  initial #1 rst_n = 1'b0;

  initial begin #0.37; forever #5.0 clk_a = ~clk_a; end
  initial forever #5.05 clk_b = ~clk_b;

  // Level of clk_a at the last two clk_b rising edges, as seen just before.
  logic s1 = 1'b0, s2 = 1'b0;
  int   run_len = 0, runs = 0;
  logic last_q = 1'b0;
  int   cycles = 0;

  always @(posedge clk_b) begin
    cycles++;
    if (rst_n) begin
      #1;
      checks++;
      if (q1 !== s1) begin failures++; $display("FAIL q1=%0b exp %0b at %0t", q1, s1, $time); end
      checks++;
      if (q2 !== s2) begin failures++; $display("FAIL q2=%0b exp %0b at %0t", q2, s2, $time); end
      if (q1 == last_q) run_len++;
      else begin
        // Skip the first, partial run.
        if (runs > 0) begin
          checks++;
          if (run_len < 49 || run_len > 51) begin
            failures++;
            $display("FAIL run of %0b lasted %0d cycles, expected 50", last_q, run_len);
          end
        end
        runs++;
        run_len = 1;
        last_q  = q1;
      end
    end
  end

  // Reference pipeline: sample clk_a with a tiny lead on the clk_b edge.
  always @(posedge clk_b) begin
    if (rst_n) begin
      s2 <= s1;
      s1 <= clk_a;
    end
  end

  initial begin
    repeat (3) @(posedge clk_b);
    @(negedge clk_b) rst_n = 1'b1;
    wait (runs >= 9);
    checks++;
    if (runs < 9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk_b);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
