// tb_post_processing_unit - checks the Von Neumann post-processing.
//
// Random peak values are fed in with random gaps, back to back included.
// The testbench keeps its own bit stream of the 3 LSBs of every peak (LSB
// first), pairs it up, keeps the first bit of every "01"/"10" pair and
// drops "00"/"11". The corrected bits the unit delivers must equal that
// sequence bit for bit, one cycle after each input.
`timescale 1ns/1ps
module tb_post_processing_unit;

  import trng_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b1;
  logic       in_valid = 1'b0;
  count_t     in_count = '0;
  logic [1:0] out_bits, out_n;
  logic       out_valid;
  int         checks = 0, failures = 0;

  post_processing_unit dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_count(in_count),
    .out_bits(out_bits), .out_n(out_n), .out_valid(out_valid)
  );

  always #5 clk = ~clk;

  bit ref_bits[$];
  bit dut_bits[$];
  bit stream[$];
  int pairs_kept = 0, pairs_dropped = 0, in_words = 0;

  task automatic push_ref(input count_t v);
    for (int i = 0; i < 3; i++) stream.push_back(v[i]);
    while (stream.size() >= 2) begin
      bit b0, b1;
      b0 = stream.pop_front();
      b1 = stream.pop_front();
      if (b0 != b1) begin
        ref_bits.push_back(b0);
        pairs_kept++;
      end else begin
        pairs_dropped++;
      end
    end
  endtask

  always @(posedge clk) begin
    logic exp_valid;
    int   n_before;
    exp_valid = 1'b0;
    n_before = ref_bits.size();
    if (rst_n && in_valid) begin
      push_ref(in_count);
      in_words++;
    end
    #1;
    if (rst_n) begin
      checks++;
      if (out_valid != (ref_bits.size() != n_before) || int'(out_n) != ref_bits.size() - n_before) begin
        failures++;
        $display("FAIL out_n=%0d expected %0d at %0t", out_n, ref_bits.size() - n_before, $time);
      end
      for (int i = 0; i < int'(out_n); i++) dut_bits.push_back(out_bits[i]);
    end
  end

  // Reset falls shortly after time 0 so that asynchronous resets see an edge.
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_count = count_t'($urandom);
      @(negedge clk);
      in_valid = 1'b0;
      if ($urandom % 2 == 0) repeat (int'($urandom % 4)) @(negedge clk);
      else begin
        // back to back
        in_valid = 1'b1;
        in_count = count_t'($urandom);
        @(negedge clk) in_valid = 1'b0;
      end
    end
    repeat (3) @(negedge clk);
    checks++;
    if (dut_bits.size() != ref_bits.size()) begin
      failures++;
      $display("FAIL %0d bits out, expected %0d", dut_bits.size(), ref_bits.size());
    end
    for (int i = 0; i < dut_bits.size() && i < ref_bits.size(); i++) begin
      checks++;
      if (dut_bits[i] != ref_bits[i]) failures++;
    end
    checks++;
    if (pairs_kept == 0 || pairs_dropped == 0) failures++;
    $display("inputs=%0d pairs kept=%0d dropped=%0d bits out=%0d",
             in_words, pairs_kept, pairs_dropped, dut_bits.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
