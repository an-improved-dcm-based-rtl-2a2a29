// tb_dcm_trng_sweep - the TRNG at its default parameters, tuned through all
// 23 stored settings in turn.
//
// Each setting is selected with sel_load, written into both DCM models with
// drp_req, and then run for 12 full-length beats. The DCM models get, per
// setting, the peak-to-peak period jitter measured for that M/D pair on the
// device (0.436 to 0.617 ns). For every setting the testbench prints the
// expected peak F_B / (2 (F_A - F_B)), the mean and relative standard
// deviation of the full-length peaks, the measured beat length and the
// resulting beats (3-bit numbers) per second, next to the mean measured on
// hardware, and checks that the mean lies within -12 %
// / +3 % of the expected peak and the beat length within 5 % of twice it.
// Over the whole run, the corrected output stream must be balanced (ones
// between 40 % and 60 %) and about a quarter or more of the raw bits must
// survive the corrector.
`timescale 1ns/1ps
module tb_dcm_trng_sweep;

  import trng_pkg::*;

  logic dclk = 1'b0, rst_n = 1'b1, en = 1'b0;
  logic sel_load = 1'b0, sel_next = 1'b0, drp_req = 1'b0;
  set_addr_t sel_addr = '0, set_addr;
  logic sel_err, tune_busy, tune_done, tune_lock_err;
  logic clk_a, clk_b, dcm_a_locked, dcm_b_locked, dcm_rst;
  logic [6:0] dcm_a_daddr, dcm_b_daddr;
  drp_word_t dcm_a_di, dcm_b_di, dcm_a_do, dcm_b_do;
  logic dcm_a_den, dcm_a_dwe, dcm_a_drdy, dcm_b_den, dcm_b_dwe, dcm_b_drdy;
  count_t count_max;
  logic count_valid, count_saturated, rnd_valid;
  logic [1:0] rnd_bits, rnd_n;

  int checks = 0, failures = 0;

  always #5 dclk = ~dclk;

  dcm_trng_top dut (.*);

  dcm_adv_model #(.CLKFX_MULTIPLY(15), .CLKFX_DIVIDE(31), .JITTER_PP(0.600)) u_dcm_a (
    .CLKIN(dclk), .RST(dcm_rst), .CLKFX(clk_a), .LOCKED(dcm_a_locked), .DCLK(dclk),
    .DADDR(dcm_a_daddr), .DI(dcm_a_di), .DEN(dcm_a_den), .DWE(dcm_a_dwe),
    .DO(dcm_a_do), .DRDY(dcm_a_drdy));
  dcm_adv_model #(.CLKFX_MULTIPLY(14), .CLKFX_DIVIDE(29), .JITTER_PP(0.568)) u_dcm_b (
    .CLKIN(dclk), .RST(dcm_rst), .CLKFX(clk_b), .LOCKED(dcm_b_locked), .DCLK(dclk),
    .DADDR(dcm_b_daddr), .DI(dcm_b_di), .DEN(dcm_b_den), .DWE(dcm_b_dwe),
    .DO(dcm_b_do), .DRDY(dcm_b_drdy));

  // Per setting: peak-to-peak jitter of DCM-A and DCM-B (ns) and the mean
  // peak measured on hardware.
  real jit_a [23] = '{0.600, 0.453, 0.436, 0.535, 0.568, 0.502, 0.469, 0.568,
                      0.617, 0.600, 0.486, 0.502, 0.502, 0.617, 0.600, 0.518,
                      0.518, 0.535, 0.551, 0.568, 0.584, 0.600, 0.617};
  real jit_b [23] = '{0.568, 0.436, 0.518, 0.469, 0.600, 0.551, 0.453, 0.518,
                      0.535, 0.486, 0.469, 0.568, 0.486, 0.568, 0.535, 0.502,
                      0.600, 0.518, 0.535, 0.551, 0.568, 0.584, 0.600};
  int  hw_mean [23] = '{215, 218, 217, 224, 225, 236, 239, 241, 254, 263, 257, 271,
                        283, 302, 308, 300, 317, 333, 387, 388, 398, 446, 468};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------ peak statistics
  longint b_cycle = 0;
  always @(posedge clk_b) b_cycle++;

  int     min_peak = 0, peaks = 0, raw_bits = 0, out_bits = 0, ones = 0;
  real    sum = 0.0, sumsq = 0.0;
  longint first_cyc = 0, last_cyc = 0;

  always @(negedge clk_b) begin
    if (count_valid) raw_bits += 3;
    if (rnd_valid)
      for (int i = 0; i < int'(rnd_n); i++) begin
        out_bits++;
        ones += int'(rnd_bits[i]);
      end
    if (count_valid && min_peak > 0 && int'(count_max) >= min_peak) begin
      if (peaks == 0) first_cyc = b_cycle;
      last_cyc = b_cycle;
      peaks++;
      sum   += real'(count_max);
      sumsq += real'(count_max) * real'(count_max);
    end
  end

  function automatic real expected_peak(int k);
    md_set_t s;
    real fa, fb;
    s  = md_table(k);
    fa = 100.0 * real'(s.a.m) / real'(s.a.d);
    fb = 100.0 * real'(s.b.m) / real'(s.b.d);
    return fb / (2.0 * (fa - fb));
  endfunction

  function automatic real clk_b_mhz(int k);
    md_set_t s;
    s = md_table(k);
    return 100.0 * real'(s.b.m) / real'(s.b.d);
  endfunction

  // Reset falls shortly after time 0 so that asynchronous resets see an edge.
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (4) @(posedge dclk);
    @(negedge dclk) begin rst_n = 1'b1; en = 1'b1; end
    // Pulse the reset again once the DCMs run, so that the DCM-B domain
    // (whose reset also follows the DCM lock) sees a reset edge too.
    wait (dcm_a_locked && dcm_b_locked);
    @(negedge dclk) rst_n = 1'b0;
    repeat (2) @(negedge dclk);
    rst_n = 1'b1;
    // row = table row (set address + 1); kpk/s = thousands of beats per second
    $display(" row  expected   mean  rel.std  beat(cyc)  kpk/s  hw mean");
    for (int k = 0; k < 23; k++) begin
      real est, mean, sd, spacing;
      u_dcm_a.jitter_pp = jit_a[k];
      u_dcm_b.jitter_pp = jit_b[k];
      @(negedge dclk) begin sel_load = 1'b1; sel_addr = set_addr_t'(k); end
      @(negedge dclk) begin sel_load = 1'b0; drp_req = 1'b1; end
      @(negedge dclk) drp_req = 1'b0;
      while (!tune_done) @(posedge dclk);
      #1;
      check(!tune_lock_err && int'(set_addr) == k, $sformatf("tuning to set %0d", k));
      est = expected_peak(k);
      @(posedge count_valid);
      min_peak = int'(est / 2.0);
      peaks = 0; sum = 0.0; sumsq = 0.0;
      while (peaks < 12) @(posedge clk_b);
      min_peak = 0;
      mean    = sum / peaks;
      sd      = sumsq / peaks - mean * mean;
      sd      = (sd > 0.0) ? $sqrt(sd) : 0.0;
      spacing = real'(last_cyc - first_cyc) / real'(peaks - 1);
      $display("  %2d   %6.1f  %6.1f   %5.2f%%   %7.1f  %5.1f    %0d",
               k + 1, est, mean, 100.0 * sd / mean, spacing,
               1000.0 * clk_b_mhz(k) / spacing, hw_mean[k]);
      check(mean > 0.88 * est && mean < 1.03 * est, $sformatf("mean peak of set %0d", k));
      check(spacing > 1.9 * est && spacing < 2.1 * est, $sformatf("beat length of set %0d", k));
    end
    $display("raw bits %0d, corrected bits %0d, ones %0d", raw_bits, out_bits, ones);
    check(out_bits * 5 > raw_bits, "corrector throughput");
    check(ones * 10 > out_bits * 4 && ones * 10 < out_bits * 6, "balanced output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge dclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
