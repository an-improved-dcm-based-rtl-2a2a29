// tb_dcm_trng_top - end-to-end test of the TRNG with two jittery DCM models.
//
// A 100 MHz reference clocks the tuning logic and both DCM models (period
// jitter 0.5 ns peak to peak on every edge). The test:
//   1. lets the DCMs lock on their power-up setting and collects beats,
//   2. reprograms set 0 (expected peak 217), set 11 (275) and set 22 (480),
//      reaching them by an address load, a refused out-of-range load and a
//      step with sel_next, and checks the peak counts of each setting,
//   3. disables the DCMs with en and checks that nothing is produced, then
//      re-enables them and checks that peaks resume.
// Checks: every corrected output bit against the testbench's own Von
// Neumann model of the 3 LSBs of the peaks (compared between resets of the
// DCM-B domain, where the last output word may be lost); for every setting the mean of
// the full-length peaks (those above half the expected value) lies within
// -12 % / +3 % of F_B / (2 (F_A - F_B)) (jitter can only cut a count-up run
// short), and the clk_b cycles between full-length peaks average twice the
// expected peak within 5 %. Every mechanism (tuning, address load, refused
// load, step, beat capture, Von Neumann keep and drop, disable) is counted
// and must have occurred.
`timescale 1ns/1ps
module tb_dcm_trng_top;

  import trng_pkg::*;

  localparam real JITTER = 0.5;

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

  dcm_adv_model #(.CLKFX_MULTIPLY(15), .CLKFX_DIVIDE(31), .JITTER_PP(JITTER)) u_dcm_a (
    .CLKIN(dclk), .RST(dcm_rst), .CLKFX(clk_a), .LOCKED(dcm_a_locked), .DCLK(dclk),
    .DADDR(dcm_a_daddr), .DI(dcm_a_di), .DEN(dcm_a_den), .DWE(dcm_a_dwe),
    .DO(dcm_a_do), .DRDY(dcm_a_drdy));
  dcm_adv_model #(.CLKFX_MULTIPLY(14), .CLKFX_DIVIDE(29), .JITTER_PP(JITTER)) u_dcm_b (
    .CLKIN(dclk), .RST(dcm_rst), .CLKFX(clk_b), .LOCKED(dcm_b_locked), .DCLK(dclk),
    .DADDR(dcm_b_daddr), .DI(dcm_b_di), .DEN(dcm_b_den), .DWE(dcm_b_dwe),
    .DO(dcm_b_do), .DRDY(dcm_b_drdy));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------ mechanism counters
  int n_tune = 0, n_load = 0, n_refused = 0, n_next = 0, n_beats = 0;
  int n_keep = 0, n_drop = 0, n_disable = 0, n_out_while_off = 0;
  logic off_window = 1'b0;

  always @(posedge dclk) begin
    if (tune_done && !tune_lock_err) n_tune++;
    if (sel_load && !sel_err) n_load++;
    if (sel_err) n_refused++;
    if (sel_next) n_next++;
  end

  // ------------------------------------------------ Von Neumann reference
  bit stream[$];
  bit ref_bits[$];
  bit dut_bits[$];

  // Registered clk_b outputs are sampled half a cycle after they change. A
  // peak is committed to the reference at the next rising clk_b edge, where
  // the corrector takes it; a DCM reset before that edge (a retune or a
  // disable) resets the clk_b domain, which drops the peak and any unpaired
  // bit.
  logic   have_peak = 1'b0;
  count_t peak_q;

  always @(negedge clk_b) begin
    if (count_valid) begin
      n_beats++;
      have_peak = 1'b1;
      peak_q    = count_max;
    end
    if (rnd_valid)
      for (int i = 0; i < int'(rnd_n); i++) dut_bits.push_back(rnd_bits[i]);
    if (off_window && count_valid) n_out_while_off++;
  end

  always @(posedge clk_b) begin
    if (have_peak) begin
      have_peak = 1'b0;
      for (int i = 0; i < 3; i++) stream.push_back(peak_q[i]);
      while (stream.size() >= 2) begin
        bit b0, b1;
        b0 = stream.pop_front();
        b1 = stream.pop_front();
        if (b0 != b1) begin ref_bits.push_back(b0); n_keep++; end
        else n_drop++;
      end
    end
  end

  // Compare the corrected stream against the reference. Called at every
  // reset of the clk_b domain and at the end. A reset can cut off the last
  // output word (up to two bits) before it is seen, so at a reset the DUT
  // may lack up to two trailing bits.
  int n_segments = 0, n_compared = 0;

  task automatic compare_segment(input bit at_reset);
    int nr, nd;
    nr = ref_bits.size();
    nd = dut_bits.size();
    checks++;
    if (at_reset ? (nd > nr || nr - nd > 2) : (nd != nr)) begin
      failures++;
      $display("FAIL %0d corrected bits, expected %0d at %0t", nd, nr, $time);
    end
    for (int i = 0; i < nd && i < nr; i++) begin
      checks++;
      if (dut_bits[i] != ref_bits[i]) begin
        failures++;
        $display("FAIL corrected bit %0d of segment %0d", i, n_segments);
      end
    end
    n_compared += nd;
    n_segments++;
    ref_bits.delete();
    dut_bits.delete();
    stream.delete();
    have_peak = 1'b0;
  endtask

  // Wait 1 ns so that samples taken in the same time step are included.
  wire both_locked = dcm_a_locked & dcm_b_locked;
  always @(negedge both_locked) begin
    #1;
    compare_segment(1'b1);
  end

  // ------------------------------------------------ peak statistics
  longint b_cycle = 0;
  always @(posedge clk_b) b_cycle++;

  int     min_peak = 0;
  int     peaks = 0;
  real    sum = 0.0, sumsq = 0.0;
  longint first_cyc = 0, last_cyc = 0;

  always @(negedge clk_b) begin
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

  // Collect `want` full-length peaks after the first one and check them.
  task automatic measure_set(input int k, input int want);
    real est, mean, sd, spacing;
    est = expected_peak(k);
    // Skip the partial run that follows (re)locking.
    @(posedge count_valid);
    min_peak = int'(est / 2.0);
    peaks = 0; sum = 0.0; sumsq = 0.0;
    while (peaks < want) @(posedge clk_b);
    min_peak = 0;
    mean    = sum / peaks;
    sd      = (sumsq / peaks - mean * mean);
    sd      = (sd > 0.0) ? $sqrt(sd) : 0.0;
    spacing = real'(last_cyc - first_cyc) / real'(peaks - 1);
    $display("set %2d: expected peak %6.1f  mean %6.1f  rel. std %5.2f %%  beat %6.1f cycles",
             k, est, mean, 100.0 * sd / mean, spacing);
    check(mean > 0.88 * est && mean < 1.03 * est, $sformatf("mean peak of set %0d", k));
    check(spacing > 1.9 * est && spacing < 2.1 * est, $sformatf("beat length of set %0d", k));
  endtask

  task automatic pulse(ref logic s);
    @(negedge dclk) s = 1'b1;
    @(negedge dclk) s = 1'b0;
  endtask

  task automatic tune();
    @(negedge dclk) drp_req = 1'b1;
    @(negedge dclk) drp_req = 1'b0;
    while (!(tune_done)) @(posedge dclk);
    #1;
    check(!tune_lock_err, "DCMs locked after tuning");
  endtask

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
    // Compare the output stream from this clean start on.
    stream.delete();
    ref_bits.delete();
    dut_bits.delete();
    have_peak = 1'b0;

    // 1. power-up setting of the DCMs (that of set 0)
    measure_set(0, 4);

    // 2. set 0 through the tuning path
    tune();
    check(set_addr == 0, "set address 0");
    measure_set(0, 6);

    // set 11 by a load
    @(negedge dclk) begin sel_load = 1'b1; sel_addr = 5'd11; end
    @(negedge dclk) sel_load = 1'b0;
    tune();
    check(set_addr == 11, "set address 11");
    measure_set(11, 6);

    // an out-of-range load is refused, then load 21 and step to 22
    @(negedge dclk) begin sel_load = 1'b1; sel_addr = 5'd30; end
    @(negedge dclk) sel_load = 1'b0;
    check(set_addr == 11, "out-of-range load refused");
    @(negedge dclk) begin sel_load = 1'b1; sel_addr = 5'd21; end
    @(negedge dclk) sel_load = 1'b0;
    @(negedge dclk) sel_next = 1'b1;
    @(negedge dclk) sel_next = 1'b0;
    check(set_addr == 22, "step to set 22");
    tune();
    measure_set(22, 5);

    // 3. disable and re-enable
    @(negedge dclk) en = 1'b0;
    n_disable++;
    repeat (3) @(posedge dclk);
    check(dcm_rst && !dcm_a_locked && !dcm_b_locked, "DCMs held in reset while disabled");
    off_window = 1'b1;
    repeat (3000) @(posedge dclk);
    off_window = 1'b0;
    @(negedge dclk) en = 1'b1;
    measure_set(22, 2);

    // Output stream against the reference.
    repeat (10) @(posedge clk_b);
    compare_segment(1'b0);
    $display("corrected bits compared: %0d in %0d segments", n_compared, n_segments);
    check(n_compared > 100, "enough corrected bits compared");

    $display("tunings=%0d loads=%0d refused=%0d steps=%0d beats=%0d vn_keep=%0d vn_drop=%0d disables=%0d",
             n_tune, n_load, n_refused, n_next, n_beats, n_keep, n_drop, n_disable);
    check(n_tune >= 3, "tuning happened");
    check(n_load >= 2, "address load happened");
    check(n_refused >= 1, "refused load happened");
    check(n_next >= 1, "address step happened");
    check(n_beats >= 20, "beats captured");
    check(n_keep > 0, "Von Neumann kept bits");
    check(n_drop > 0, "Von Neumann dropped pairs");
    check(n_disable > 0, "disable happened");
    check(n_out_while_off == 0, "no peaks while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge dclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
