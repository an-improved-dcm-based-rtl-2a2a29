// tb_drp_controller - checks the reprogramming of both DCMs.
//
// The controller reads the real settings BRAM and drives two behavioural
// DCM models. For random sets the testbench checks that the DCMs are in
// reset when the DRP strobe comes, that the strobe lasts one cycle, that
// each DCM receives {M-1, D-1} of its own half of the set (from the
// testbench's own table), that done comes only once both DCMs are locked
// and that the synthesised clock periods are then T_ref * D / M. A request
// made while busy must be ignored. A second controller whose DCMs never
// lock must give up after LOCK_TIMEOUT cycles with lock_err set.
`timescale 1ns/1ps
module tb_drp_controller;

  import trng_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  logic drp_req = 1'b0;
  set_addr_t set_addr = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // ---------------- main controller with BRAM and DCM models
  logic bram_en; set_addr_t bram_addr; dcm_sel_t bram_sel; drp_word_t bram_dout;
  logic [6:0] a_daddr, b_daddr; drp_word_t a_di, b_di, a_do, b_do;
  logic a_den, a_dwe, a_drdy, a_locked, b_den, b_dwe, b_drdy, b_locked;
  logic dcm_rst, busy, done, lock_err, clk_a, clk_b;

  md_bram u_bram (.clk(clk), .en(bram_en), .addr(bram_addr), .sel(bram_sel), .dout(bram_dout));

  drp_controller dut (
    .clk(clk), .rst_n(rst_n), .drp_req(drp_req), .set_addr(set_addr),
    .bram_en(bram_en), .bram_addr(bram_addr), .bram_sel(bram_sel), .bram_dout(bram_dout),
    .a_daddr(a_daddr), .a_di(a_di), .a_den(a_den), .a_dwe(a_dwe), .a_drdy(a_drdy), .a_locked(a_locked),
    .b_daddr(b_daddr), .b_di(b_di), .b_den(b_den), .b_dwe(b_dwe), .b_drdy(b_drdy), .b_locked(b_locked),
    .dcm_rst(dcm_rst), .busy(busy), .done(done), .lock_err(lock_err)
  );

  dcm_adv_model #(.CLKFX_MULTIPLY(2), .CLKFX_DIVIDE(2), .DRDY_DELAY(3)) u_dcm_a (
    .CLKIN(clk), .RST(dcm_rst), .CLKFX(clk_a), .LOCKED(a_locked), .DCLK(clk),
    .DADDR(a_daddr), .DI(a_di), .DEN(a_den), .DWE(a_dwe), .DO(a_do), .DRDY(a_drdy));
  dcm_adv_model #(.CLKFX_MULTIPLY(2), .CLKFX_DIVIDE(2), .DRDY_DELAY(5)) u_dcm_b (
    .CLKIN(clk), .RST(dcm_rst), .CLKFX(clk_b), .LOCKED(b_locked), .DCLK(clk),
    .DADDR(b_daddr), .DI(b_di), .DEN(b_den), .DWE(b_dwe), .DO(b_do), .DRDY(b_drdy));

  // ---------------- second controller whose DCMs never lock
  logic t_bram_en; set_addr_t t_bram_addr; dcm_sel_t t_bram_sel;
  logic [6:0] t_a_daddr, t_b_daddr; drp_word_t t_a_di, t_b_di;
  logic t_a_den, t_a_dwe, t_b_den, t_b_dwe, t_rdy = 1'b0;
  logic t_rst, t_busy, t_done, t_lock_err, t_req = 1'b0;

  drp_controller #(.LOCK_TIMEOUT(20)) dut_to (
    .clk(clk), .rst_n(rst_n), .drp_req(t_req), .set_addr(5'd3),
    .bram_en(t_bram_en), .bram_addr(t_bram_addr), .bram_sel(t_bram_sel), .bram_dout(16'h1234),
    .a_daddr(t_a_daddr), .a_di(t_a_di), .a_den(t_a_den), .a_dwe(t_a_dwe), .a_drdy(t_rdy), .a_locked(1'b0),
    .b_daddr(t_b_daddr), .b_di(t_b_di), .b_den(t_b_den), .b_dwe(t_b_dwe), .b_drdy(t_rdy), .b_locked(1'b0),
    .dcm_rst(t_rst), .busy(t_busy), .done(t_done), .lock_err(t_lock_err)
  );
  always @(posedge clk) t_rdy <= t_a_den;
  int t_done_cycles = -1, t_cycle = 0;
  always @(posedge clk) begin
    t_cycle++;
    if (t_done && t_done_cycles < 0) t_done_cycles = t_cycle;
  end

  // {M_A, D_A, M_B, D_B}
  int tbl [23][4] = '{
    '{15, 31, 14, 29}, '{21, 22, 20, 21}, '{17, 21, 21, 26}, '{20, 27, 17, 23},
    '{15, 29, 16, 31}, '{17, 25, 19, 28}, '{22, 23, 21, 22}, '{19, 29, 17, 26},
    '{19, 32, 16, 27}, '{22, 31, 17, 24}, '{23, 24, 22, 23}, '{19, 25, 22, 29},
    '{24, 25, 23, 24}, '{21, 32, 19, 29}, '{23, 31, 20, 27}, '{25, 26, 24, 25},
    '{21, 26, 25, 31}, '{26, 27, 25, 26}, '{27, 28, 26, 27}, '{28, 29, 27, 28},
    '{29, 30, 28, 29}, '{30, 31, 29, 30}, '{31, 32, 30, 31}
  };

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Strobe monitor.
  int strobes = 0;
  logic [15:0] seen_a, seen_b;
  always @(posedge clk) begin
    if (rst_n && a_den) begin
      strobes++;
      seen_a = a_di;
      seen_b = b_di;
      check(dcm_rst && a_dwe && b_den && b_dwe, "strobe while DCMs in reset, both ports");
      check(a_daddr == 7'h50 && b_daddr == 7'h50, "DRP address");
    end
  end

  task automatic measure(input bit which_b, output real per);
    realtime t0;
    if (which_b) begin
      @(posedge clk_b);
      t0 = $realtime;
      repeat (20) @(posedge clk_b);
    end else begin
      @(posedge clk_a);
      t0 = $realtime;
      repeat (20) @(posedge clk_a);
    end
    per = ($realtime - t0) / 20.0;
  endtask

  function automatic int unsigned abs_i(int x);
    return (x < 0) ? -x : x;
  endfunction

  task automatic program_set(input int k, input bit disturb);
    int n_before;
    int cyc;
    real pa, pb;
    n_before = strobes;
    @(negedge clk);
    set_addr = set_addr_t'(k);
    drp_req  = 1'b1;
    @(negedge clk);
    drp_req  = 1'b0;
    check(busy, "busy after request");
    if (disturb) begin
      // A second request with another set while busy must be ignored.
      @(negedge clk);
      set_addr = set_addr_t'((k + 5) % 23);
      drp_req  = 1'b1;
      @(negedge clk);
      drp_req  = 1'b0;
    end
    cyc = 0;
    while (!done && cyc < 1000) begin @(posedge clk); #1; cyc++; end
    check(done, "done");
    check(!lock_err, "no lock error");
    check(a_locked && b_locked, "both DCMs locked at done");
    check(strobes == n_before + 1, "exactly one DRP strobe");
    check(seen_a == {8'(tbl[k][0] - 1), 8'(tbl[k][1] - 1)}, $sformatf("DCM-A word for set %0d", k));
    check(seen_b == {8'(tbl[k][2] - 1), 8'(tbl[k][3] - 1)}, $sformatf("DCM-B word for set %0d", k));
    @(negedge clk);
    check(!busy, "idle after done");
    measure(1'b0, pa);
    measure(1'b1, pb);
    check(abs_i(int'(pa * 1000.0) - int'(10000.0 * tbl[k][1] / tbl[k][0])) < 5,
          $sformatf("DCM-A period %f", pa));
    check(abs_i(int'(pb * 1000.0) - int'(10000.0 * tbl[k][3] / tbl[k][2])) < 5,
          $sformatf("DCM-B period %f", pb));
  endtask

  // Reset falls shortly after time 0 so that asynchronous resets see an edge.
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    program_set(0, 1'b0);
    program_set(22, 1'b1);
    for (int i = 0; i < 6; i++) program_set(int'($urandom % 23), i[0]);

    // Lock timeout.
    @(negedge clk) t_req = 1'b1;
    @(negedge clk) t_req = 1'b0;
    repeat (100) @(posedge clk);
    #1;
    check(t_done_cycles > 0 && t_lock_err, "lock timeout reported");
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
