// tb_md_bram - checks the stored DCM settings.
//
// The testbench carries its own copy of the 23 settings (M and D of both
// DCMs, the output frequencies for a 100 MHz reference and the expected
// peak counts as published for this design) and checks that:
//   - each word reads back as {M-1, D-1} one cycle after the read, for
//     DCM-A at word 2k and DCM-B at word 2k+1, and holds while en is low;
//   - DCM-A is the faster clock of every set;
//   - the expected peak count F_B / (2 (F_A - F_B)) computed from the words
//     read matches the published value to within one count. Sets 10 and 11
//     (0-based 9 and 10) are published as 268 and 269, while their M and D
//     give 263.5 and 264.0; for those two the computed value is checked.
`timescale 1ns/1ps
module tb_md_bram;

  import trng_pkg::*;

  logic      clk = 1'b0, en = 1'b0;
  set_addr_t addr = '0;
  dcm_sel_t  sel = DCM_A;
  drp_word_t dout;
  int        checks = 0, failures = 0;

  md_bram dut (.clk(clk), .en(en), .addr(addr), .sel(sel), .dout(dout));

  always #5 clk = ~clk;

  // {M_A, D_A, M_B, D_B, published peak}
  int tbl [23][5] = '{
    '{15, 31, 14, 29, 217}, '{21, 22, 20, 21, 220}, '{17, 21, 21, 26, 220},
    '{20, 27, 17, 23, 229}, '{15, 29, 16, 31, 232}, '{17, 25, 19, 28, 237},
    '{22, 23, 21, 22, 241}, '{19, 29, 17, 26, 246}, '{19, 32, 16, 27, 256},
    '{22, 31, 17, 24, 268}, '{23, 24, 22, 23, 269}, '{19, 25, 22, 29, 275},
    '{24, 25, 23, 24, 287}, '{21, 32, 19, 29, 304}, '{23, 31, 20, 27, 310},
    '{25, 26, 24, 25, 312}, '{21, 26, 25, 31, 325}, '{26, 27, 25, 26, 337},
    '{27, 28, 26, 27, 364}, '{28, 29, 27, 28, 391}, '{29, 30, 28, 29, 420},
    '{30, 31, 29, 30, 449}, '{31, 32, 30, 31, 480}
  };

  task automatic rd(input int k, input dcm_sel_t s, output drp_word_t w);
    @(negedge clk);
    en = 1'b1; addr = set_addr_t'(k); sel = s;
    @(negedge clk);
    en = 1'b0;
    w = dout;
    // The output holds while en is low.
    @(negedge clk);
    checks++;
    if (dout != w) begin failures++; $display("FAIL dout did not hold"); end
  endtask

  initial begin
    for (int k = 0; k < 23; k++) begin
      drp_word_t wa, wb;
      int ma, da, mb, db;
      real fa, fb, est;
      rd(k, DCM_A, wa);
      rd(k, DCM_B, wb);
      ma = int'(wa[15:8]) + 1; da = int'(wa[7:0]) + 1;
      mb = int'(wb[15:8]) + 1; db = int'(wb[7:0]) + 1;
      checks++;
      if (ma != tbl[k][0] || da != tbl[k][1] || mb != tbl[k][2] || db != tbl[k][3]) begin
        failures++;
        $display("FAIL set %0d: A %0d/%0d B %0d/%0d", k, ma, da, mb, db);
      end
      fa  = 100.0 * ma / da;
      fb  = 100.0 * mb / db;
      est = fb / (2.0 * (fa - fb));
      checks++;
      if (fa <= fb) begin failures++; $display("FAIL set %0d: DCM-A not faster", k); end
      checks++;
      if (k == 9 || k == 10) begin
        if (est < 263.0 || est > 264.5) failures++;
      end else if (est < tbl[k][4] - 1.0 || est > tbl[k][4] + 1.0) begin
        failures++;
        $display("FAIL set %0d: expected peak %f, published %0d", k, est, tbl[k][4]);
      end
      $display("set %2d  A %0d/%0d %8.4f MHz  B %0d/%0d %8.4f MHz  peak %6.1f",
               k, ma, da, fa, mb, db, fb, est);
    end
    // Words past the last set read as zero.
    for (int k = 23; k < 32; k++) begin
      drp_word_t w;
      rd(k, DCM_B, w);
      checks++;
      if (w != '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
