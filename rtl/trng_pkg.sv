// trng_pkg - types, constants and the table of safe DCM settings shared by
// the DCM-based beat-frequency TRNG.
//
// A DCM synthesises F_CLKFX = F_CLKIN * M / D. The TRNG runs two DCMs at
// slightly different frequencies; DCM-A (the faster) is sampled by DCM-B.
// Only the 23 (M, D) pairs listed in md_table() may ever be written into the
// DCMs: they are the combinations whose expected peak count lies between 200
// and 500. The pairs are the design's own (23 sets, one per entry); the
// 16-bit DRP word layout {M-1, D-1} and the register address 0x50 follow the
// Virtex-5 DCM_ADV dynamic reconfiguration convention.
package trng_pkg;

  // Number of stored (M, D) sets and the width of the set address.
  localparam int unsigned NUM_SETS = 23;
  localparam int unsigned SET_AW   = 5;

  // One BRAM word holds one DCM's setting, two words per set.
  localparam int unsigned WORD_W   = 16;
  localparam int unsigned BRAM_AW  = SET_AW + 1;

  // DRP bus of the DCM_ADV primitive.
  localparam int unsigned DRP_AW   = 7;
  localparam logic [DRP_AW-1:0] DRP_MD_ADDR = 7'h50;

  // Width of the beat counter: expected peaks are at most 480.
  localparam int unsigned COUNT_W  = 9;

  // Bits of each peak count handed to the post-processing unit.
  localparam int unsigned RAND_LSBS = 3;

  typedef logic [SET_AW-1:0]  set_addr_t;
  typedef logic [WORD_W-1:0]  drp_word_t;
  typedef logic [COUNT_W-1:0] count_t;

  // Which DCM of a set a BRAM word belongs to.
  typedef enum logic {DCM_A = 1'b0, DCM_B = 1'b1} dcm_sel_t;

  typedef struct packed {
    logic [7:0] m;
    logic [7:0] d;
  } md_t;

  typedef struct packed {
    md_t a;   // faster clock, feeds the DFF's D input
    md_t b;   // slower clock, clocks the DFF, counter and post-processing
  } md_set_t;

  // DRP word for a DCM_ADV: multiplier minus one in [15:8], divider minus
  // one in [7:0].
  function automatic drp_word_t drp_encode(md_t md);
    return {md.m - 8'd1, md.d - 8'd1};
  endfunction

  function automatic md_t md(logic [7:0] m, logic [7:0] d);
    md_t r;
    r.m = m;
    r.d = d;
    return r;
  endfunction

  // The 23 safe settings, ordered by expected peak count (217 ... 480).
  // Expected peak count n = F_B / (2 (F_A - F_B)), i.e.
  // n = M_B*D_A / (2 (M_A*D_B - M_B*D_A)).
  function automatic md_set_t md_table(int unsigned idx);
    md_set_t s;
    case (idx)
      0:  s = '{md(15, 31), md(14, 29)};
      1:  s = '{md(21, 22), md(20, 21)};
      2:  s = '{md(17, 21), md(21, 26)};
      3:  s = '{md(20, 27), md(17, 23)};
      4:  s = '{md(15, 29), md(16, 31)};
      5:  s = '{md(17, 25), md(19, 28)};
      6:  s = '{md(22, 23), md(21, 22)};
      7:  s = '{md(19, 29), md(17, 26)};
      8:  s = '{md(19, 32), md(16, 27)};
      9:  s = '{md(22, 31), md(17, 24)};
      10: s = '{md(23, 24), md(22, 23)};
      11: s = '{md(19, 25), md(22, 29)};
      12: s = '{md(24, 25), md(23, 24)};
      13: s = '{md(21, 32), md(19, 29)};
      14: s = '{md(23, 31), md(20, 27)};
      15: s = '{md(25, 26), md(24, 25)};
      16: s = '{md(21, 26), md(25, 31)};
      17: s = '{md(26, 27), md(25, 26)};
      18: s = '{md(27, 28), md(26, 27)};
      19: s = '{md(28, 29), md(27, 28)};
      20: s = '{md(29, 30), md(28, 29)};
      21: s = '{md(30, 31), md(29, 30)};
      22: s = '{md(31, 32), md(30, 31)};
      default: s = '{md(1, 1), md(1, 1)};
    endcase
    return s;
  endfunction

endpackage
