// dcm_trng_top - tunable beat-frequency-detection TRNG driven by two DCMs.
//
// Two DCM clock generators (outside this module) produce clk_a and clk_b at
// slightly different frequencies, clk_a the faster. The entropy path runs
// entirely on clk_b:
//   beat_dff             samples clk_a on clk_b edges -> q,
//   beat_counter         counts clk_b cycles while q is low and captures the
//                        peak count when q goes high,
//   post_processing_unit feeds the 3 LSBs of each peak through a Von
//                        Neumann corrector -> rnd_bits / rnd_n / rnd_valid.
// The tuning path runs on dclk, the DCMs' reference and DRP clock:
//   address_gen          5-bit index of one of the 23 stored (M, D) sets,
//   md_bram              the stored DRP words of both DCMs,
//   drp_controller       on drp_req writes the selected set into both DCMs.
// The two DCMs, their DRP ports, reset and locked signals are ports of this
// module, and so are the requests a controlling processor would make
// (set selection and drp_req) and the random output.
//
// Interface: rst_n is asynchronous and active low. en enables the DCMs:
// dcm_rst is high while en is low or while the controller reprograms them.
// The clk_b domain is held in reset until rst_n is high and both DCMs are
// locked, and is released two clk_b edges later. The outputs count_max,
// count_valid and rnd_* are synchronous to clk_b; the control and status
// ports to dclk.
//
// The block structure and connections follow the design; the reset
// handling across the two clock domains, the gating of the DCMs by en
// through their reset, and the status ports are this implementation's.
module dcm_trng_top
  import trng_pkg::*;
#(
  parameter int unsigned DFF_STAGES   = 1,
  parameter int unsigned RST_HOLD     = 3,
  parameter int unsigned LOCK_TIMEOUT = 65535
) (
  input  logic              dclk,
  input  logic              rst_n,
  input  logic              en,
  // set selection and tuning request (dclk domain)
  input  logic              sel_load,
  input  set_addr_t         sel_addr,
  input  logic              sel_next,
  input  logic              drp_req,
  output set_addr_t         set_addr,
  output logic              sel_err,
  output logic              tune_busy,
  output logic              tune_done,
  output logic              tune_lock_err,
  // DCM-A
  input  logic              clk_a,
  input  logic              dcm_a_locked,
  output logic [DRP_AW-1:0] dcm_a_daddr,
  output drp_word_t         dcm_a_di,
  output logic              dcm_a_den,
  output logic              dcm_a_dwe,
  input  logic              dcm_a_drdy,
  // DCM-B
  input  logic              clk_b,
  input  logic              dcm_b_locked,
  output logic [DRP_AW-1:0] dcm_b_daddr,
  output drp_word_t         dcm_b_di,
  output logic              dcm_b_den,
  output logic              dcm_b_dwe,
  input  logic              dcm_b_drdy,
  output logic              dcm_rst,
  // random output (clk_b domain)
  output count_t            count_max,
  output logic              count_valid,
  output logic              count_saturated,
  output logic [1:0]        rnd_bits,
  output logic [1:0]        rnd_n,
  output logic              rnd_valid
);

  // ---------------------------------------------------------------- tuning
  set_addr_t bram_addr;
  dcm_sel_t  bram_sel;
  drp_word_t bram_dout;
  logic      bram_en;
  logic      ctrl_dcm_rst;

  address_gen u_addr (
    .clk       (dclk),
    .rst_n     (rst_n),
    .load      (sel_load),
    .load_addr (sel_addr),
    .next      (sel_next),
    .addr      (set_addr),
    .load_err  (sel_err)
  );

  md_bram u_bram (
    .clk  (dclk),
    .en   (bram_en),
    .addr (bram_addr),
    .sel  (bram_sel),
    .dout (bram_dout)
  );

  drp_controller #(
    .RST_HOLD     (RST_HOLD),
    .LOCK_TIMEOUT (LOCK_TIMEOUT)
  ) u_ctrl (
    .clk       (dclk),
    .rst_n     (rst_n),
    .drp_req   (drp_req),
    .set_addr  (set_addr),
    .bram_en   (bram_en),
    .bram_addr (bram_addr),
    .bram_sel  (bram_sel),
    .bram_dout (bram_dout),
    .a_daddr   (dcm_a_daddr),
    .a_di      (dcm_a_di),
    .a_den     (dcm_a_den),
    .a_dwe     (dcm_a_dwe),
    .a_drdy    (dcm_a_drdy),
    .a_locked  (dcm_a_locked),
    .b_daddr   (dcm_b_daddr),
    .b_di      (dcm_b_di),
    .b_den     (dcm_b_den),
    .b_dwe     (dcm_b_dwe),
    .b_drdy    (dcm_b_drdy),
    .b_locked  (dcm_b_locked),
    .dcm_rst   (ctrl_dcm_rst),
    .busy      (tune_busy),
    .done      (tune_done),
    .lock_err  (tune_lock_err)
  );

  assign dcm_rst = ctrl_dcm_rst | ~en;

  // --------------------------------------------------------- entropy path
  logic   b_rst_n;
  logic   q;
  count_t count;

  reset_sync #(.STAGES(2)) u_bsync (
    .clk    (clk_b),
    .arst_n (rst_n & dcm_a_locked & dcm_b_locked),
    .rst_n  (b_rst_n)
  );

  beat_dff #(.STAGES(DFF_STAGES)) u_dff (
    .clk   (clk_b),
    .rst_n (b_rst_n),
    .a_clk (clk_a),
    .q     (q)
  );

  beat_counter u_cnt (
    .clk       (clk_b),
    .rst_n     (b_rst_n),
    .q         (q),
    .count     (count),     // running value, observed by the testbench
    .count_max (count_max),
    .max_valid (count_valid),
    .saturated (count_saturated)
  );

  post_processing_unit u_post (
    .clk       (clk_b),
    .rst_n     (b_rst_n),
    .in_valid  (count_valid),
    .in_count  (count_max),
    .out_bits  (rnd_bits),
    .out_n     (rnd_n),
    .out_valid (rnd_valid)
  );

endmodule
