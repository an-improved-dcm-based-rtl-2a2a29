// drp_controller - writes a stored (M, D) set into both DCMs.
//
// On drp_req the controller reads the two words of the current set from
// the settings BRAM (DCM-A's word, then DCM-B's) and reprograms both DCMs
// through their dynamic reconfiguration ports:
//   1. hold both DCMs in reset (dcm_rst) for RST_HOLD cycles,
//   2. write each word to DRP register DRP_MD_ADDR with a one-cycle
//      den/dwe strobe on both ports at once,
//   3. wait until each port has answered with drdy,
//   4. release the reset and wait until both DCMs report locked.
// done pulses for one cycle at the end; busy is high from the request to
// done. Requests that arrive while busy are ignored. If a DCM does not lock
// within LOCK_TIMEOUT cycles the controller gives up, pulses done with
// lock_err set, and leaves the DCMs running unlocked.
//
// Interface: all signals are synchronous to clk, the DRP clock (also the
// DCMs' reference clock), with rst_n asynchronous active low. The BRAM read
// has one cycle of latency. The DRP buses follow the DCM_ADV primitive
// (daddr 7 bits, di 16 bits, den, dwe, drdy). Only the M/D register is
// ever written, so both daddr outputs are the constant DRP_MD_ADDR.
//
// That a controller reads the BRAM and programs both DCMs over DRP on
// request is the design's. The step sequence above is the usual Xilinx one
// for changing a DCM's M and D; the state machine, the simultaneous writes,
// RST_HOLD and the lock timeout are this implementation's choices.
module drp_controller
  import trng_pkg::*;
#(
  parameter int unsigned RST_HOLD     = 3,
  parameter int unsigned LOCK_TIMEOUT = 65535
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              drp_req,
  input  set_addr_t         set_addr,
  // settings BRAM read port
  output logic              bram_en,
  output set_addr_t         bram_addr,
  output dcm_sel_t          bram_sel,
  input  drp_word_t         bram_dout,
  // DCM-A DRP port
  output logic [DRP_AW-1:0] a_daddr,
  output drp_word_t         a_di,
  output logic              a_den,
  output logic              a_dwe,
  input  logic              a_drdy,
  input  logic              a_locked,
  // DCM-B DRP port
  output logic [DRP_AW-1:0] b_daddr,
  output drp_word_t         b_di,
  output logic              b_den,
  output logic              b_dwe,
  input  logic              b_drdy,
  input  logic              b_locked,
  // reset of both DCMs
  output logic              dcm_rst,
  // status
  output logic              busy,
  output logic              done,
  output logic              lock_err
);

  typedef enum logic [2:0] {
    S_IDLE, S_RD_A, S_RD_B, S_CAP_B, S_RST, S_WAIT_RDY, S_WAIT_LOCK
  } state_t;

  state_t    state;
  set_addr_t set_q;
  drp_word_t word_a, word_b;
  logic      rdy_a, rdy_b;
  logic [31:0] timer;

  assign busy      = (state != S_IDLE);
  assign bram_addr = set_q;
  assign a_daddr   = DRP_MD_ADDR;
  assign b_daddr   = DRP_MD_ADDR;
  assign a_di      = word_a;
  assign b_di      = word_b;

  always_comb begin
    bram_en  = 1'b0;
    bram_sel = DCM_A;
    if (state == S_RD_A) begin
      bram_en  = 1'b1;
      bram_sel = DCM_A;
    end else if (state == S_RD_B) begin
      bram_en  = 1'b1;
      bram_sel = DCM_B;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      set_q    <= '0;
      word_a   <= '0;
      word_b   <= '0;
      rdy_a    <= 1'b0;
      rdy_b    <= 1'b0;
      timer    <= '0;
      a_den    <= 1'b0;
      a_dwe    <= 1'b0;
      b_den    <= 1'b0;
      b_dwe    <= 1'b0;
      dcm_rst  <= 1'b0;
      done     <= 1'b0;
      lock_err <= 1'b0;
    end else begin
      a_den <= 1'b0;
      a_dwe <= 1'b0;
      b_den <= 1'b0;
      b_dwe <= 1'b0;
      done  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (drp_req) begin
            set_q    <= set_addr;
            lock_err <= 1'b0;
            state    <= S_RD_A;
          end
        end
        S_RD_A: state <= S_RD_B;              // read of DCM-A's word issued
        S_RD_B: begin                         // DCM-A's word arrives
          word_a <= bram_dout;
          state  <= S_CAP_B;
        end
        S_CAP_B: begin                        // DCM-B's word arrives
          word_b  <= bram_dout;
          dcm_rst <= 1'b1;
          timer   <= '0;
          state   <= S_RST;
        end
        S_RST: begin
          timer <= timer + 1;
          if (timer + 1 >= RST_HOLD) begin
            a_den <= 1'b1;
            a_dwe <= 1'b1;
            b_den <= 1'b1;
            b_dwe <= 1'b1;
            rdy_a <= 1'b0;
            rdy_b <= 1'b0;
            state <= S_WAIT_RDY;
          end
        end
        S_WAIT_RDY: begin
          if (a_drdy) rdy_a <= 1'b1;
          if (b_drdy) rdy_b <= 1'b1;
          if ((rdy_a || a_drdy) && (rdy_b || b_drdy)) begin
            dcm_rst <= 1'b0;
            timer   <= '0;
            state   <= S_WAIT_LOCK;
          end
        end
        S_WAIT_LOCK: begin
          timer <= timer + 1;
          if (a_locked && b_locked) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else if (timer >= LOCK_TIMEOUT) begin
            done     <= 1'b1;
            lock_err <= 1'b1;
            state    <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A DRP strobe is a single cycle and is only issued with the DCMs in reset.
  a_strobe_in_reset: assert property (@(posedge clk) disable iff (!rst_n)
    a_den |-> (a_dwe && dcm_rst && $past(!a_den)));
  b_strobe_in_reset: assert property (@(posedge clk) disable iff (!rst_n)
    b_den |-> (b_dwe && dcm_rst && $past(!b_den)));

endmodule
