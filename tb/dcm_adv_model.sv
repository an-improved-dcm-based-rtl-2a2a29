// dcm_adv_model - behavioural model of a Xilinx DCM_ADV frequency
// synthesiser with jitter, for simulation only (not synthesizable).
//
// CLKFX runs at F_CLKIN * M / D, where M and D start at CLKFX_MULTIPLY and
// CLKFX_DIVIDE and can be changed through the dynamic reconfiguration port:
// a write (DEN & DWE) to address 0x50 with DI = {M-1, D-1} takes effect at
// the next lock. DRDY answers every DEN after DRDY_DELAY DCLK cycles and DO
// returns the register. While RST is high CLKFX is held low and LOCKED
// low; LOCK_CYCLES CLKIN rising edges after RST falls the model locks and
// starts CLKFX on an ideal grid with period CLKIN_PERIOD * D / M. Every
// CLKFX edge is moved off that grid by an independent random amount: the sum
// of four uniform variables, scaled so that it spans exactly
// [-jitter_pp/2, +jitter_pp/2] (a bell shape with a standard deviation of
// about jitter_pp / 7). The jitter does not accumulate. It is what the TRNG
// harvests. jitter_pp starts at JITTER_PP (ns, peak to peak) and may be
// changed by a testbench at run time; the change applies from the next lock.
// The reference period is taken from CLKIN_PERIOD, not measured.
`timescale 1ns/1ps
module dcm_adv_model #(
  parameter real         CLKIN_PERIOD   = 10.0,
  parameter int unsigned CLKFX_MULTIPLY = 4,
  parameter int unsigned CLKFX_DIVIDE   = 1,
  parameter real         JITTER_PP      = 0.0,
  parameter int unsigned LOCK_CYCLES    = 16,
  parameter int unsigned DRDY_DELAY     = 2
) (
  input  logic        CLKIN,
  input  logic        RST,
  output logic        CLKFX,
  output logic        LOCKED,
  input  logic        DCLK,
  input  logic [6:0]  DADDR,
  input  logic [15:0] DI,
  input  logic        DEN,
  input  logic        DWE,
  output logic [15:0] DO,
  output logic        DRDY
);

  logic [7:0] m_minus1 = 8'(CLKFX_MULTIPLY - 1);
  logic [7:0] d_minus1 = 8'(CLKFX_DIVIDE - 1);
  int unsigned drdy_cnt = 0;
  int unsigned writes_running = 0;  // DRP writes while not in reset

  real jitter_pp = JITTER_PP;
  real jit_now;

  function automatic real jitter(real pp);
    real u;
    u = 0.0;
    for (int i = 0; i < 4; i++) u += real'($urandom % 100001) / 100000.0 - 0.5;
    return u * pp / 4.0;
  endfunction

  // Clock synthesis.
  initial begin
    real t0, half, target;
    longint k;
    CLKFX  = 1'b0;
    LOCKED = 1'b0;
    forever begin
      CLKFX  = 1'b0;
      LOCKED = 1'b0;
      if (RST) @(negedge RST);
      repeat (LOCK_CYCLES) @(posedge CLKIN);
      if (!RST) begin
        half   = CLKIN_PERIOD * real'(int'(d_minus1) + 1) / (2.0 * real'(int'(m_minus1) + 1));
        jit_now = jitter_pp;
        t0     = $realtime;
        k      = 0;
        LOCKED = 1'b1;
        while (!RST) begin
          k      = k + 1;
          target = t0 + real'(k) * half + jitter(jit_now);
          if (target > $realtime) #(target - $realtime);
          if (!RST) CLKFX = ~CLKFX;
        end
      end
    end
  end

  // Dynamic reconfiguration port.
  always @(posedge DCLK) begin
    DRDY <= 1'b0;
    if (drdy_cnt != 0) begin
      drdy_cnt <= drdy_cnt - 1;
      if (drdy_cnt == 1) DRDY <= 1'b1;
    end
    if (DEN) begin
      drdy_cnt <= DRDY_DELAY;
      if (DADDR == 7'h50) begin
        DO <= {m_minus1, d_minus1};
        if (DWE) begin
          m_minus1 <= DI[15:8];
          d_minus1 <= DI[7:0];
          if (!RST) writes_running <= writes_running + 1;
        end
      end else begin
        DO <= 16'h0000;
      end
    end
  end

  initial begin
    DRDY = 1'b0;
    DO   = 16'h0000;
  end

endmodule
