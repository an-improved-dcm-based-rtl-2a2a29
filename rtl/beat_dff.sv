// beat_dff - beat frequency detector flip-flop.
//
// The faster DCM-A clock is wired to the D input and sampled on every rising
// edge of the slower DCM-B clock. Because DCM-A gains (T_B - T_A) of phase on
// every DCM-B period, the sampled value stays high for about half of each
// beat interval and low for the other half; DCM jitter makes the moment of
// each transition random. Q drives the counter's reset.
//
// Interface: clk is DCM-B's output, a_clk is DCM-A's output (used as data),
// q is the sampled level. Timing: q is a_clk as seen STAGES rising clk edges
// earlier. rst_n is an asynchronous, active-low reset that clears the chain.
//
// The single flip-flop (STAGES = 1) is the structure of the design. Setting
// STAGES above 1 cascades further flip-flops behind it to let metastability
// settle, as suggested for the DFF; the reset is this implementation's choice.
module beat_dff #(
  parameter int unsigned STAGES = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a_clk,
  output logic q
);

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chain <= '0;
    else        chain <= STAGES'({chain, a_clk});
  end

  assign q = chain[STAGES-1];

  initial assert (STAGES >= 1) else $error("beat_dff: STAGES must be at least 1");

endmodule
