// reset_sync - asynchronous-assert, synchronous-release reset.
//
// arst_n clears the STAGES-flop chain at once; the chain then shifts in ones
// on clk, so rst_n rises STAGES clk edges after arst_n has risen. Used to
// release the DCM-B clock domain cleanly once the DCMs are locked, since
// that clock stops while the DCMs are held in reset.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic arst_n,
  output logic rst_n
);

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) chain <= '0;
    else         chain <= STAGES'({chain, 1'b1});
  end

  assign rst_n = chain[STAGES-1];

endmodule
