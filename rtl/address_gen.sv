// address_gen - selects which stored (M, D) set is programmed next.
//
// Holds the 5-bit set address that drives the settings BRAM. A load writes
// a new address; a next request steps to the following set, wrapping after
// the last one. Addresses at or above NUM_SETS are refused (load_err pulses
// and the address is kept), so the DCMs can only ever receive one of the
// stored safe settings.
//
// Interface: clk/rst_n (asynchronous, active low) of the DRP clock domain;
// load with load_addr, or next, as one-cycle requests (load wins). addr is
// the registered set address, 0 after reset. Timing: addr changes on the clk
// edge that samples the request.
//
// The 5-bit address and stepping through the stored sets on demand are the
// design's; the load port, the wrap-around and the refusal of out-of-range
// addresses are this implementation's choices.
module address_gen
  import trng_pkg::*;
#(
  parameter int unsigned SETS = NUM_SETS
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load,
  input  set_addr_t load_addr,
  input  logic      next,
  output set_addr_t addr,
  output logic      load_err
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr     <= '0;
      load_err <= 1'b0;
    end else begin
      load_err <= 1'b0;
      if (load) begin
        if (32'(load_addr) < SETS) addr <= load_addr;
        else                       load_err <= 1'b1;
      end else if (next) begin
        if (32'(addr) >= SETS - 1) addr <= '0;
        else                       addr <= addr + 1'b1;
      end
    end
  end

  initial assert (SETS >= 1 && SETS <= 2 ** SET_AW)
    else $error("address_gen: SETS out of range");

endmodule
