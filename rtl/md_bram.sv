// md_bram - block RAM holding the safe DCM settings.
//
// Two 16-bit words per set: word 2k is the DRP value for DCM-A of set k and
// word 2k+1 the value for DCM-B, so the BRAM address is the 5-bit set
// address with the DCM select appended as its least significant bit. Each
// word is already in DCM_ADV DRP format, {M-1, D-1}. The contents are fixed
// at configuration time from trng_pkg::md_table(); there is no write port,
// which keeps the settings the DCMs can receive limited to the stored ones.
// Unused words read as zero.
//
// Interface: clk (DRP clock), en read enable, addr set address, sel which
// DCM. Timing: synchronous read, dout is valid on the clk edge after
// en is sampled high, and holds its value while en is low.
//
// Storing the 23 safe settings in a BRAM with a 5-bit set address and 16-bit
// words is the design's; the word layout and the two-words-per-set
// arrangement are this implementation's choices.
module md_bram
  import trng_pkg::*;
#(
  parameter int unsigned SETS = NUM_SETS
) (
  input  logic      clk,
  input  logic      en,
  input  set_addr_t addr,
  input  dcm_sel_t  sel,
  output drp_word_t dout
);

  localparam int unsigned DEPTH = 2 ** BRAM_AW;

  drp_word_t mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = '0;
    for (int unsigned k = 0; k < SETS; k++) begin
      md_set_t s;
      s            = md_table(k);
      mem[2*k]     = drp_encode(s.a);
      mem[2*k + 1] = drp_encode(s.b);
    end
  end

  always_ff @(posedge clk) begin
    if (en) dout <= mem[{addr, sel}];
  end

endmodule
