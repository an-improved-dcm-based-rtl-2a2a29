// post_processing_unit - Von Neumann corrector on the low bits of each peak.
//
// Every peak count delivers its LSBS least significant bits (3 by default)
// into one continuous bit stream, least significant bit first. The stream is
// cut into non-overlapping pairs: a pair "00" or "11" is dropped, a pair
// "01" or "10" yields its first bit. This removes bias from the stream at the
// cost of throughput (at least half of the bits are discarded).
//
// With an odd number of bits per peak, a pair can straddle two peaks; the
// unpaired last bit is kept in a one-bit register and paired with the first
// bit of the next peak. Each in_valid can therefore yield 0 to NOUT bits.
//
// Interface: clk/rst_n as the counter; in_valid and in_count come from the
// counter's max_valid and count_max. out_bits holds the corrected bits, the
// oldest in bit 0, out_n says how many are valid and out_valid = (out_n != 0).
// Timing: one register stage; outputs appear the cycle after in_valid.
// Only the LSBS low bits of in_count are used; the full count is accepted
// so that the unit connects directly to the counter.
//
// Taking three LSBs and the Von Neumann rule are the design's; the bit
// order, the carrying of an odd bit across peaks and the parallel output
// format are this implementation's choices.
module post_processing_unit
  import trng_pkg::*;
#(
  parameter int unsigned W    = COUNT_W,
  parameter int unsigned LSBS = RAND_LSBS,
  localparam int unsigned NOUT = (LSBS + 1) / 2,
  localparam int unsigned NW   = $clog2(NOUT + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [W-1:0]    in_count,
  output logic [NOUT-1:0] out_bits,
  output logic [NW-1:0]   out_n,
  output logic            out_valid
);

  typedef struct packed {
    logic [NOUT-1:0] bits;
    logic [NW-1:0]   n;
    logic            pend_v;
    logic            pend_b;
  } vn_result_t;

  // Pairs up {pending bit, new bits} and applies the Von Neumann rule.
  function automatic vn_result_t vn_step(logic pv, logic pb, logic [LSBS-1:0] in_bits);
    vn_result_t  r;
    logic [LSBS:0] seq;
    int unsigned len, n;
    if (pv) begin
      seq = {in_bits, pb};
      len = LSBS + 1;
    end else begin
      seq = {1'b0, in_bits};
      len = LSBS;
    end
    r.bits = '0;
    n = 0;
    for (int unsigned i = 0; i < NOUT; i++) begin
      if (2 * i + 1 < len && seq[2*i] != seq[2*i+1]) begin
        r.bits[n] = seq[2*i];
        n = n + 1;
      end
    end
    r.n      = NW'(n);
    r.pend_v = len[0];
    r.pend_b = seq[len-1];
    return r;
  endfunction

  logic       pend_v, pend_b;
  vn_result_t nxt;

  assign nxt = vn_step(pend_v, pend_b, in_count[LSBS-1:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_v    <= 1'b0;
      pend_b    <= 1'b0;
      out_bits  <= '0;
      out_n     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_n     <= '0;
      if (in_valid) begin
        pend_v    <= nxt.pend_v;
        pend_b    <= nxt.pend_b;
        out_bits  <= nxt.bits;
        out_n     <= nxt.n;
        out_valid <= (nxt.n != '0);
      end
    end
  end

endmodule
