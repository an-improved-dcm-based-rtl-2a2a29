// beat_counter - counts the beat interval and captures its peak value.
//
// The counter runs on the DCM-B clock. While the DFF output q is low it
// increments by one per cycle; while q is high it is held at zero. On the
// first cycle that q is seen high (the DFF has just set) the value the
// counter had reached is copied to count_max and max_valid pulses for one
// cycle. The peak is a random number because the DFF's transition time
// depends on the jitter of both DCMs. For the stored DCM settings the
// expected peak lies between 200 and 500.
//
// Interface: clk = DCM-B clock, rst_n asynchronous active-low reset, q from
// the DFF. count is the running value, count_max the last peak, max_valid
// the one-cycle strobe that marks a new peak (it rises with count_max).
// Timing: the peak is registered on the clk edge at which q is first
// sampled high, and count is zero from the next cycle on.
//
// The count-while-low / reset-while-high behaviour and the peak capture are
// the design's; the 9-bit width (enough for 480) and saturation at the top
// value instead of wrapping are this implementation's choices.
module beat_counter
  import trng_pkg::*;
#(
  parameter int unsigned W = COUNT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         q,
  output logic [W-1:0] count,
  output logic [W-1:0] count_max,
  output logic         max_valid,
  output logic         saturated
);

  logic q_d;

  assign saturated = &count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      count_max <= '0;
      max_valid <= 1'b0;
      q_d       <= 1'b1;
    end else begin
      q_d       <= q;
      max_valid <= 1'b0;
      if (q) begin
        count <= '0;
        if (!q_d) begin
          count_max <= count;
          max_valid <= 1'b1;
        end
      end else if (!saturated) begin
        count <= count + 1'b1;
      end
    end
  end

endmodule
