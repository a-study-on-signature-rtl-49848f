// D(X) clock generator: a symmetric square wave r register clocks long.
//
// The pattern generator drives the signature analyzer's serial input with a
// clock whose frequency is f_reg / r. Here that clock is derived from the
// register clock by a modulo-r counter, so the LFSR samples a synchronous,
// glitch-free signal. Within each period of r clocks the wave is low for
// floor(r/2) clocks and then high for ceil(r/2) clocks; for odd r the extra
// clock goes to the high half. After reset or restart the wave begins at the
// start of its low half. A ratio of 0 or 1 holds dx at 0, which turns the
// analyzer back into a conventional LFSR.
//
// The ratio r and the symmetric wave follow the source description; the
// counter, the starting phase, the odd-r split and the r < 2 behaviour are
// this design's own choices. The starting phase reproduces the published
// r = 2 sequence from seed 100.
//
// Timing: dx is a flip-flop output. While en is high it holds the value for
// the current register clock, i.e. the value the LFSR samples at the next
// rising edge. restart takes effect at the next edge, after which dx is 0
// (for r >= 2). Changing ratio mid-wave takes effect from the next counter
// wrap or at once if the count already exceeds the new period.
module dx_clock_gen
  import sa_tpg_pkg::*;
#(
  parameter int unsigned RATIO_W = DEF_RATIO_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               restart,
  input  logic [RATIO_W-1:0] ratio,
  output logic               dx
);

  logic [RATIO_W-1:0] cnt, cnt_next;
  logic               dx_next;
  logic               active;

  always_comb begin
    active   = (ratio >= RATIO_W'(2));
    cnt_next = (cnt >= ratio - RATIO_W'(1)) ? '0 : cnt + RATIO_W'(1);
    // Low for the first floor(r/2) clocks of the period, high for the rest.
    dx_next  = active && (cnt_next >= (ratio >> 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      dx  <= 1'b0;
    end else if (restart) begin
      cnt <= '0;
      dx  <= 1'b0;
    end else if (en) begin
      cnt <= active ? cnt_next : '0;
      dx  <= dx_next;
    end
  end

endmodule
