// Standard (external-XOR) LFSR signature analyzer.
//
// N flip-flops Q_{N-1} .. Q_0 form a shift register that moves one place
// towards Q_0 on every enabled register clock. The bit shifted into Q_{N-1}
// is the modulo-2 sum of the serial input D(X) and the feedback
// sum over i of C_i * Q_i, where C_i = TAPS[i]. Q_0 leaves as the serial
// output Q(X), and every stage is also brought out in parallel as
// R_i = Q_i. With D(X) held at 0 this is a conventional LFSR; with a CUT
// response on D(X) it compacts the stream into a signature; with a slow clock
// on D(X) it is the pattern generator of sa_tpg_top.
//
// This structure, the tap positions and the defaults (X^3 + X^2 + 1, seed 100)
// follow the source description. The asynchronous active-low reset to
// RESET_SEED, the synchronous seed load (priority over the enable) and the
// enable itself are this design's own choices.
//
// Timing: r_out and qx change only on a rising clk edge and show the state
// reached after that edge; dx is sampled at the same edge. One shift per
// enabled clock, no latency beyond the register itself.
module lfsr_sig_analyzer
  import sa_tpg_pkg::*;
#(
  parameter int unsigned    N          = DEF_N,
  parameter logic [N-1:0]   TAPS       = N'(DEF_TAPS),
  parameter logic [N-1:0]   RESET_SEED = N'(DEF_RESET_SEED)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         load,
  input  logic [N-1:0] seed,
  input  logic         dx,
  output logic [N-1:0] r_out,
  output logic         qx
);

  logic [N-1:0] q;
  logic         fb;

  // Modulo-2 sum of the tapped stages and the serial input.
  always_comb fb = dx ^ (^(q & TAPS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= RESET_SEED;
    else if (load) q <= seed;
    else if (en)   q <= {fb, q[N-1:1]};
  end

  assign r_out = q;
  assign qx    = q[0];

endmodule
