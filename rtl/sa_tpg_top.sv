// Signature-analyzer test pattern generator (TPG).
//
// An N-stage standard LFSR signature analyzer (lfsr_sig_analyzer) has its
// serial input D(X) driven by a slow symmetric clock (dx_clock_gen) whose
// period is r register clocks. Because D(X) keeps perturbing the feedback, the
// register no longer repeats after 2^N - 1 clocks: with X^3 + X^2 + 1 the
// pattern sequence grows from 7 to 7*r patterns when r is not a multiple of 7
// (14 for r = 7, r for r = 14 or 28). The patterns are still drawn from the
// same 2^N states, now including all zeros, which the register both enters and
// leaves on its own. Some seeds fall into short "trivial" cycles for a given r
// (for r = 2, seed 101 alternates 101, 010); the seed must avoid them.
//
// Mode: ratio >= 2 runs the generator described above; ratio 0 or 1 holds
// D(X) at 0 and the block is a conventional maximum-length LFSR.
//
// Interface: pattern = R_{N-1}..R_0 (the stage outputs, Q_{N-1} first),
// qx = serial output Q(X) = Q_0, dx = the D(X) value the LFSR samples at the
// next rising edge. load (synchronous) takes seed and restarts the D(X) wave
// at the start of its low half; en advances both by one register clock.
// rst_n is asynchronous, active low, and starts from RESET_SEED.
//
// Timing: one new pattern per enabled register clock, visible right after the
// rising edge. The analyzer structure and the defaults (3 stages,
// X^3 + X^2 + 1, seed 100) follow the source description; generating D(X) on
// chip from the register clock, the mode, load and enable are this design's
// own choices.
module sa_tpg_top
  import sa_tpg_pkg::*;
#(
  parameter int unsigned  N          = DEF_N,
  parameter logic [N-1:0] TAPS       = N'(DEF_TAPS),
  parameter logic [N-1:0] RESET_SEED = N'(DEF_RESET_SEED),
  parameter int unsigned  RATIO_W    = DEF_RATIO_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               load,
  input  logic [N-1:0]       seed,
  input  logic [RATIO_W-1:0] ratio,
  output logic [N-1:0]       pattern,
  output logic               qx,
  output logic               dx
);

  dx_clock_gen #(
    .RATIO_W (RATIO_W)
  ) u_dx_gen (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (en),
    .restart (load),
    .ratio   (ratio),
    .dx      (dx)
  );

  lfsr_sig_analyzer #(
    .N          (N),
    .TAPS       (TAPS),
    .RESET_SEED (RESET_SEED)
  ) u_sa (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .load  (load),
    .seed  (seed),
    .dx    (dx),
    .r_out (pattern),
    .qx    (qx)
  );

endmodule
