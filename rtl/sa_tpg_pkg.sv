// Shared constants of the signature-analyzer test pattern generator.
//
// The defaults describe the worked example the generator is built around: a
// 3-stage standard LFSR with characteristic polynomial X^3 + X^2 + 1, started
// from the seed Q2Q1Q0 = 100. TAPS bit i is the feedback coefficient C_i of
// X^i (the coefficient of X^N is always 1), so X^3 + X^2 + 1 sets C2 and C0.
// The ratio width is this design's own choice: five bits hold every clock
// ratio up to 31.
package sa_tpg_pkg;

  localparam int unsigned DEF_N          = 3;
  localparam logic [2:0]  DEF_TAPS       = 3'b101;  // C2=1, C1=0, C0=1
  localparam logic [2:0]  DEF_RESET_SEED = 3'b100;  // Q2Q1Q0 = 100
  localparam int unsigned DEF_RATIO_W    = 5;

endpackage
