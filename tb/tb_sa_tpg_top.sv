// End-to-end testbench for sa_tpg_top at its default parameters
// (3 stages, X^3 + X^2 + 1, reset seed 100, 5-bit ratio).
//
// 1. Conventional mode (ratio 0) from seed 100: 28 patterns, period 7.
// 2. r = 2 from seed 100: the 28 patterns of the published example, period 14,
//    passing through and leaving the all-zeros state.
// 3. The clock-ratio sweep: for each r of the published sweep the period of
//    the pattern sequence is measured for every seed; the longest must equal
//    the expected length, and the period from each seed must equal the one
//    given by a bit-level reference model kept in this file.
// 4. Trivial cycles: seed 101 at r = 2 (101, 010), seed 001 at r = 4
//    (001, 100, 110, 011), seed 011 at r = 3 (011, 101, 110).
// 5. Enable low holds pattern and D(X) phase.
// Each mechanism (conventional mode, extended sequence, all-zeros entered and
// left, trivial cycle, hold) is counted; one that never happened is a failure.
module tb_sa_tpg_top;
  logic       clk = 1'b0;
  logic       rst_n, en, load, qx, dx;
  logic [2:0] seed, pattern;
  logic [4:0] ratio;
  int         checks = 0, failures = 0;

  int n_conv = 0, n_extended = 0, n_zero_in = 0, n_zero_out = 0;
  int n_trivial = 0, n_hold = 0;

  localparam int CAPTURE = 240;
  logic [2:0] trace [CAPTURE];

  sa_tpg_top dut (.clk, .rst_n, .en, .load, .seed, .ratio, .pattern, .qx, .dx);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_int(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Load a seed at a ratio, then record CAPTURE consecutive patterns,
  // trace[0] being the seed itself.
  task automatic run(input logic [2:0] s, input int r);
    @(negedge clk);
    load = 1'b1; en = 1'b1; seed = s; ratio = 5'(r);
    @(posedge clk); #1;
    @(negedge clk) load = 1'b0;
    for (int k = 0; k < CAPTURE; k++) begin
      trace[k] = pattern;
      if (k > 0 && trace[k] == 3'b000 && trace[k-1] != 3'b000) n_zero_in++;
      if (k > 0 && trace[k] != 3'b000 && trace[k-1] == 3'b000) n_zero_out++;
      @(posedge clk); #1;
    end
  endtask

  // Smallest P such that the captured trace repeats with period P.
  function automatic int trace_period();
    for (int p = 1; p < CAPTURE / 2; p++) begin
      bit ok = 1'b1;
      for (int i = 0; i + p < CAPTURE; i++)
        if (trace[i] != trace[i + p]) ok = 1'b0;
      if (ok) return p;
    end
    return -1;
  endfunction

  // Reference: D(X) low for floor(r/2) clocks then high for ceil(r/2),
  // next Q2 = Q2 ^ Q0 ^ D(X); the pair (state, phase) is a permutation, so
  // the pattern period is found by stepping until the trace repeats.
  function automatic int model_period(input logic [2:0] s0, input int r);
    logic [2:0] st [CAPTURE];
    logic [2:0] s = s0;
    for (int k = 0; k < CAPTURE; k++) begin
      logic d;
      st[k] = s;
      d = (r >= 2) && ((k % r) >= r / 2);
      s = {s[2] ^ s[0] ^ d, s[2:1]};
    end
    for (int p = 1; p < CAPTURE / 2; p++) begin
      bit ok = 1'b1;
      for (int i = 0; i + p < CAPTURE; i++)
        if (st[i] != st[i + p]) ok = 1'b0;
      if (ok) return p;
    end
    return -1;
  endfunction

  localparam logic [2:0] CONV [28] = '{
    3'b100, 3'b110, 3'b111, 3'b011, 3'b101, 3'b010, 3'b001,
    3'b100, 3'b110, 3'b111, 3'b011, 3'b101, 3'b010, 3'b001,
    3'b100, 3'b110, 3'b111, 3'b011, 3'b101, 3'b010, 3'b001,
    3'b100, 3'b110, 3'b111, 3'b011, 3'b101, 3'b010, 3'b001};
  localparam logic [2:0] PROP [28] = '{
    3'b100, 3'b110, 3'b011, 3'b101, 3'b110, 3'b111, 3'b111,
    3'b011, 3'b001, 3'b100, 3'b010, 3'b001, 3'b000, 3'b000,
    3'b100, 3'b110, 3'b011, 3'b101, 3'b110, 3'b111, 3'b111,
    3'b011, 3'b001, 3'b100, 3'b010, 3'b001, 3'b000, 3'b000};

  // Clock-ratio sweep and the longest sequence length for each r.
  // r = 21 gives 42 here (the wave is not balanced over 21 clocks);
  // the published sweep lists 21.
  localparam int SWEEP_R   [11] = '{2, 3, 4, 5, 6, 7, 8, 10, 14, 21, 28};
  localparam int SWEEP_LEN [11] = '{14, 21, 28, 35, 42, 14, 56, 70, 14, 42, 28};

  initial begin
    rst_n = 1'b0; en = 1'b0; load = 1'b0; seed = 3'b000; ratio = 5'd0;
    repeat (2) @(posedge clk);
    #1 check_int(int'(pattern), 4, "reset seed 100");
    @(negedge clk) rst_n = 1'b1;

    // 1. Conventional LFSR.
    run(3'b100, 0);
    for (int k = 0; k < 28; k++) check_int(int'(trace[k]), int'(CONV[k]), $sformatf("conv row %0d", k));
    check_int(trace_period(), 7, "conventional period");
    if (trace_period() == 7) n_conv++;

    // 2. r = 2 example.
    run(3'b100, 2);
    for (int k = 0; k < 28; k++) check_int(int'(trace[k]), int'(PROP[k]), $sformatf("r=2 row %0d", k));
    check_int(trace_period(), 14, "r=2 period");

    // 3. Ratio sweep over every seed.
    for (int i = 0; i < 11; i++) begin
      int longest;
      longest = 0;
      for (int s = 0; s < 8; s++) begin
        int p;
        run(3'(s), SWEEP_R[i]);
        p = trace_period();
        check_int(p, model_period(3'(s), SWEEP_R[i]), $sformatf("r=%0d seed %b period", SWEEP_R[i], 3'(s)));
        if (p > longest) longest = p;
        if (p > 7) n_extended++;
      end
      check_int(longest, SWEEP_LEN[i], $sformatf("r=%0d longest sequence", SWEEP_R[i]));
      $display("r=%0d longest sequence %0d", SWEEP_R[i], longest);
    end

    // 4. Trivial cycles.
    run(3'b101, 2);
    check_int(trace_period(), 2, "r=2 trivial 101");
    check_int(int'(trace[1]), 3'b010, "r=2 trivial 101 -> 010");
    if (trace_period() == 2) n_trivial++;
    run(3'b001, 4);
    check_int(trace_period(), 4, "r=4 trivial 001");
    check_int(int'({trace[1], trace[2], trace[3]}), int'({3'b100, 3'b110, 3'b011}), "r=4 trivial path");
    if (trace_period() == 4) n_trivial++;
    run(3'b011, 3);
    check_int(trace_period(), 3, "r=3 trivial 011");
    check_int(int'({trace[1], trace[2]}), int'({3'b101, 3'b110}), "r=3 trivial path");
    if (trace_period() == 3) n_trivial++;

    // 5. Hold: r = 4 from 100, stop after two clocks for five clocks.
    @(negedge clk); load = 1'b1; en = 1'b1; seed = 3'b100; ratio = 5'd4;
    @(negedge clk); load = 1'b0;
    @(negedge clk);
    @(negedge clk) en = 1'b0;             // after 2 shifts: 100 -0-> 110 -0-> 111
    repeat (5) @(negedge clk);
    check_int(int'(pattern), 3'b111, "hold pattern");
    check_int(int'(dx), 1, "hold D(X) phase");
    if (pattern == 3'b111 && dx) n_hold++;
    en = 1'b1;
    @(negedge clk);                        // 111 -1-> 111
    @(negedge clk);                        // 111 -1-> 111, wave wraps
    check_int(int'(pattern), 3'b111, "resume");
    check_int(int'(dx), 0, "resume D(X) wrap");

    $display("mechanisms: conventional=%0d extended=%0d zero_entered=%0d zero_left=%0d trivial=%0d hold=%0d",
             n_conv, n_extended, n_zero_in, n_zero_out, n_trivial, n_hold);
    check_int(int'(n_conv > 0), 1, "conventional mode exercised");
    check_int(int'(n_extended > 0), 1, "extended sequence exercised");
    check_int(int'(n_zero_in > 0), 1, "all-zeros state entered");
    check_int(int'(n_zero_out > 0), 1, "all-zeros state left");
    check_int(int'(n_trivial > 0), 1, "trivial cycle exercised");
    check_int(int'(n_hold > 0), 1, "hold exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
