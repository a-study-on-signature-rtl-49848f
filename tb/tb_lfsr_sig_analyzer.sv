// Self-checking testbench for lfsr_sig_analyzer at its default size
// (3 stages, X^3 + X^2 + 1, reset seed 100).
//
// Checks, each against numbers written out here rather than taken from the
// block: the reset value; the 28 rows of the conventional sequence (D(X) = 0)
// and of the r = 2 sequence (D(X) = 0,1,0,1,...) from seed 100; all sixteen
// arrows of the state diagram (every state under D(X) = 0 and 1); the
// two-state trap 101 <-> 010 under an alternating input; seed load priority
// over enable and holding while disabled; and the signature left by 200
// random input bits against a bit-level model of X^3 + X^2 + 1. A second,
// 4-stage instance (X^4 + X^3 + 1) checks the parameterised length. Stimulus
// changes on the falling edge; outputs are checked after the rising edge.
module tb_lfsr_sig_analyzer;
  logic       clk = 1'b0;
  logic       rst_n, en, load, dx;
  logic [2:0] seed, r_out;
  logic       qx;
  int         checks = 0, failures = 0;

  lfsr_sig_analyzer dut (.clk, .rst_n, .en, .load, .seed, .dx, .r_out, .qx);

  // A second length: 4 stages, X^4 + X^3 + 1 (C3 = C0 = 1), seed 0001.
  logic [3:0] r4;
  logic       qx4;
  lfsr_sig_analyzer #(.N(4), .TAPS(4'b1001), .RESET_SEED(4'b0001)) dut4 (
    .clk, .rst_n, .en, .load(1'b0), .seed(4'b0000), .dx, .r_out(r4), .qx(qx4));

  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [2:0] got, input logic [2:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  // One enabled clock with the given serial input.
  task automatic shift(input logic d);
    @(negedge clk);
    en = 1'b1; load = 1'b0; dx = d;
    @(posedge clk); #1;
  endtask

  task automatic load_seed(input logic [2:0] s);
    @(negedge clk);
    load = 1'b1; en = 1'b0; seed = s; dx = 1'b0;
    @(posedge clk); #1;
    load = 1'b0;
  endtask

  // Table 1, rows 0..27, Q2Q1Q0.
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
  // State diagram: next state for input 0 and input 1, indexed by Q2Q1Q0.
  localparam logic [2:0] NEXT0 [8] = '{
    3'b000, 3'b100, 3'b001, 3'b101, 3'b110, 3'b010, 3'b111, 3'b011};
  localparam logic [2:0] NEXT1 [8] = '{
    3'b100, 3'b000, 3'b101, 3'b001, 3'b010, 3'b110, 3'b011, 3'b111};

  logic [2:0] model;

  initial begin
    rst_n = 1'b0; en = 1'b0; load = 1'b0; dx = 1'b0; seed = 3'b000;
    repeat (2) @(posedge clk);
    #1 check(r_out, 3'b100, "reset seed");
    @(negedge clk) rst_n = 1'b1;

    // Conventional LFSR: D(X) = 0.
    check(r_out, CONV[0], "conv row 0");
    for (int k = 1; k < 28; k++) begin
      shift(1'b0);
      check(r_out, CONV[k], $sformatf("conv row %0d", k));
      checks++;
      if (qx !== CONV[k][0]) begin failures++; $display("FAIL qx row %0d", k); end
    end

    // Proposed TPG, r = 2: D(X) = 0 at clock 0, then alternating.
    load_seed(3'b100);
    check(r_out, PROP[0], "r=2 row 0");
    for (int k = 1; k < 28; k++) begin
      shift(1'((k - 1) % 2));
      check(r_out, PROP[k], $sformatf("r=2 row %0d", k));
    end

    // Every arrow of the state diagram.
    for (int s = 0; s < 8; s++) begin
      load_seed(3'(s));
      shift(1'b0);
      check(r_out, NEXT0[s], $sformatf("arrow %b -0->", 3'(s)));
      load_seed(3'(s));
      shift(1'b1);
      check(r_out, NEXT1[s], $sformatf("arrow %b -1->", 3'(s)));
    end

    // Trap: 101 under 0,1,0,1,... stays within {101, 010}.
    load_seed(3'b101);
    for (int k = 0; k < 10; k++) begin
      shift(1'(k % 2));
      check(r_out, (k % 2 == 0) ? 3'b010 : 3'b101, "trivial 101/010");
    end

    // Load wins over enable; disabled register holds.
    @(negedge clk); load = 1'b1; en = 1'b1; seed = 3'b011; dx = 1'b1;
    @(posedge clk); #1 check(r_out, 3'b011, "load priority");
    @(negedge clk); load = 1'b0; en = 1'b0; dx = 1'b1;
    repeat (3) @(posedge clk);
    #1 check(r_out, 3'b011, "hold while disabled");

    // 4-stage instance: with D(X) = 0 it must visit all 15 non-zero states
    // and return to its seed after exactly 15 clocks.
    rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    begin
      bit [15:0] seen;
      int        first_return;
      seen = '0;
      first_return = 0;
      for (int k = 1; k <= 20; k++) begin
        seen[r4] = 1'b1;
        shift(1'b0);
        if (r4 == 4'b0001 && first_return == 0) first_return = k;
      end
      check(3'(first_return == 15), 3'd1, "4-stage period 15");
      check(3'(seen == 16'hFFFE), 3'd1, "4-stage visits all non-zero states");
    end

    // Signature of a random stream against a bit-level model.
    load_seed(3'b000);
    model = 3'b000;
    for (int k = 0; k < 200; k++) begin
      logic d;
      d = 1'($urandom_range(1));
      model = {d ^ model[2] ^ model[0], model[2:1]};
      shift(d);
    end
    check(r_out, model, "random-stream signature");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
