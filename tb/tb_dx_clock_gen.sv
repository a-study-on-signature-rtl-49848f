// Self-checking testbench for dx_clock_gen.
//
// For every ratio r from 0 to 31 the generator is restarted and its output is
// compared, clock by clock for 3 periods, with the expected wave: 0 for the
// first floor(r/2) clocks of each r-clock period and 1 for the remaining
// ceil(r/2), or constantly 0 for r < 2. It also checks that the wave holds
// while en is low, that restart returns it to the low half, the number of
// clocks per period (the rate f_reg / r) and the number of high clocks.
module tb_dx_clock_gen;
  logic       clk = 1'b0;
  logic       rst_n, en, restart, dx;
  logic [4:0] ratio;
  int         checks = 0, failures = 0;

  dx_clock_gen dut (.clk, .rst_n, .en, .restart, .ratio, .dx);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0; restart = 1'b0; ratio = 5'd2;
    repeat (2) @(posedge clk);
    #1 expect_bit(dx, 1'b0, "reset");
    @(negedge clk) rst_n = 1'b1;

    for (int r = 0; r < 32; r++) begin
      int highs, rises;
      @(negedge clk); ratio = 5'(r); restart = 1'b1; en = 1'b1;
      @(posedge clk); #1;
      @(negedge clk) restart = 1'b0;
      highs = 0; rises = 0;
      for (int k = 0; k < 3 * ((r < 2) ? 4 : r); k++) begin
        logic exp;
        exp = (r >= 2) && ((k % r) >= r / 2);
        expect_bit(dx, exp, $sformatf("r=%0d clock %0d", r, k));
        if (k < r && dx) highs++;
        if (k > 0 && k % r == 0 && r >= 2 && dx == 1'b0) rises++;
        @(posedge clk); #1;
      end
      if (r >= 2) begin
        checks++;
        if (highs != (r + 1) / 2) begin
          failures++; $display("FAIL r=%0d high clocks %0d", r, highs);
        end
        checks++;
        if (rises != 2) begin
          failures++; $display("FAIL r=%0d periods %0d", r, rises);
        end
      end
    end

    // Hold while disabled (r = 4: 0,0,1,1).
    @(negedge clk); ratio = 5'd4; restart = 1'b1;
    @(negedge clk); restart = 1'b0;
    @(posedge clk); @(posedge clk); #1;  // now at clock 2: high
    expect_bit(dx, 1'b1, "r=4 clock 2");
    @(negedge clk) en = 1'b0;
    repeat (5) @(posedge clk);
    #1 expect_bit(dx, 1'b1, "hold");
    @(negedge clk) en = 1'b1;
    @(posedge clk); #1 expect_bit(dx, 1'b1, "r=4 clock 3");
    @(posedge clk); #1 expect_bit(dx, 1'b0, "r=4 wrap");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
