// tb_divider: every dividend/divisor pair of the clocked divider. For each pair
// it pulses start, counts the clock cycles until done rises and checks that
// count (quotient + 1, or 1 for a zero divisor), the quotient and the remainder
// against integer division. It also checks that done holds, that a start held
// for several cycles restarts cleanly, and that rst in mid-division clears it.
module tb_divider;
  import calc_pkg::*;
  logic     clk = 1'b0, rst, start;
  operand_t num, den;
  result_t  quot, rem;
  logic     done;
  int checks = 0, failures = 0;

  divider dut (.clk(clk), .rst(rst), .start(start), .num(num), .den(den),
               .quot(quot), .rem(rem), .done(done));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Pulse start for `hold` cycles, then wait for done; returns the cycles taken.
  task automatic divide(input int n, input int d, input int hold, output int cycles);
    @(negedge clk);
    num = operand_t'(n);
    den = operand_t'(d);
    start = 1'b1;
    repeat (hold) @(negedge clk);
    start = 1'b0;
    num = '0;          // operands are latched at start
    den = '0;
    cycles = 0;
    do begin
      @(posedge clk);
      cycles++;
      #1;
    end while (!done && cycles < 40);
  endtask

  initial begin
    int cycles, q, r;
    rst = 1'b1; start = 1'b0; num = '0; den = '0;
    repeat (2) @(posedge clk);
    #1;
    check(!done && quot == 0, "reset state");
    @(negedge clk);
    rst = 1'b0;

    for (int n = 0; n < 16; n++)
      for (int d = 0; d < 16; d++) begin
        divide(n, d, 1 + (n + d) % 3, cycles);
        q = (d == 0) ? 255 : n / d;
        r = (d == 0) ? n : n % d;
        check(done, $sformatf("%0d / %0d never done", n, d));
        check(cycles == ((d == 0) ? 1 : q + 1),
              $sformatf("%0d / %0d took %0d cycles", n, d, cycles));
        check(quot == result_t'(q) && rem == result_t'(r),
              $sformatf("%0d / %0d -> q=%0d r=%0d", n, d, quot, rem));
        // done and the answer hold until the next start
        repeat (3) @(posedge clk);
        #1;
        check(done && quot == result_t'(q), $sformatf("%0d / %0d did not hold", n, d));
      end

    // rst in the middle of a long division
    @(negedge clk);
    num = 4'd15; den = 4'd1; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (4) @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    repeat (20) @(posedge clk);
    #1;
    check(!done && quot == 0 && rem == 0, "rst during division");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
