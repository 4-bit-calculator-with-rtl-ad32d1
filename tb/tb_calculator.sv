// tb_calculator: the arithmetic core with every operand pair and every
// pushbutton code. Add, subtract and multiply are checked against integer
// arithmetic at once; divide is started, checked after done, and button codes
// with no or several buttons held must give zero.
module tb_calculator;
  import calc_pkg::*;
  logic       clk = 1'b0, rst, start;
  operand_t   a, b;
  logic [3:0] butt;
  result_t    result;
  logic       div_done;
  int checks = 0, failures = 0;

  calculator dut (.clk(clk), .rst(rst), .start(start), .a(a), .b(b), .butt(butt),
                  .result(result), .div_done(div_done));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
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

  initial begin
    int wait_cycles;
    rst = 1'b1; start = 1'b0; a = '0; b = '0; butt = 4'b1111;
    repeat (2) @(negedge clk);
    rst = 1'b0;

    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        @(negedge clk);
        a = operand_t'(i);
        b = operand_t'(j);
        butt = OP_ADD; #1;
        check(result == result_t'(i + j), $sformatf("%0d + %0d -> %0d", i, j, result));
        butt = OP_SUB; #1;
        check($signed(result) == i - j, $sformatf("%0d - %0d -> %0d", i, j, $signed(result)));
        butt = OP_MUL; #1;
        check(result == result_t'(i * j), $sformatf("%0d * %0d -> %0d", i, j, result));
        for (int k = 0; k < 16; k++) begin
          if (k == OP_ADD || k == OP_SUB || k == OP_MUL || k == OP_DIV) continue;
          butt = 4'(k); #1;
          check(result == '0, $sformatf("code %b -> %0d", k, result));
        end
        // divide: hold the divide button while the divider runs
        butt = OP_DIV;
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        wait_cycles = 0;
        while (!div_done && wait_cycles < 40) begin
          @(negedge clk);
          wait_cycles++;
        end
        if (j != 0)
          check(result == result_t'(i / j), $sformatf("%0d / %0d -> %0d", i, j, result));
        else
          check(result == 8'hFF, $sformatf("%0d / 0 -> %0d", i, result));
      end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
