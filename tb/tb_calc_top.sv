// tb_calc_top: end-to-end test of the board-level calculator at its default
// sizes. For every pair of 4-bit operands it presses each operator button in
// turn (running the divider with a start pulse), and checks the eight LEDs
// against integer arithmetic and the three seven-segment displays against the
// decimal digits of the LED value, using its own segment table. It counts how
// often each mechanism happens (each operator, a negative difference shown in
// two's complement, a zero result from no or several buttons, a divide by
// zero, a three-digit display, a digit needing the add-3 correction, a reset
// of the divider) and fails if one never does.
module tb_calc_top;
  import calc_pkg::*;
  logic       clk = 1'b0, rst, start;
  operand_t   a, b;
  logic [3:0] key;
  result_t    ledg;
  seg_t       hex0, hex1, hex2;
  logic       div_done;
  int checks = 0, failures = 0;

  typedef enum int {
    EV_ADD, EV_SUB, EV_MUL, EV_DIV, EV_NEG, EV_NOKEY, EV_MULTIKEY,
    EV_DIV0, EV_HUNDREDS, EV_ADD3, EV_RESET, EV_COUNT
  } event_e;
  int events [EV_COUNT];

  calc_top dut (.clk(clk), .rst(rst), .start(start), .a(a), .b(b), .key(key),
                .ledg(ledg), .hex0(hex0), .hex1(hex1), .hex2(hex2),
                .div_done(div_done));

  always #10 clk = ~clk;   // 50 MHz board clock

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  // Active-low pattern of a decimal digit, from the segments (a..g) it lights.
  function automatic seg_t pattern(input int d);
    string lit;
    seg_t  on;
    case (d)
      0: lit = "abcdef";   1: lit = "bc";      2: lit = "abdeg";  3: lit = "abcdg";
      4: lit = "bcfg";     5: lit = "acdfg";   6: lit = "acdefg"; 7: lit = "abc";
      8: lit = "abcdefg";  9: lit = "abcdfg";  default: lit = "";
    endcase
    on = '0;
    for (int k = 0; k < lit.len(); k++) on[lit[k] - "a"] = 1'b1;
    return ~on;
  endfunction

  // Check LEDs against the expected 8-bit value and the displays against its
  // decimal digits.
  task automatic expect_out(input int value, input string what);
    result_t v;
    int u;
    v = result_t'(value);
    u = int'(v);
    check(ledg == v, $sformatf("%s: LEDs %b, expected %b", what, ledg, v));
    check(hex2 == pattern(u / 100) && hex1 == pattern((u / 10) % 10) && hex0 == pattern(u % 10),
          $sformatf("%s: displays %b %b %b for %0d", what, hex2, hex1, hex0, u));
    if (u >= 100) events[EV_HUNDREDS]++;
    // the add-3 step is needed whenever a partial BCD digit reaches 5..9,
    // which happens for every value of 5 or more
    if (u >= 5) events[EV_ADD3]++;
  endtask

  task automatic run_divide(input int i, input int j);
    int n;
    @(negedge clk);
    key = OP_DIV;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    n = 0;
    while (!div_done && n < 40) begin
      @(negedge clk);
      n++;
    end
    check(div_done, $sformatf("%0d / %0d never done", i, j));
    check(n == ((j == 0) ? 1 : i / j + 1), $sformatf("%0d / %0d took %0d cycles", i, j, n));
    expect_out((j == 0) ? 255 : i / j, $sformatf("%0d / %0d", i, j));
    events[EV_DIV]++;
    if (j == 0) events[EV_DIV0]++;
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; a = '0; b = '0; key = 4'b1111;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    expect_out(0, "no key after reset");
    events[EV_NOKEY]++;

    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        @(negedge clk);
        a = operand_t'(i);
        b = operand_t'(j);
        key = OP_ADD; #1;
        expect_out(i + j, $sformatf("%0d + %0d", i, j));
        events[EV_ADD]++;
        key = OP_SUB; #1;
        expect_out(i - j, $sformatf("%0d - %0d", i, j));
        events[EV_SUB]++;
        if (i < j) events[EV_NEG]++;
        key = OP_MUL; #1;
        expect_out(i * j, $sformatf("%0d * %0d", i, j));
        events[EV_MUL]++;
        key = 4'b1111; #1;
        expect_out(0, "no key");
        events[EV_NOKEY]++;
        key = 4'((i * 7 + j) % 16);      // some code that is not a single key
        if (!(key inside {OP_ADD, OP_SUB, OP_MUL, OP_DIV, 4'b1111})) begin
          #1;
          expect_out(0, $sformatf("keys %b", key));
          events[EV_MULTIKEY]++;
        end
        run_divide(i, j);
      end

    // reset in the middle of 15 / 1: the quotient goes back to zero
    @(negedge clk);
    a = 4'd15; b = 4'd1; key = OP_DIV; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    repeat (5) @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    repeat (20) @(negedge clk);
    check(!div_done, "divider idle after reset");
    expect_out(0, "division after reset");
    events[EV_RESET]++;

    foreach (events[e]) begin
      $display("event %s happened %0d times", event_e'(e), events[e]);
      check(events[e] > 0, $sformatf("event %s never happened", event_e'(e)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
