// tb_array_multiplier: all 256 operand pairs of the 4 x 4 array multiplier,
// compared with the integer product.
module tb_array_multiplier;
  localparam int unsigned N = 4;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  array_multiplier dut (.x(x), .y(y), .p(p));

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**N; i++)
      for (int j = 0; j < 2**N; j++) begin
        x = N'(i);
        y = N'(j);
        #1;
        checks++;
        if (p != (2*N)'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d -> %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
