// tb_array_mult8: exhaustive check of the 8x8 array multiplier.
// Applies all 65536 operand pairs and compares the 16-bit product with the
// integer product x*y. A watchdog ends the run if it stalls.
module tb_array_mult8;
  logic [7:0]  x, y;
  logic [15:0] s;
  int checks = 0;
  int failures = 0;

  array_mult8 dut (.x(x), .y(y), .s(s));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        x = 8'(i);
        y = 8'(j);
        #1;
        checks++;
        if (s != 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d: got %0d", i, j, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
