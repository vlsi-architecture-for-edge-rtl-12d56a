// tb_kernel_conv: checks the 3x3 convolution unit against an integer
// sum of products. Uses the Sobel, Prewitt and Laplace kernels (coefficients
// written out here independently of the design's package) on random and
// extreme windows, then random kernels with coefficients in -14..14, small
// enough that every partial sum stays within 16-bit two's complement.
module tb_kernel_conv;
  import edge_pkg::*;

  window_t               win;
  kernel_t               kern;
  logic signed [G_W-1:0] g;
  int checks = 0;
  int failures = 0;

  int kset [5][9] = '{
    '{-1, 0, 1, -2, 0, 2, -1, 0, 1},
    '{ 1, 2, 1,  0, 0, 0, -1, -2, -1},
    '{ 1, 1, 1,  0, 0, 0, -1, -1, -1},
    '{-1, 0, 1, -1, 0, 1, -1, 0, 1},
    '{ 0, -1, 0, -1, 4, -1, 0, -1, 0}
  };

  kernel_conv dut (.win(win), .kern(kern), .g(g));

  task automatic run(input int p[9], input int k[9]);
    int expect_v = 0;
    for (int i = 0; i < 9; i++) begin
      win[i]  = 8'(p[i]);
      kern[i] = 8'(k[i]);
      expect_v += p[i] * k[i];
    end
    #1;
    checks++;
    if (int'(g) != expect_v) begin
      failures++;
      if (failures < 10) $display("FAIL expected %0d got %0d", expect_v, g);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p[9];
    int k[9];
    for (int s = 0; s < 5; s++) begin
      // extreme windows: all 255 where the coefficient is positive, 0 elsewhere,
      // and the opposite, giving the largest responses of both signs
      for (int i = 0; i < 9; i++) p[i] = (kset[s][i] > 0) ? 255 : 0;
      run(p, kset[s]);
      for (int i = 0; i < 9; i++) p[i] = (kset[s][i] < 0) ? 255 : 0;
      run(p, kset[s]);
      for (int n = 0; n < 2000; n++) begin
        for (int i = 0; i < 9; i++) p[i] = int'($urandom_range(255));
        run(p, kset[s]);
      end
    end
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < 9; i++) begin
        p[i] = int'($urandom_range(255));
        k[i] = int'($urandom_range(28)) - 14;
      end
      run(p, k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
