// tb_grad_magnitude: checks floor(sqrt(gx^2 + gy^2)) on corner cases and
// random signed gradients over the full 17-bit range. The expected root is
// the largest r with r*r <= gx^2 + gy^2, checked from both sides.
module tb_grad_magnitude;
  import edge_pkg::*;

  logic signed [G_W-1:0] gx, gy;
  logic        [G_W-1:0] mag;
  int checks = 0;
  int failures = 0;

  grad_magnitude dut (.gx(gx), .gy(gy), .mag(mag));

  task automatic run(input int x, input int y);
    longint s, r;
    gx = G_W'(x);
    gy = G_W'(y);
    #1;
    s = longint'(x) * x + longint'(y) * y;
    r = longint'(mag);
    checks++;
    if (!(r * r <= s && (r + 1) * (r + 1) > s)) begin
      failures++;
      if (failures < 10) $display("FAIL gx=%0d gy=%0d got %0d", x, y, mag);
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
    run(0, 0);
    run(3, -4);
    run(-1020, 1020);
    run(-65536, -65536);
    run(65535, 0);
    for (int n = 0; n < 5000; n++)
      run(int'($urandom_range(2040)) - 1020, int'($urandom_range(2040)) - 1020);
    for (int n = 0; n < 3000; n++)
      run(int'($urandom_range(131071)) - 65536, int'($urandom_range(131071)) - 65536);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
