// tb_edge_threshold: checks the strict greater-than decision and the FF/00
// output coding, with values on both sides of and equal to the threshold,
// negative values and the largest threshold.
module tb_edge_threshold;
  import edge_pkg::*;

  logic signed [VAL_W-1:0] value;
  logic        [THR_W-1:0] threshold;
  pixel_t                  pixel;
  int checks = 0;
  int failures = 0;

  edge_threshold dut (.value(value), .threshold(threshold), .pixel(pixel));

  task automatic run(input int v, input int t);
    pixel_t expect_p;
    value = VAL_W'(v);
    threshold = THR_W'(t);
    #1;
    expect_p = (v > t) ? 8'hFF : 8'h00;
    checks++;
    if (pixel != expect_p) begin
      failures++;
      if (failures < 10) $display("FAIL v=%0d t=%0d got %h", v, t, pixel);
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
    int t;
    run(100, 100);
    run(101, 100);
    run(99, 100);
    run(-1, 0);
    run(-262144, 0);
    run(262143, 262143);
    run(262143, 262142);
    for (int n = 0; n < 5000; n++) begin
      t = int'($urandom_range(262141));
      run(t + int'($urandom_range(4)) - 2, t);
      run(int'($urandom_range(524287)) - 262144, int'($urandom_range(2000)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
