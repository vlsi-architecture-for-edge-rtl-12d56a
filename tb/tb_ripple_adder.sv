// tb_ripple_adder: checks the 16-bit ripple-carry adder against integer
// addition, including carry in and the final carry out, on corner cases and
// random operands.
module tb_ripple_adder;
  localparam int W = 16;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0;
  int failures = 0;

  ripple_adder #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    logic [W:0] expect_v;
    a = ta;
    b = tb_;
    cin = tc;
    #1;
    expect_v = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tc);
    checks++;
    if ({cout, sum} != expect_v) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h+%b: got %h", ta, tb_, tc, {cout, sum});
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
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);   // carry through every stage
    apply('1, '1, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);
    apply(16'h00FF, 16'h0001, 1'b0);
    for (int i = 0; i < 20000; i++)
      apply(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
