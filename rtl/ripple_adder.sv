// ripple_adder: WIDTH-bit ripple-carry adder made of a chain of one-bit full
// adders. Bit 0 takes the external carry in; each stage passes its carry to
// the next, and the carry of the top stage is the final carry out, so
// {cout, sum} = a + b + cin.
//
// The structure and the 16-bit default width follow the source design's adder
// figure. Purely combinational: the delay grows linearly with WIDTH.
module ripple_adder #(
  parameter int WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .s   (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
