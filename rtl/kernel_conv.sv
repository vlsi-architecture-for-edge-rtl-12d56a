// kernel_conv: convolution of one 3x3 pixel window with one 3x3 kernel,
// G = sum over i of p_i * k_i.
//
// Nine array multipliers form the products and eight 16-bit ripple-carry
// adders accumulate them as a chain: adder 1 adds products 1 and 2, and adder
// n (n = 2..8) adds product n+1 to the output of adder n-1. This multiplier
// and adder arrangement follows the source design.
//
// Signed coefficients are this design's own addition around the unsigned
// multipliers: each tap multiplies the pixel by the coefficient magnitude and
// negates the 16-bit product when the coefficient is negative, so the chain
// adds two's complement numbers. Partial sums wrap at 16 bits, which is exact
// as long as every partial sum stays within -32768..32767 (at most 1020 in
// magnitude for the Sobel, Prewitt and Laplace kernels). The 17-bit result is
// the exact sum of the last adder's two signed operands, whose top bit is
// formed from the final carry out and the two operand sign bits.
//
// Interface: pixels and coefficients in tap order p0..p8 (edge_pkg). Purely
// combinational.
module kernel_conv
  import edge_pkg::*;
(
  input  window_t               win,  // p0..p8, unsigned 8-bit pixels
  input  kernel_t               kern, // k0..k8, two's complement coefficients
  output logic signed [G_W-1:0] g     // convolution result
);
  logic [8:0][COEF_W-1:0] mag;
  logic [8:0][PROD_W-1:0] prod;
  logic [8:0][PROD_W-1:0] sprod;  // signed product of tap i
  logic [8:0][PROD_W-1:0] acc;    // acc[n] = output of adder n, acc[0] = tap 0
  logic [8:0]             cy;

  for (genvar i = 0; i < 9; i++) begin : g_tap
    assign mag[i] = kern[i][COEF_W-1] ? COEF_W'(-kern[i]) : kern[i];

    array_mult8 u_mul (
      .x(win[i]),
      .y(mag[i]),
      .s(prod[i])
    );

    assign sprod[i] = kern[i][COEF_W-1] ? PROD_W'(-prod[i]) : prod[i];
  end

  assign acc[0] = sprod[0];
  assign cy[0]  = 1'b0;

  for (genvar n = 1; n < 9; n++) begin : g_add
    ripple_adder #(.WIDTH(PROD_W)) u_add (
      .a   (acc[n-1]),
      .b   (sprod[n]),
      .cin (1'b0),
      .sum (acc[n]),
      .cout(cy[n])
    );
  end

  assign g = {acc[7][PROD_W-1] ^ sprod[8][PROD_W-1] ^ cy[8], acc[8]};
endmodule
