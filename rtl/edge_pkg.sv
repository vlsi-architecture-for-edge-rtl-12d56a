// edge_pkg: types, widths and kernel coefficients shared by the edge detector.
//
// A 3x3 window and a 3x3 kernel are both nine 8-bit values held in a packed
// array whose index i is the tap number: index 0 is the top-left pixel p0,
// index 2 the top-right p2, index 8 the bottom-right p8 (row-major order).
// Kernel coefficients are 8-bit two's complement numbers.
//
// The coefficient tables are the Sobel, Prewitt and Laplace kernels of the
// source design, written in the same tap order. The Prewitt "x" and "y"
// kernels are taken as published, which is the opposite naming from Sobel;
// the gradient magnitude does not depend on which one is called x.
package edge_pkg;

  localparam int PIX_W = 8;   // pixel width
  localparam int COEF_W = 8;  // kernel coefficient width
  localparam int PROD_W = 16; // array multiplier product width
  localparam int G_W = 17;    // convolution result: 16-bit sum plus final carry
  localparam int THR_W = 18;  // edge threshold width
  localparam int VAL_W = 19;  // signed value compared against the threshold

  typedef enum logic [1:0] {
    OP_SOBEL   = 2'd0,
    OP_PREWITT = 2'd1,
    OP_LAPLACE = 2'd2
  } edge_op_e;

  typedef logic [PIX_W-1:0] pixel_t;
  typedef logic [8:0][PIX_W-1:0] window_t;   // [i] = p_i
  typedef logic [8:0][COEF_W-1:0] kernel_t;  // [i] = coefficient of p_i

  // Builds a kernel from nine integer coefficients, given in tap order p0..p8.
  function automatic kernel_t make_kernel(int c0, int c1, int c2, int c3, int c4,
                                          int c5, int c6, int c7, int c8);
    kernel_t k;
    k[0] = COEF_W'(c0);
    k[1] = COEF_W'(c1);
    k[2] = COEF_W'(c2);
    k[3] = COEF_W'(c3);
    k[4] = COEF_W'(c4);
    k[5] = COEF_W'(c5);
    k[6] = COEF_W'(c6);
    k[7] = COEF_W'(c7);
    k[8] = COEF_W'(c8);
    return k;
  endfunction

  // First kernel of an operator (the only one for Laplace).
  function automatic kernel_t kernel_x(edge_op_e op);
    case (op)
      OP_PREWITT: return make_kernel( 1,  1,  1,  0,  0,  0, -1, -1, -1);
      OP_LAPLACE: return make_kernel( 0, -1,  0, -1,  4, -1,  0, -1,  0);
      default:    return make_kernel(-1,  0,  1, -2,  0,  2, -1,  0,  1);
    endcase
  endfunction

  // Second kernel of a two-kernel operator (unused for Laplace).
  function automatic kernel_t kernel_y(edge_op_e op);
    case (op)
      OP_PREWITT: return make_kernel(-1,  0,  1, -1,  0,  1, -1,  0,  1);
      OP_LAPLACE: return make_kernel( 0,  0,  0,  0,  0,  0,  0,  0,  0);
      default:    return make_kernel( 1,  2,  1,  0,  0,  0, -1, -2, -1);
    endcase
  endfunction

endpackage
