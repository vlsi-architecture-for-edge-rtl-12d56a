// edge_ref_pkg: integer reference model of the edge detector for the
// testbenches, written independently of the RTL. ref_edge() takes the nine
// pixels of a 3x3 window (row-major, top-left first), an operator and a
// threshold, and returns the expected output pixel: for Sobel and Prewitt
// FF when floor(sqrt(Gx^2 + Gy^2)) > threshold, for Laplace FF when the
// signed Laplacian response > threshold, 00 otherwise. Also generates
// synthetic leaf-like test images.
package edge_ref_pkg;

  // operator codes match edge_pkg::edge_op_e
  localparam int REF_SOBEL = 0;
  localparam int REF_PREWITT = 1;
  localparam int REF_LAPLACE = 2;

  function automatic int isqrt(longint s);
    longint r = 0;
    while ((r + 1) * (r + 1) <= s) r++;
    return int'(r);
  endfunction

  function automatic int conv(int w[9], int k[9]);
    int acc = 0;
    for (int i = 0; i < 9; i++) acc += w[i] * k[i];
    return acc;
  endfunction

  function automatic int response(int w[9], int op);
    int sobel_x[9]   = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
    int sobel_y[9]   = '{ 1, 2, 1, 0, 0, 0, -1, -2, -1};
    int prewitt_x[9] = '{ 1, 1, 1, 0, 0, 0, -1, -1, -1};
    int prewitt_y[9] = '{-1, 0, 1, -1, 0, 1, -1, 0, 1};
    int laplace[9]   = '{ 0, -1, 0, -1, 4, -1, 0, -1, 0};
    int gx, gy;
    case (op)
      REF_SOBEL: begin
        gx = conv(w, sobel_x);
        gy = conv(w, sobel_y);
        return isqrt(longint'(gx) * gx + longint'(gy) * gy);
      end
      REF_PREWITT: begin
        gx = conv(w, prewitt_x);
        gy = conv(w, prewitt_y);
        return isqrt(longint'(gx) * gx + longint'(gy) * gy);
      end
      default: return conv(w, laplace);
    endcase
  endfunction

  function automatic logic [7:0] ref_edge(int w[9], int op, int thr);
    return (response(w, op) > thr) ? 8'hFF : 8'h00;
  endfunction

  // Synthetic leaf: a bright textured ellipse with darker veins on a dark,
  // slightly noisy background. w and h are the image size.
  function automatic int leaf_pixel(int x, int y, int w, int h);
    int cx = w / 2;
    int cy = h / 2;
    int dx = x - cx;
    int dy = y - cy;
    int ax = (w * 2) / 5;
    int ay = (h * 2) / 5;
    int v;
    if (ax < 1) ax = 1;
    if (ay < 1) ay = 1;
    if ((dx * dx) * (ay * ay) + (dy * dy) * (ax * ax) <= (ax * ax) * (ay * ay)) begin
      v = 150 + ((x * 7 + y * 13) % 40);
      if (dx == dy || dx == -dy || dy == 0) v = 90;  // veins
    end else begin
      v = 20 + ((x * 3 + y * 5) % 11);
    end
    return v;
  endfunction

endpackage
