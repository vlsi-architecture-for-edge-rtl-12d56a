// edge_detector: streaming 3x3 edge detector (Sobel, Prewitt or Laplace).
//
// Pixels arrive one per accepted cycle in raster order. A line buffer forms
// the 3x3 window around each interior pixel. For Sobel and Prewitt two
// identical convolution units (nine array multipliers and a chain of eight
// 16-bit adders each) compute the x and y gradients, and the gradient
// magnitude sqrt(Gx^2 + Gy^2) is compared with the threshold. Laplace uses
// only one convolution unit, whose signed response is compared with the
// threshold directly. The output is a binary edge image: FF where the
// response exceeds the threshold, 00 elsewhere.
//
// The operator is chosen at elaboration by OPERATOR; Sobel is the default
// (the source design's main configuration). Kernel coefficients come from
// edge_pkg. The datapath structure, the 8-bit pixels and coefficients, the
// 17-bit convolution results, the 18-bit threshold and the 256x256 image size
// follow the source design. The stream handshake, the output register with
// its valid flag and position, and skipping the border pixels are this
// design's choices.
//
// Interface:
//   read_enable, shift_enable, pixel_in  input stream (see line_buffer)
//   threshold                            18-bit edge threshold
//   pixel_out, out_valid                 one output pixel per interior window
//   out_x, out_y                         image position of that pixel
// Timing: the window is registered on the clock edge that accepts the pixel
// completing it, and out_valid with its pixel rises on the next edge; the
// whole datapath between these two registers is combinational.
// A W x H frame gives (W-2) x (H-2) output pixels.
module edge_detector
  import edge_pkg::*;
#(
  parameter int       IMG_WIDTH  = 256,
  parameter int       IMG_HEIGHT = 256,
  parameter edge_op_e OPERATOR   = OP_SOBEL,
  localparam int XW = $clog2(IMG_WIDTH),
  localparam int YW = $clog2(IMG_HEIGHT)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             read_enable,
  input  logic             shift_enable,
  input  pixel_t           pixel_in,
  input  logic [THR_W-1:0] threshold,
  output pixel_t           pixel_out,
  output logic             out_valid,
  output logic [XW-1:0]    out_x,
  output logic [YW-1:0]    out_y
);
  window_t                win;
  logic                   win_valid;
  logic [XW-1:0]          win_x;
  logic [YW-1:0]          win_y;
  logic signed [G_W-1:0]  gx;
  logic signed [VAL_W-1:0] response;
  pixel_t                 edge_pix;

  line_buffer #(
    .IMG_WIDTH (IMG_WIDTH),
    .IMG_HEIGHT(IMG_HEIGHT)
  ) u_lb (
    .clk         (clk),
    .rst         (rst),
    .read_enable (read_enable),
    .shift_enable(shift_enable),
    .pixel_in    (pixel_in),
    .win         (win),
    .win_valid   (win_valid),
    .win_x       (win_x),
    .win_y       (win_y)
  );

  kernel_conv u_conv_x (
    .win (win),
    .kern(kernel_x(OPERATOR)),
    .g   (gx)
  );

  if (OPERATOR == OP_LAPLACE) begin : g_one_kernel
    assign response = VAL_W'(gx);
  end else begin : g_two_kernels
    logic signed [G_W-1:0] gy;
    logic        [G_W-1:0] mag;

    kernel_conv u_conv_y (
      .win (win),
      .kern(kernel_y(OPERATOR)),
      .g   (gy)
    );

    grad_magnitude #(.W(G_W)) u_mag (
      .gx (gx),
      .gy (gy),
      .mag(mag)
    );

    assign response = VAL_W'($signed({2'b00, mag}));
  end

  edge_threshold #(
    .VW(VAL_W),
    .TW(THR_W)
  ) u_thr (
    .value    (response),
    .threshold(threshold),
    .pixel    (edge_pix)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      pixel_out <= '0;
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
    end else begin
      out_valid <= win_valid;
      if (win_valid) begin
        pixel_out <= edge_pix;
        out_x     <= win_x;
        out_y     <= win_y;
      end
    end
  end
endmodule
