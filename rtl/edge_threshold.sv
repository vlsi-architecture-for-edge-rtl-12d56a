// edge_threshold: edge/no-edge decision for one pixel.
//
// The signed edge response is compared with an unsigned threshold; a response
// strictly greater than the threshold gives a white output pixel (FF), any
// other response a black one (00). The 18-bit threshold width, the
// greater-than comparison and the binary output image follow the source
// design; the FF/00 pixel coding is read from its results.
//
// Interface: VAL_W-bit signed value, THR_W-bit unsigned threshold, 8-bit
// pixel out. Purely combinational.
module edge_threshold
  import edge_pkg::*;
#(
  parameter int VW = VAL_W,
  parameter int TW = THR_W
) (
  input  logic signed [VW-1:0] value,
  input  logic        [TW-1:0] threshold,
  output pixel_t               pixel
);
  logic signed [VW:0] v_ext, t_ext;

  always_comb begin
    v_ext = (VW+1)'(value);
    t_ext = (VW+1)'($signed({1'b0, threshold}));
    pixel = (v_ext > t_ext) ? '1 : '0;
  end
endmodule
