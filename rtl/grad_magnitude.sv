// grad_magnitude: gradient magnitude |G| = floor(sqrt(gx^2 + gy^2)).
//
// Both gradients are squared, the squares are added, and the integer square
// root of the sum is taken with the bit-by-bit (restoring) method: for each
// result bit from the top down, the trial value (root | bit)^2 is compared
// with the radicand and the bit is kept if it does not exceed it. This
// follows the source design's formula for the magnitude; the source design
// does not say how the squares and the root are built, so this is the
// simplest combinational form.
//
// Interface: two signed G_W-bit gradients in, an unsigned G_W-bit magnitude
// out (the root of a 2*G_W-bit number fits in G_W bits). Purely
// combinational.
module grad_magnitude
  import edge_pkg::*;
#(
  parameter int W = G_W
) (
  input  logic signed [W-1:0] gx,
  input  logic signed [W-1:0] gy,
  output logic        [W-1:0] mag
);
  localparam int SW = 2 * W;

  logic [SW-1:0] sq_x, sq_y, radicand;

  always_comb begin
    sq_x     = SW'($signed(gx) * $signed(gx));
    sq_y     = SW'($signed(gy) * $signed(gy));
    radicand = sq_x + sq_y;
  end

  always_comb begin
    logic [W-1:0]  root;
    logic [W-1:0]  trial;
    logic [SW-1:0] trial_sq;
    root = '0;
    for (int b = W - 1; b >= 0; b--) begin
      trial    = root | (W'(1) << b);
      trial_sq = SW'(trial) * SW'(trial);
      if (trial_sq <= radicand) root = trial;
    end
    mag = root;
  end
endmodule
