// array_mult8: unsigned 8x8-bit array multiplier with a 16-bit product.
//
// Partial product bit pp[i][j] = x[i] & y[j] comes from one AND gate. Row 0
// is the partial product of x[0]. Each following row i adds the partial
// product of x[i] to the upper eight bits of the previous row (its sum bits
// 1..7 and its carry out), with a half adder in the lowest column and full
// adders above it; carries ripple leftwards inside the row. The lowest sum
// bit of every row is a finished product bit (S0..S6), and the last row gives
// S7..S14 with its carry out as S15.
//
// The cell arrangement (AND gates, one half adder per row, full adders,
// carries rippling along the row) follows the source design's multiplier
// figure. Purely combinational.
module array_mult8 (
  input  logic [7:0]  x,  // X7..X0: pixel
  input  logic [7:0]  y,  // Y7..Y0: kernel coefficient magnitude
  output logic [15:0] s   // S15..S0: product
);
  // row[i] holds the 8 sum bits of row i in [7:0] and its carry out in [8]
  logic [7:0][8:0] row;
  logic [7:0][7:0] pp;
  logic [7:0][8:0] rc;  // ripple carries inside a row

  for (genvar i = 0; i < 8; i++) begin : g_pp
    for (genvar j = 0; j < 8; j++) begin : g_and
      assign pp[i][j] = x[i] & y[j];
    end
  end

  assign row[0] = {1'b0, pp[0]};
  assign rc[0]  = '0;

  for (genvar i = 1; i < 8; i++) begin : g_row
    half_adder u_ha (
      .a(pp[i][0]),
      .b(row[i-1][1]),
      .s(row[i][0]),
      .c(rc[i][1])
    );
    for (genvar j = 1; j < 8; j++) begin : g_fa
      full_adder u_fa (
        .a   (pp[i][j]),
        .b   (row[i-1][j+1]),
        .cin (rc[i][j]),
        .s   (row[i][j]),
        .cout(rc[i][j+1])
      );
    end
    assign rc[i][0] = 1'b0;
    assign row[i][8] = rc[i][8];
  end

  for (genvar i = 0; i < 7; i++) begin : g_low
    assign s[i] = row[i][0];
  end
  assign s[15:7] = row[7];
endmodule
