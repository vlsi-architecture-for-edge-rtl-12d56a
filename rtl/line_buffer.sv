// line_buffer: turns a raster-order pixel stream into 3x3 windows.
//
// Two line memories of IMG_WIDTH pixels hold the two previous image rows. On
// every accepted pixel at column x, the memories are read at x to give the
// column (row y-2, row y-1, new pixel); the new pixel is written into the
// first memory and the first memory's old value into the second, and the
// 3x3 window registers shift one column to the left and take that column on
// the right. A window is complete, and win_valid pulses for one cycle, when
// the accepted pixel is at x >= 2 and y >= 2; win_x and win_y then give the
// image position of the window's centre pixel p4. Windows that would need
// pixels outside the image are not produced, so a W x H frame yields
// (W-2) x (H-2) windows.
//
// Interface (signal names from the source design's simulation waveforms):
//   shift_enable  pixel_in is valid this cycle and is shifted into the buffer;
//                 with it low the buffer holds (the stream may stall freely)
//   read_enable   marks pixel_in as the first pixel (0,0) of a new frame and
//                 restarts the position counters; without it the counters
//                 simply wrap at the end of a frame
// The meaning given to the two enables, the counters, the window validity
// rule and the synchronous active-high reset are this design's choices; the
// source design only names the line buffer and these signals.
//
// A frame start must come with a pixel: read_enable is only legal together
// with shift_enable, which an assertion checks in simulation.
//
// Timing: the window registers, win_valid, win_x and win_y change on the
// clock edge that accepts the pixel completing the window.
module line_buffer
  import edge_pkg::*;
#(
  parameter int IMG_WIDTH  = 256,
  parameter int IMG_HEIGHT = 256,
  localparam int XW = $clog2(IMG_WIDTH),
  localparam int YW = $clog2(IMG_HEIGHT)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          read_enable,
  input  logic          shift_enable,
  input  pixel_t        pixel_in,
  output window_t       win,        // p0..p8
  output logic          win_valid,
  output logic [XW-1:0] win_x,      // column of p4
  output logic [YW-1:0] win_y       // row of p4
);
  pixel_t lb1 [IMG_WIDTH];  // row y-1
  pixel_t lb2 [IMG_WIDTH];  // row y-2

  logic [XW-1:0] x, cur_x;
  logic [YW-1:0] y, cur_y;
  pixel_t col_top, col_mid;

  // Position of the pixel presented now.
  always_comb begin
    cur_x = read_enable ? '0 : x;
    cur_y = read_enable ? '0 : y;
  end

  assign col_top = lb2[cur_x];
  assign col_mid = lb1[cur_x];

  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!read_enable || shift_enable)
        else $error("line_buffer: read_enable without shift_enable");
    end
  end

  always_ff @(posedge clk) begin
    if (shift_enable) begin
      lb1[cur_x] <= pixel_in;
      lb2[cur_x] <= col_mid;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      x         <= '0;
      y         <= '0;
      win       <= '0;
      win_valid <= 1'b0;
      win_x     <= '0;
      win_y     <= '0;
    end else begin
      win_valid <= 1'b0;
      if (shift_enable) begin
        // window shift: columns move left, new column enters on the right
        for (int r = 0; r < 3; r++) begin
          win[3*r]     <= win[3*r+1];
          win[3*r + 1] <= win[3*r+2];
        end
        win[2] <= col_top;
        win[5] <= col_mid;
        win[8] <= pixel_in;

        win_valid <= (cur_x >= XW'(2)) && (cur_y >= YW'(2));
        win_x     <= cur_x - XW'(1);
        win_y     <= cur_y - YW'(1);

        if (cur_x == XW'(IMG_WIDTH - 1)) begin
          x <= '0;
          y <= (cur_y == YW'(IMG_HEIGHT - 1)) ? '0 : cur_y + YW'(1);
        end else begin
          x <= cur_x + XW'(1);
          y <= cur_y;
        end
      end
    end
  end
endmodule
