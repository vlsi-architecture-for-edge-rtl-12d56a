// tb_edge_detector_full: the edge detector at its default configuration
// (Sobel, 256x256 image, no parameter overrides) on two full synthetic leaf
// images streamed back to back, one pixel per clock.
//
// Every one of the 254x254 output pixels per frame is compared with the
// integer reference model, positions are checked in raster order, and the
// throughput is checked: with no stalls a frame of 65536 pixels takes 65536
// clock edges, and the last output appears one edge after the last pixel.
module tb_edge_detector_full;
  import edge_pkg::*;
  import edge_ref_pkg::*;

  localparam int W = 256;
  localparam int H = 256;
  localparam int THR = 200;

  logic       clk = 0;
  logic       rst;
  logic       read_enable, shift_enable;
  pixel_t     pixel_in;
  pixel_t     pixel_out;
  logic       out_valid;
  logic [7:0] out_x, out_y;

  int checks = 0;
  int failures = 0;
  int img [H][W];
  int n_out, n_edge, n_flat;
  int exp_x, exp_y;
  int cycle = 0;
  int first_cycle, last_out_cycle;

  edge_detector dut (
    .clk(clk), .rst(rst), .read_enable(read_enable), .shift_enable(shift_enable),
    .pixel_in(pixel_in), .threshold(18'(THR)), .pixel_out(pixel_out),
    .out_valid(out_valid), .out_x(out_x), .out_y(out_y));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      int w[9];
      logic [7:0] e;
      checks++;
      if (int'(out_x) != exp_x || int'(out_y) != exp_y) begin
        failures++;
        if (failures < 10)
          $display("FAIL position (%0d,%0d) expected (%0d,%0d)", out_x, out_y, exp_x, exp_y);
      end
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          w[3*r+c] = img[int'(out_y)+r-1][int'(out_x)+c-1];
      e = ref_edge(w, REF_SOBEL, THR);
      checks++;
      if (pixel_out != e) begin
        failures++;
        if (failures < 10) $display("FAIL pixel (%0d,%0d) got %h expected %h", out_x, out_y, pixel_out, e);
      end
      if (e == 8'hFF) n_edge++;
      else n_flat++;
      n_out++;
      last_out_cycle = cycle;
      exp_x++;
      if (exp_x == W - 1) begin
        exp_x = 1;
        exp_y++;
      end
    end
  end

  task automatic frame(input int kind);
    for (int yy = 0; yy < H; yy++)
      for (int xx = 0; xx < W; xx++)
        img[yy][xx] = (kind == 0) ? leaf_pixel(xx, yy, W, H)
                                  : leaf_pixel(yy, xx, H, W) ^ int'($urandom_range(7));
    n_out = 0;
    exp_x = 1;
    exp_y = 1;
    first_cycle = cycle + 1;   // edge that accepts pixel (0,0)
    for (int yy = 0; yy < H; yy++)
      for (int xx = 0; xx < W; xx++) begin
        shift_enable = 1'b1;
        read_enable = (yy == 0 && xx == 0);
        pixel_in = 8'(img[yy][xx]);
        @(posedge clk);
        #1;
      end
    shift_enable = 1'b0;
    read_enable = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (n_out != (W - 2) * (H - 2)) begin
      failures++;
      $display("FAIL %0d outputs, expected %0d", n_out, (W - 2) * (H - 2));
    end
    // pixel (0,0) accepted at first_cycle, last pixel at first_cycle + W*H - 1,
    // its output one edge later
    checks++;
    if (last_out_cycle - first_cycle != W * H) begin
      failures++;
      $display("FAIL frame took %0d edges, expected %0d", last_out_cycle - first_cycle, W * H);
    end
    $display("frame %0d: %0d outputs, %0d edge pixels, %0d edges", kind, n_out, n_edge,
             last_out_cycle - first_cycle);
  endtask

  initial begin
    n_edge = 0;
    n_flat = 0;
    rst = 1'b1;
    read_enable = 1'b0;
    shift_enable = 1'b0;
    pixel_in = '0;
    repeat (3) @(posedge clk);
    #1;
    rst = 1'b0;
    frame(0);
    frame(1);
    checks++;
    if (n_edge == 0 || n_flat == 0) begin
      failures++;
      $display("FAIL no edge or no non-edge pixels");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
