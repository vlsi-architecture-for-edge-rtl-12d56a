// tb_leaf_workloads: the three detectors (Sobel, Prewitt, Laplace) at the
// full 256x256 image size, each fed two synthetic leaf images (a smooth
// textured leaf and a transposed, noisier one) with occasional stalls.
// Every output pixel is compared with the integer reference model and each
// frame must give 254x254 outputs in raster order.
module tb_leaf_workloads;
  import edge_pkg::*;
  import edge_ref_pkg::*;

  localparam int W = 256;
  localparam int H = 256;
  localparam int NOP = 3;
  localparam int THR [NOP] = '{200, 150, 60};

  logic       clk = 0;
  logic       rst;
  logic       read_enable, shift_enable;
  pixel_t     pixel_in;
  pixel_t     pixel_out [NOP];
  logic       out_valid [NOP];
  logic [7:0] out_x [NOP];
  logic [7:0] out_y [NOP];

  int checks = 0;
  int failures = 0;
  int img [H][W];
  int n_out [NOP];
  int n_edge [NOP];

  edge_detector #(.OPERATOR(OP_SOBEL)) u_sobel (
    .clk(clk), .rst(rst), .read_enable(read_enable), .shift_enable(shift_enable),
    .pixel_in(pixel_in), .threshold(18'(THR[0])), .pixel_out(pixel_out[0]),
    .out_valid(out_valid[0]), .out_x(out_x[0]), .out_y(out_y[0]));
  edge_detector #(.OPERATOR(OP_PREWITT)) u_prewitt (
    .clk(clk), .rst(rst), .read_enable(read_enable), .shift_enable(shift_enable),
    .pixel_in(pixel_in), .threshold(18'(THR[1])), .pixel_out(pixel_out[1]),
    .out_valid(out_valid[1]), .out_x(out_x[1]), .out_y(out_y[1]));
  edge_detector #(.OPERATOR(OP_LAPLACE)) u_laplace (
    .clk(clk), .rst(rst), .read_enable(read_enable), .shift_enable(shift_enable),
    .pixel_in(pixel_in), .threshold(18'(THR[2])), .pixel_out(pixel_out[2]),
    .out_valid(out_valid[2]), .out_x(out_x[2]), .out_y(out_y[2]));

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar o = 0; o < NOP; o++) begin : g_chk
    int exp_x = 1;
    int exp_y = 1;
    always @(posedge clk) begin
      #1;
      if (out_valid[o]) begin
        int w[9];
        logic [7:0] e;
        checks++;
        if (int'(out_x[o]) != exp_x || int'(out_y[o]) != exp_y) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d position (%0d,%0d)", o, out_x[o], out_y[o]);
        end
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            w[3*r+c] = img[int'(out_y[o])+r-1][int'(out_x[o])+c-1];
        e = ref_edge(w, o, THR[o]);
        checks++;
        if (pixel_out[o] != e) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d pixel (%0d,%0d)", o, out_x[o], out_y[o]);
        end
        if (e == 8'hFF) n_edge[o]++;
        n_out[o]++;
        exp_x++;
        if (exp_x == W - 1) begin
          exp_x = 1;
          exp_y++;
        end
      end
    end
  end

  task automatic frame(input int kind);
    for (int yy = 0; yy < H; yy++)
      for (int xx = 0; xx < W; xx++)
        img[yy][xx] = (kind == 0) ? leaf_pixel(xx, yy, W, H)
                                  : leaf_pixel(yy, xx, H, W) ^ int'($urandom_range(15));
    for (int o = 0; o < NOP; o++) begin
      n_out[o] = 0;
      n_edge[o] = 0;
    end
    g_chk[0].exp_x = 1; g_chk[0].exp_y = 1;
    g_chk[1].exp_x = 1; g_chk[1].exp_y = 1;
    g_chk[2].exp_x = 1; g_chk[2].exp_y = 1;
    for (int yy = 0; yy < H; yy++)
      for (int xx = 0; xx < W; xx++) begin
        if ($urandom_range(15) == 0) begin
          shift_enable = 1'b0;
          read_enable = 1'b0;
          @(posedge clk);
          #1;
        end
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
    for (int o = 0; o < NOP; o++) begin
      checks++;
      if (n_out[o] != (W - 2) * (H - 2) || n_edge[o] == 0) begin
        failures++;
        $display("FAIL op %0d: %0d outputs, %0d edges", o, n_out[o], n_edge[o]);
      end
      $display("image %0d operator %0d: %0d edge pixels of %0d", kind, o, n_edge[o], n_out[o]);
    end
  endtask

  initial begin
    rst = 1'b1;
    read_enable = 1'b0;
    shift_enable = 1'b0;
    pixel_in = '0;
    repeat (3) @(posedge clk);
    #1;
    rst = 1'b0;
    frame(0);
    frame(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
