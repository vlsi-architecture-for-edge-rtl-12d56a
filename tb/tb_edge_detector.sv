// tb_edge_detector: end-to-end test of the streaming edge detector with all
// three operators side by side (Sobel, Prewitt, Laplace) on a 16x12 image.
//
// All three instances see the same input stream. It carries: a synthetic leaf
// image, a random image, a frame that follows the previous one without a
// start marker (counter wrap), and an abandoned partial frame followed by a
// restart with read_enable. Input pixels are separated by random stalls. For
// every output pixel the value and position are compared with the integer
// reference model, the number of outputs per frame is checked, and the
// latency from the pixel completing a window to out_valid is checked to be
// one clock edge. Each mechanism (stall, frame restart, counter wrap, edge
// and non-edge outputs of every operator) is counted, and one that never
// happened counts as a failure.
module tb_edge_detector;
  import edge_pkg::*;
  import edge_ref_pkg::*;

  localparam int W = 16;
  localparam int H = 12;
  localparam int XW = $clog2(W);
  localparam int YW = $clog2(H);
  localparam int NOP = 3;

  logic       clk = 0;
  logic       rst;
  logic       read_enable, shift_enable;
  pixel_t     pixel_in;
  logic [THR_W-1:0] thr [NOP];
  pixel_t     pixel_out [NOP];
  logic       out_valid [NOP];
  logic [XW-1:0] out_x [NOP];
  logic [YW-1:0] out_y [NOP];

  int checks = 0;
  int failures = 0;
  int img [H][W];
  int n_out [NOP];
  int n_edge [NOP];
  int n_flat [NOP];
  int n_stall = 0;
  int n_restart = 0;
  int n_wrap = 0;
  int cycle = 0;
  int complete_cycle [H][W];  // cycle at which the pixel completing window (x,y) was accepted

  edge_detector #(.IMG_WIDTH(W), .IMG_HEIGHT(H), .OPERATOR(OP_SOBEL)) u_sobel (
    .clk(clk), .rst(rst), .read_enable(read_enable), .shift_enable(shift_enable),
    .pixel_in(pixel_in), .threshold(thr[0]), .pixel_out(pixel_out[0]),
    .out_valid(out_valid[0]), .out_x(out_x[0]), .out_y(out_y[0]));
  edge_detector #(.IMG_WIDTH(W), .IMG_HEIGHT(H), .OPERATOR(OP_PREWITT)) u_prewitt (
    .clk(clk), .rst(rst), .read_enable(read_enable), .shift_enable(shift_enable),
    .pixel_in(pixel_in), .threshold(thr[1]), .pixel_out(pixel_out[1]),
    .out_valid(out_valid[1]), .out_x(out_x[1]), .out_y(out_y[1]));
  edge_detector #(.IMG_WIDTH(W), .IMG_HEIGHT(H), .OPERATOR(OP_LAPLACE)) u_laplace (
    .clk(clk), .rst(rst), .read_enable(read_enable), .shift_enable(shift_enable),
    .pixel_in(pixel_in), .threshold(thr[2]), .pixel_out(pixel_out[2]),
    .out_valid(out_valid[2]), .out_x(out_x[2]), .out_y(out_y[2]));

  always #5 clk = ~clk;
  // Edge counter, and the edge at which each image position was accepted,
  // tracked from the input stream by a position counter of the testbench's own.
  int acc_x = 0;
  int acc_y = 0;
  always @(posedge clk) begin
    cycle++;
    if (!rst && shift_enable) begin
      if (read_enable) begin
        acc_x = 0;
        acc_y = 0;
      end
      complete_cycle[acc_y][acc_x] = cycle;
      acc_x++;
      if (acc_x == W) begin
        acc_x = 0;
        acc_y = (acc_y == H - 1) ? 0 : acc_y + 1;
      end
    end
  end

  initial begin
    #500_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker, one per operator
  for (genvar o = 0; o < NOP; o++) begin : g_chk
    int exp_x = 1;
    int exp_y = 1;
    always @(posedge clk) begin
      #1;
      if (out_valid[o]) begin
        int w[9];
        logic [7:0] e;
        int ox, oy;
        ox = int'(out_x[o]);
        oy = int'(out_y[o]);
        checks++;
        if (ox != exp_x || oy != exp_y) begin
          failures++;
          $display("FAIL op %0d position (%0d,%0d) expected (%0d,%0d)", o, ox, oy, exp_x, exp_y);
        end
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            w[3*r+c] = img[oy+r-1][ox+c-1];
        e = ref_edge(w, o, int'(thr[o]));
        checks++;
        if (pixel_out[o] != e) begin
          failures++;
          if (failures < 20)
            $display("FAIL op %0d pixel (%0d,%0d) got %h expected %h (response %0d)",
                     o, ox, oy, pixel_out[o], e, response(w, o));
        end
        // latency: window registered on the accepting edge, output on the next
        checks++;
        if (cycle - complete_cycle[oy+1][ox+1] != 1) begin
          failures++;
          $display("FAIL op %0d latency %0d", o, cycle - complete_cycle[oy+1][ox+1]);
        end
        if (e == 8'hFF) n_edge[o]++;
        else n_flat[o]++;
        n_out[o]++;
        exp_x++;
        if (exp_x == W - 1) begin
          exp_x = 1;
          exp_y++;
        end
      end
    end
  end

  task automatic send(input int px, input logic sof, input int xx, input int yy);
    // xx, yy: position of the pixel, for messages only
    while ($urandom_range(3) == 0) begin
      shift_enable = 1'b0;
      read_enable = 1'b0;
      pixel_in = 8'($urandom);
      n_stall++;
      @(posedge clk);
      #1;
    end
    shift_enable = 1'b1;
    read_enable = sof;
    pixel_in = 8'(px);
    if (sof) n_restart++;
    @(posedge clk);
    #1;
    shift_enable = 1'b0;
    read_enable = 1'b0;
  endtask

  task automatic frame(input logic sof, input logic leaf);
    for (int yy = 0; yy < H; yy++)
      for (int xx = 0; xx < W; xx++)
        img[yy][xx] = leaf ? leaf_pixel(xx, yy, W, H) : int'($urandom_range(255));
    for (int o = 0; o < NOP; o++) n_out[o] = 0;
    g_chk[0].exp_x = 1; g_chk[0].exp_y = 1;
    g_chk[1].exp_x = 1; g_chk[1].exp_y = 1;
    g_chk[2].exp_x = 1; g_chk[2].exp_y = 1;
    if (!sof) n_wrap++;
    for (int yy = 0; yy < H; yy++)
      for (int xx = 0; xx < W; xx++)
        send(img[yy][xx], sof && yy == 0 && xx == 0, xx, yy);
    repeat (4) @(posedge clk);
    #1;
    for (int o = 0; o < NOP; o++) begin
      checks++;
      if (n_out[o] != (W - 2) * (H - 2)) begin
        failures++;
        $display("FAIL op %0d: %0d outputs, expected %0d", o, n_out[o], (W - 2) * (H - 2));
      end
    end
  endtask

  task automatic require(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("%s: %0d", what, count);
    end
  endtask

  initial begin
    thr[0] = 18'd150;
    thr[1] = 18'd120;
    thr[2] = 18'd40;
    rst = 1'b1;
    read_enable = 1'b0;
    shift_enable = 1'b0;
    pixel_in = '0;
    repeat (3) @(posedge clk);
    #1;
    rst = 1'b0;
    frame(1'b1, 1'b1);   // leaf image
    frame(1'b1, 1'b0);   // random image, explicit start
    frame(1'b0, 1'b0);   // random image, counters wrap
    // abandoned partial frame (no complete window), then a restart
    for (int i = 0; i < W + 5; i++) send(int'($urandom_range(255)), i == 0, -1, -1);
    repeat (2) @(posedge clk);
    #1;
    frame(1'b1, 1'b1);
    require("stall cycles", n_stall);
    require("frame restarts", n_restart);
    require("frames by counter wrap", n_wrap);
    for (int o = 0; o < NOP; o++) begin
      require($sformatf("op %0d edge pixels", o), n_edge[o]);
      require($sformatf("op %0d non-edge pixels", o), n_flat[o]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
