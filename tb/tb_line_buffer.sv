// tb_line_buffer: streams random images through a 10x7 line buffer with
// random stalls (shift_enable low) and checks every window it produces
// against the image: the nine pixels around (win_x, win_y), the number of
// windows per frame, (W-2)*(H-2), and their raster order. The second frame
// follows the first without a start marker (counters wrap); the third starts
// with read_enable after an abandoned partial frame.
module tb_line_buffer;
  import edge_pkg::*;

  localparam int W = 10;
  localparam int H = 7;
  localparam int XW = $clog2(W);
  localparam int YW = $clog2(H);

  logic          clk = 0;
  logic          rst;
  logic          read_enable, shift_enable;
  pixel_t        pixel_in;
  window_t       win;
  logic          win_valid;
  logic [XW-1:0] win_x;
  logic [YW-1:0] win_y;

  int checks = 0;
  int failures = 0;
  int img [H][W];
  int n_win;
  int exp_x, exp_y;

  line_buffer #(.IMG_WIDTH(W), .IMG_HEIGHT(H)) dut (
    .clk(clk), .rst(rst), .read_enable(read_enable), .shift_enable(shift_enable),
    .pixel_in(pixel_in), .win(win), .win_valid(win_valid), .win_x(win_x), .win_y(win_y)
  );

  always #5 clk = ~clk;

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // window checker
  always @(posedge clk) begin
    #1;
    if (win_valid) begin
      checks++;
      if (int'(win_x) != exp_x || int'(win_y) != exp_y) begin
        failures++;
        $display("FAIL position (%0d,%0d) expected (%0d,%0d)", win_x, win_y, exp_x, exp_y);
      end
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) begin
          checks++;
          if (int'(win[3*r+c]) != img[int'(win_y)+r-1][int'(win_x)+c-1]) begin
            failures++;
            if (failures < 10)
              $display("FAIL window (%0d,%0d) tap %0d", win_x, win_y, 3*r+c);
          end
        end
      n_win++;
      exp_x++;
      if (exp_x == W - 1) begin
        exp_x = 1;
        exp_y++;
      end
    end
  end

  task automatic send(input int px, input logic sof);
    while ($urandom_range(3) == 0) begin
      shift_enable = 1'b0;
      read_enable = 1'b0;
      pixel_in = 8'($urandom);
      @(posedge clk);
      #1;
    end
    shift_enable = 1'b1;
    read_enable = sof;
    pixel_in = 8'(px);
    @(posedge clk);
    #1;
    shift_enable = 1'b0;
    read_enable = 1'b0;
  endtask

  task automatic frame(input logic sof);
    for (int yy = 0; yy < H; yy++)
      for (int xx = 0; xx < W; xx++)
        img[yy][xx] = int'($urandom_range(255));
    n_win = 0;
    exp_x = 1;
    exp_y = 1;
    for (int yy = 0; yy < H; yy++)
      for (int xx = 0; xx < W; xx++)
        send(img[yy][xx], sof && yy == 0 && xx == 0);
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (n_win != (W - 2) * (H - 2)) begin
      failures++;
      $display("FAIL %0d windows, expected %0d", n_win, (W - 2) * (H - 2));
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
    frame(1'b1);
    frame(1'b0);   // counters wrap into a new frame
    // abandoned partial frame, then a restart with read_enable
    for (int i = 0; i < W + 3; i++) send(int'($urandom_range(255)), i == 0);
    repeat (2) @(posedge clk);
    #1;
    frame(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
