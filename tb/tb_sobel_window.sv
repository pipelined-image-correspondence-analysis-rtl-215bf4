// tb_sobel_window: random 8 x 6 frames with one idle clock after each line.
// Every window is compared with the neighbourhood taken here straight from
// the frame, with coordinates clamped to the frame (the replicated border).
// Checks that each centre appears once, in raster order, and that the first
// window appears one clock after the second pixel of the second line.
module tb_sobel_window;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int W = 8, H = 6;
  logic in_valid = 0, out_valid;
  logic [2:0] in_x = 0, out_x;
  logic [2:0] in_y = 0, out_y;
  logic [7:0] in_pix = 0;
  logic [7:0] win [3][3];
  logic [15:0] overrun;

  sobel_window #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .in_valid, .in_x, .in_y, .in_pix,
    .out_valid, .out_x, .out_y, .win, .overrun);

  int img [H][W];
  int nexp = 0, cyc = 0, first_at = -1, sent_11 = -1;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int clampi(int v, int hi); return v < 0 ? 0 : (v > hi ? hi : v); endfunction

  always @(negedge clk) if (out_valid) begin
    int cx, cy;
    bit ok;
    cx = nexp % W; cy = nexp / W;
    ok = int'(out_x) == cx && int'(out_y) == cy;
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++)
      if (int'(win[r][c]) != img[clampi(cy + r - 1, H - 1)][clampi(cx + c - 1, W - 1)]) ok = 0;
    checks++;
    if (!ok) begin failures++; $display("FAIL centre (%0d,%0d) exp (%0d,%0d)", out_x, out_y, cx, cy); end
    if (nexp == 0) first_at = cyc;
    nexp++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      nexp = 0;
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = $urandom_range(0, 255);
      if (f == 1) for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = x * 30 + y;
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = 1; in_x = 3'(x); in_y = 3'(y); in_pix = 8'(img[y][x]);
          if (x == 1 && y == 1) sent_11 = cyc;
        end
        @(negedge clk);
        in_valid = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
      repeat (3) @(negedge clk);
      checks++;
      if (nexp != W * (H - 1)) begin failures++; $display("FAIL %0d windows", nexp); end
      checks++;
      if (first_at - sent_11 != 1) begin failures++; $display("FAIL first window at +%0d", first_at - sent_11); end
    end
    checks++;
    if (overrun != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
