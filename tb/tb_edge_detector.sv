// tb_edge_detector: 16 x 10 frames (random and with sharp steps) through
// the whole pre-processing. For each pixel the reference is computed here
// from the frame: clamped Sobel gradients, then D and O from real
// arithmetic (within 1 count). Checks coordinates, intensity, the number
// of outputs and the latency from the completing pixel (CORDIC_ITER + 4).
module tb_edge_detector;
  import pica_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int W = 16, H = 10, ITER = 16;
  logic in_valid = 0, out_valid;
  logic [3:0] in_x = 0, out_x;
  logic [3:0] in_y = 0, out_y;
  logic [7:0] in_pix = 0;
  feat_t out_feat;
  logic [15:0] overrun;

  edge_detector #(.IMG_W(W), .IMG_H(H), .CORDIC_ITER(ITER)) dut (.clk, .rst_n,
    .in_valid, .in_x, .in_y, .in_pix, .out_valid, .out_x, .out_y, .out_feat, .overrun);

  int img [H][W];
  int nexp = 0, cyc = 0, first_at = -1, sent_11 = -1;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int px(int y, int x);
    return img[y < 0 ? 0 : (y >= H ? H - 1 : y)][x < 0 ? 0 : (x >= W ? W - 1 : x)];
  endfunction
  function automatic int iabs(int a); return a < 0 ? -a : a; endfunction

  always @(negedge clk) if (out_valid) begin
    int cx, cy, gx, gy, rd, ro;
    real th;
    cx = nexp % W; cy = nexp / W;
    gx = px(cy-1,cx+1) + 2*px(cy,cx+1) + px(cy+1,cx+1) - px(cy-1,cx-1) - 2*px(cy,cx-1) - px(cy+1,cx-1);
    gy = px(cy+1,cx-1) + 2*px(cy+1,cx) + px(cy+1,cx+1) - px(cy-1,cx-1) - 2*px(cy-1,cx) - px(cy-1,cx+1);
    rd = int'($floor($sqrt(real'(gx*gx + gy*gy)) + 0.5)) >> 2;
    if (rd > 255) rd = 255;
    if (gx == 0 && gy == 0) ro = 128;
    else begin
      if (gx == 0) th = (gy > 0) ? 1.5707963 : -1.5707963;
      else th = $atan(real'(gy) / real'(gx));
      ro = int'($floor((th + 1.5707963) / 3.14159265 * 255.0 + 0.5));
    end
    checks++;
    if (int'(out_x) != cx || int'(out_y) != cy || int'(out_feat.i) != img[cy][cx] ||
        iabs(int'(out_feat.d) - rd) > 1 || iabs(int'(out_feat.o) - ro) > 1) begin
      failures++;
      $display("FAIL (%0d,%0d) exp (%0d,%0d) i=%0d d=%0d/%0d o=%0d/%0d", out_x, out_y, cx, cy,
               out_feat.i, out_feat.d, rd, out_feat.o, ro);
    end
    if (nexp == 0) first_at = cyc;
    nexp++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      nexp = 0;
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++)
        case (f)
          0: img[y][x] = $urandom_range(0, 255);
          1: img[y][x] = ((x / 3 + y / 4) % 2) ? 230 : 20;
          default: img[y][x] = 100 + (x + y) % 7;
        endcase
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = 1; in_x = 4'(x); in_y = 4'(y); in_pix = 8'(img[y][x]);
          if (x == 1 && y == 1) sent_11 = cyc;
        end
        @(negedge clk);
        in_valid = 0;
      end
      repeat (ITER + 8) @(negedge clk);
      checks++;
      if (nexp != W * (H - 1)) begin failures++; $display("FAIL %0d outputs", nexp); end
      checks++;
      if (first_at - sent_11 != ITER + 4) begin failures++; $display("FAIL latency %0d", first_at - sent_11); end
    end
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
