// tb_pica_rate: the frame sizes and rates the tracker is meant for.
//
// Part 1, 320 x 240 at 25 frames/s. A 50 MHz clock and pixels arriving at
// about 20 MHz (two pixels in every five clocks, as from the camera link),
// with one frame every 2,000,000 clocks (40 ms). A master frame is followed
// by tracked frames at several shifts. Each must give the right window
// (index 155 - shift, sum 0). Each result must come within its own frame
// period, and at most 100 clocks after the last pixel of stripe line 124
// has arrived (the features of a line are complete when the next line has
// arrived).
//
// Part 2, 640 x 480 (VGA) at one pixel per clock, on a second instance with
// IMG_W = 640 and IMG_H = 480 (632 windows, centre window 315). A master and
// two tracked frames; each must be found, and a VGA frame must pass within
// the 40 ms of a 25 frames/s camera.
//
// The scene is a checkerboard of 5 x 3 blocks with per-pixel noise from a
// mixing hash (no repeat within 640 columns, so no window of a VGA line
// matches another), shifted sideways by s pixels per frame.
module tb_pica_rate;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;   // 50 MHz

  function automatic int tex(int wx, int y);
    int h;
    h = ((wx + 64) * 73856093) ^ (y * 19349663);
    h = h ^ (h >>> 13);
    h = h * 32'h5bd1e995;
    h = (h >>> 15) & 7;
    return ((((wx + 64) / 5) + (y / 3)) % 2 ? 180 : 60) + h;
  endfunction

  // ---------------- part 1: 320 x 240, 20 MHz pixels, 25 frames/s
  localparam int W1 = 320, H1 = 240, X01 = 155, PERIOD = 2_000_000;
  logic a_valid = 0, a_sof = 0, a_load = 0;
  logic [7:0] a_pix = 0;
  logic a_result, a_master_valid;
  logic [8:0] a_idx;
  logic [14:0] a_sum;

  pica_top u_a (
    .clk, .rst_n, .pix_valid(a_valid), .pix_sof(a_sof), .pix_data(a_pix), .t(8'd20), .master_load(a_load),
    .master_valid(a_master_valid), .result_valid(a_result), .min_idx(a_idx), .min_sum(a_sum),
    .min_avg(), .offset(), .position(), .position_valid(), .motor_txd(), .motor_busy(),
    .moves_sent(), .moves_dropped(), .capture_active(), .track_active(), .frames_tracked(),
    .line_overruns(), .extra_pixels());

  // ---------------- part 2: 640 x 480 at one pixel per clock
  localparam int W2 = 640, H2 = 480, X02 = 315;
  logic b_valid = 0, b_sof = 0, b_load = 0;
  logic [7:0] b_pix = 0;
  logic b_result, b_master_valid;
  logic [9:0] b_idx;
  logic [14:0] b_sum;

  pica_top #(.IMG_W(W2), .IMG_H(H2)) u_b (
    .clk, .rst_n, .pix_valid(b_valid), .pix_sof(b_sof), .pix_data(b_pix), .t(8'd20), .master_load(b_load),
    .master_valid(b_master_valid), .result_valid(b_result), .min_idx(b_idx), .min_sum(b_sum),
    .min_avg(), .offset(), .position(), .position_valid(), .motor_txd(), .motor_busy(),
    .moves_sent(), .moves_dropped(), .capture_active(), .track_active(), .frames_tracked(),
    .line_overruns(), .extra_pixels());

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint a_stripe_end, a_frame_start;
  int a_exp = -1, a_results = 0;
  always @(negedge clk) if (rst_n && a_result) begin
    a_results++;
    checks++;
    if (int'(a_idx) != a_exp || a_sum != 0) begin
      failures++; $display("FAIL 320x240 idx %0d exp %0d sum %0d", a_idx, a_exp, a_sum);
    end
    checks++;
    if (cyc - a_stripe_end > 100 || cyc - a_frame_start > PERIOD) begin
      failures++; $display("FAIL 320x240 result %0d clocks after the stripe", cyc - a_stripe_end);
    end
    $display("320x240: result %0d clocks after the frame start, %0d after the last stripe pixel",
             cyc - a_frame_start, cyc - a_stripe_end);
  end

  int b_exp = -1, b_results = 0;
  always @(negedge clk) if (rst_n && b_result) begin
    b_results++;
    checks++;
    if (int'(b_idx) != b_exp || b_sum != 0) begin
      failures++; $display("FAIL 640x480 idx %0d exp %0d sum %0d", b_idx, b_exp, b_sum);
    end
  end

  // one frame at 20 MHz pixel rate, padded to one frame period
  task automatic frame_a(int s);
    a_frame_start = cyc;
    for (int y = 0; y < H1; y++)
      for (int x = 0; x < W1; x++) begin
        @(negedge clk);
        a_valid = 1; a_sof = (x == 0 && y == 0); a_pix = 8'(tex(x + s, y));
        if (y == (H1 - 9) / 2 + 9 && x == W1 - 1) a_stripe_end = cyc;
        @(negedge clk);
        a_valid = 0; a_sof = 0;
        if (x % 2 == 1) @(negedge clk);
      end
    while (cyc < a_frame_start + PERIOD - 1) @(negedge clk);
  endtask

  task automatic frame_b(int s);
    longint t0;
    t0 = cyc;
    for (int y = 0; y < H2; y++) begin
      for (int x = 0; x < W2; x++) begin
        @(negedge clk);
        b_valid = 1; b_sof = (x == 0 && y == 0); b_pix = 8'(tex(x + s, y));
      end
      @(negedge clk);
      b_valid = 0; b_sof = 0;
    end
    repeat (40) @(negedge clk);
    checks++;
    if (cyc - t0 > PERIOD) begin failures++; $display("FAIL VGA frame took %0d clocks", cyc - t0); end
  endtask

  int sh [] = '{4, -7};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // part 1
    @(negedge clk); a_load = 1; @(negedge clk); a_load = 0;
    frame_a(0);
    checks++;
    if (!a_master_valid) begin failures++; $display("FAIL no master (320x240)"); end
    foreach (sh[i]) begin a_exp = X01 - sh[i]; frame_a(sh[i]); end
    checks++;
    if (a_results != sh.size()) begin failures++; $display("FAIL %0d results (320x240)", a_results); end
    // part 2
    @(negedge clk); b_load = 1; @(negedge clk); b_load = 0;
    frame_b(0);
    checks++;
    if (!b_master_valid) begin failures++; $display("FAIL no master (640x480)"); end
    foreach (sh[i]) begin b_exp = X02 - sh[i]; frame_b(sh[i]); end
    repeat (100) @(negedge clk);
    checks++;
    if (b_results != sh.size()) begin failures++; $display("FAIL %0d results (640x480)", b_results); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
