// tb_pica_full: the tracker at its full size and default settings: 320 x
// 240 frames, 9 x 9 window, 312 windows, 16 CORDIC stages, 50 MHz clock,
// 9600 baud, at most 6 moves a second (one per 8,333,333 clocks).
//
// Same synthetic scene as tb_pica_top (a noisy checkerboard shifted by s
// pixels per frame). A master is taken at shift 0; the best window of a
// frame at shift s must then be index 155 - s with a zero sum. Frames at
// shifts 3 and -5 follow; the second comes long before the motor may move
// again and must be dropped. After 8.4 million idle clocks a frame at
// shift 7 must be sent. The serial line is decoded here: two messages,
// positions -3 and -5 (-3 + 5 - 7). One frame takes about 77,000 clocks.
module tb_pica_full;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int W = 320, H = 240, X0 = 155, DIV = 50_000_000 / 9600;
  logic pix_valid = 0, pix_sof = 0, master_load = 0;
  logic [7:0] pix_data = 0, t = 8'd20;
  logic master_valid, result_valid, position_valid, motor_txd, motor_busy;
  logic capture_active, track_active;
  logic [8:0] min_idx;
  logic [14:0] min_sum;
  logic [7:0] min_avg;
  logic signed [9:0] offset;
  logic signed [15:0] position;
  logic [15:0] moves_sent, moves_dropped, frames_tracked, line_overruns, extra_pixels;

  pica_top dut (
    .clk, .rst_n, .pix_valid, .pix_sof, .pix_data, .t, .master_load,
    .master_valid, .result_valid, .min_idx, .min_sum, .min_avg, .offset, .position, .position_valid,
    .motor_txd, .motor_busy, .moves_sent, .moves_dropped,
    .capture_active, .track_active, .frames_tracked, .line_overruns, .extra_pixels);

  function automatic int tex(int wx, int y);
    int h;
    h = ((wx + 64) * 73856093) ^ (y * 19349663);
    h = (h >> 7) & 7;
    return ((((wx + 64) / 5) + (y / 3)) % 2 ? 180 : 60) + h;
  endfunction

  task automatic send_frame(int s);
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        pix_valid = 1; pix_sof = (x == 0 && y == 0); pix_data = 8'(tex(x + s, y));
      end
      @(negedge clk);
      pix_valid = 0; pix_sof = 0;
      repeat (2) @(negedge clk);
    end
    repeat (30) @(negedge clk);
  endtask

  int exp_idx [$];
  int n_results = 0;
  always @(negedge clk) if (rst_n && result_valid) begin
    int e;
    n_results++;
    checks++;
    e = (exp_idx.size() != 0) ? exp_idx.pop_front() : -1;
    if (int'(min_idx) != e || min_sum != 0) begin
      failures++;
      $display("FAIL result idx %0d exp %0d sum %0d", min_idx, e, min_sum);
    end
  end

  byte unsigned rx [$];
  initial begin
    @(posedge rst_n);
    forever begin
      logic [7:0] b;
      @(negedge clk);
      if (motor_txd == 1'b0) begin
        repeat (DIV / 2) @(negedge clk);
        for (int i = 0; i < 8; i++) begin repeat (DIV) @(negedge clk); b[i] = motor_txd; end
        repeat (DIV) @(negedge clk);
        rx.push_back(b);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); master_load = 1; @(negedge clk); master_load = 0;
    send_frame(0);
    checks++;
    if (!master_valid) begin failures++; $display("FAIL no master"); end
    exp_idx.push_back(X0 - 3); send_frame(3);
    exp_idx.push_back(X0 + 5); send_frame(-5);
    repeat (8_400_000) @(negedge clk);
    exp_idx.push_back(X0 - 7); send_frame(7);
    repeat (25 * DIV) @(negedge clk);
    checks++;
    if (n_results != 3 || moves_sent != 2 || moves_dropped != 1) begin
      failures++; $display("FAIL results %0d sent %0d dropped %0d", n_results, moves_sent, moves_dropped);
    end
    checks++;
    if (rx.size() != 4 || $signed({rx[0], rx[1]}) != -16'sd3 || $signed({rx[2], rx[3]}) != -16'sd5) begin
      failures++; $display("FAIL serial messages, %0d bytes", rx.size());
    end
    checks++;
    if (line_overruns != 0 || extra_pixels != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
