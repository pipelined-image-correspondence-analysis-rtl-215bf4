// tb_pica_top: end-to-end run of the tracker on a small synthetic scene
// (40 x 16 frames, 9 x 9 window, 32 windows per stripe), with a fast
// serial link (20 clocks per bit) and at most one move per 10000 clocks.
//
// The scene is a fixed texture: a checkerboard of 5 x 3 blocks at grey
// levels 60 and 180 with a little per-pixel noise, so that no two windows
// are alike. Each frame shows it shifted by s pixels (frame x shows scene
// column x + s). A master taken at shift sm puts scene column 15 + sm at
// the window's left edge, so in a frame at shift s the best window must be
// index 15 + sm - s, with a sum of exactly zero. The testbench checks, for
// every tracked frame, the index, the sum, the average, the offset and the
// accumulated position, and decodes the serial line: every message must
// carry the position of the frame it was accepted from.
//
// It also counts how often each mechanism happened and fails if one never
// did: ignored frames before any master, master capture, master change,
// tracked frames, rate-limited drops, moves sent, right-border windows,
// and the three cases of the threshold rule (intensity, magnitude,
// orientation).
module tb_pica_top;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int W = 40, H = 16, WIN = 9, X0 = 15, DIV = 20;
  logic pix_valid = 0, pix_sof = 0, master_load = 0;
  logic [7:0] pix_data = 0, t = 8'd20;
  logic master_valid, result_valid, position_valid, motor_txd, motor_busy;
  logic capture_active, track_active;
  logic [4:0] min_idx;
  logic [14:0] min_sum;
  logic [7:0] min_avg;
  logic signed [5:0] offset;
  logic signed [15:0] position;
  logic [15:0] moves_sent, moves_dropped, frames_tracked, line_overruns, extra_pixels;

  pica_top #(.IMG_W(W), .IMG_H(H), .WIN(WIN), .CLK_HZ(20000), .BAUD(1000), .MOVES_PER_S(2)) dut (
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
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    repeat (30) @(negedge clk);
  endtask

  // expected results of tracked frames, in order
  int exp_idx [$];
  int exp_pos = 0;
  int pos_log [$];         // every position produced
  int n_results = 0;

  always @(negedge clk) if (rst_n && result_valid) begin
    int e;
    n_results++;
    checks++;
    if (exp_idx.size() == 0) begin failures++; $display("FAIL unexpected result"); end
    else begin
      e = exp_idx.pop_front();
      if (int'(min_idx) != e || min_sum != 0 || min_avg != 0) begin
        failures++;
        $display("FAIL result idx %0d exp %0d sum %0d", min_idx, e, min_sum);
      end
      exp_pos += e - X0;
    end
  end
  always @(negedge clk) if (rst_n && position_valid) begin
    checks++;
    if (int'(position) != exp_pos || int'(offset) != int'(min_idx) - X0) begin
      failures++;
      $display("FAIL position %0d exp %0d offset %0d", position, exp_pos, offset);
    end
    pos_log.push_back(int'(position));
  end

  // serial receiver for the motor line
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

  // mechanism counters
  int n_flush = 0, n_ri = 0, n_rd = 0, n_ro = 0, n_capture = 0, n_ignored = 0;
  logic cap_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_edge.u_win.flush_q) n_flush++;
    if (dut.u_corr.in_stripe)
      case ({dut.u_corr.g_match[4].u_match.m_edge, dut.u_corr.g_match[4].u_match.s_edge})
        2'b00: n_ri++;
        2'b11: n_ro++;
        default: n_rd++;
      endcase
    cap_q <= capture_active;
    if (capture_active && !cap_q) n_capture++;
    if (dut.frame_start && !master_valid && !dut.u_ctrl.pending && !master_load) n_ignored++;
  end

  task automatic mech(string name, int n);
    checks++;
    $display("mechanism %-22s %0d", name, n);
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", name); end
  endtask

  int shifts [] = '{2, -3, 5, 0, -6, 6, 1, -1};
  int sm;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    send_frame(0);                       // no master yet: ignored
    send_frame(1);
    checks++;
    if (n_results != 0 || master_valid) begin failures++; $display("FAIL result without master"); end
    // take a master at shift 0
    @(negedge clk); master_load = 1; @(negedge clk); master_load = 0;
    sm = 0;
    send_frame(sm);
    checks++;
    if (!master_valid) begin failures++; $display("FAIL no master"); end
    foreach (shifts[i]) begin exp_idx.push_back(X0 + sm - shifts[i]); send_frame(shifts[i]); end
    repeat (10500) @(negedge clk);       // let the rate limit expire
    exp_idx.push_back(X0 + sm - 4); send_frame(4);
    // change the master: take it at shift 3
    @(negedge clk); master_load = 1; @(negedge clk); master_load = 0;
    sm = 3;
    send_frame(sm);
    foreach (shifts[i]) begin exp_idx.push_back(X0 + sm - shifts[i]); send_frame(shifts[i]); end
    repeat (10500) @(negedge clk);
    exp_idx.push_back(X0 + sm - 2); send_frame(2);
    repeat (25 * DIV + 50) @(negedge clk);

    checks++;
    if (exp_idx.size() != 0 || n_results != 2 * shifts.size() + 2) begin
      failures++; $display("FAIL %0d results, %0d missing", n_results, exp_idx.size());
    end
    checks++;
    if (int'(frames_tracked) != n_results) begin failures++; $display("FAIL frames_tracked %0d", frames_tracked); end
    checks++;
    if (int'(moves_sent) + int'(moves_dropped) != n_results) begin
      failures++; $display("FAIL sent %0d + dropped %0d", moves_sent, moves_dropped);
    end
    checks++;
    if (rx.size() != 2 * int'(moves_sent)) begin failures++; $display("FAIL %0d bytes", rx.size()); end
    else begin
      // each message must be one of the produced positions, in order
      int j = 0;
      for (int m = 0; m < rx.size() / 2; m++) begin
        int p;
        p = int'($signed({rx[2 * m], rx[2 * m + 1]}));
        while (j < pos_log.size() && pos_log[j] != p) j++;
        checks++;
        if (j == pos_log.size()) begin failures++; $display("FAIL message %0d position %0d", m, p); end
      end
    end
    checks++;
    if (line_overruns != 0 || extra_pixels != 0) failures++;
    mech("ignored frame", n_ignored);
    mech("master capture", n_capture - 1);   // the second capture is the master change
    mech("tracked frame", n_results);
    mech("move sent", int'(moves_sent) - 1);
    mech("move dropped", int'(moves_dropped));
    mech("right-border window", n_flush);
    mech("R from intensity", n_ri);
    mech("R from magnitude", n_rd);
    mech("R from orientation", n_ro);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
