// tb_track_ctrl: frame decisions of the controller. Checks: frames are
// ignored until a master is requested; a request (pending until the next
// frame start) makes that frame a capture frame; master_valid rises with
// master_done; later frames are tracked and counted when their
// correlation finishes; a new request drops master_valid and captures
// again; the mode stays fixed within a frame.
module tb_track_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic load_req = 0, frame_start = 0, master_done = 0, corr_done = 0;
  logic capture_en, track_en, master_valid;
  logic [15:0] frames_tracked;

  track_ctrl dut (.clk, .rst_n, .load_req, .frame_start, .master_done, .corr_done,
    .capture_en, .track_en, .master_valid, .frames_tracked);

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  task automatic expect_mode(bit cap, bit trk, bit mv, int ft, string what);
    checks++;
    if (capture_en != cap || track_en != trk || master_valid != mv || int'(frames_tracked) != ft) begin
      failures++;
      $display("FAIL %s: cap %b trk %b mv %b ft %0d", what, capture_en, track_en, master_valid, frames_tracked);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_mode(0, 0, 0, 0, "reset");
    pulse(frame_start);
    expect_mode(0, 0, 0, 0, "no master");
    pulse(corr_done);
    expect_mode(0, 0, 0, 0, "idle frame done");
    pulse(load_req);                     // pending until the next frame
    expect_mode(0, 0, 0, 0, "request pending");
    pulse(frame_start);
    expect_mode(1, 0, 0, 0, "capture frame");
    repeat (5) @(negedge clk);
    expect_mode(1, 0, 0, 0, "capture held");
    pulse(master_done);
    expect_mode(1, 0, 1, 0, "master captured");
    for (int f = 1; f <= 3; f++) begin
      pulse(frame_start);
      expect_mode(0, 1, 1, f - 1, "tracking");
      pulse(corr_done);
      expect_mode(0, 1, 1, f, "tracked");
    end
    pulse(load_req);
    expect_mode(0, 1, 1, 3, "request during tracking");
    pulse(frame_start);
    expect_mode(1, 0, 0, 3, "recapture");
    pulse(frame_start);                  // capture frame cut short
    expect_mode(0, 0, 0, 3, "no master after cut capture");
    // request and frame start in the same clock
    @(negedge clk); load_req = 1; frame_start = 1; @(negedge clk); load_req = 0; frame_start = 0;
    expect_mode(1, 0, 0, 3, "simultaneous");
    pulse(master_done);
    pulse(frame_start);
    expect_mode(0, 1, 1, 3, "tracking again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
