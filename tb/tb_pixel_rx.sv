// tb_pixel_rx: frames of 7 x 4 pixels with random gaps. Checks the column
// and line of every pixel, that a start-of-frame flag restarts the count
// in the middle of a frame, and that pixels past the last line are dropped
// and counted.
module tb_pixel_rx;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int W = 7, H = 4;
  logic in_valid = 0, in_sof = 0, out_valid;
  logic [7:0] in_pix = 0, out_pix;
  logic [2:0] out_x;
  logic [1:0] out_y;
  logic [15:0] extra_pix;

  pixel_rx #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .in_valid, .in_sof, .in_pix,
    .out_valid, .out_x, .out_y, .out_pix, .extra_pix);

  int ex [$], ey [$], ep [$];

  task automatic send(int x, int y, bit sof, bit expect_out);
    @(negedge clk);
    in_valid = 1; in_sof = sof; in_pix = 8'($urandom);
    if (expect_out) begin ex.push_back(x); ey.push_back(y); ep.push_back(in_pix); end
    @(negedge clk);
    in_valid = 0; in_sof = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (ex.size() == 0) begin failures++; $display("FAIL unexpected pixel %0d %0d at %0t", out_x, out_y, $time); end
    else begin
      int x, y, p;
      x = ex.pop_front(); y = ey.pop_front(); p = ep.pop_front();
      if (int'(out_x) != x || int'(out_y) != y || int'(out_pix) != p) begin
        failures++;
        $display("FAIL got (%0d,%0d,%0d) exp (%0d,%0d,%0d)", out_x, out_y, out_pix, x, y, p);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    send(0, 0, 0, 0);  // before any frame: dropped
    for (int f = 0; f < 3; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) send(x, y, x == 0 && y == 0, 1);
    send(0, 0, 0, 0);  // past the last line: dropped
    send(0, 0, 0, 0);
    // frame cut short, then restarted
    for (int x = 0; x < 5; x++) send(x, 0, x == 0, 1);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) send(x, y, x == 0 && y == 0, 1);
    repeat (4) @(negedge clk);
    checks++;
    if (extra_pix != 3 || ex.size() != 0) begin
      failures++;
      $display("FAIL extra=%0d left=%0d", extra_pix, ex.size());
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
