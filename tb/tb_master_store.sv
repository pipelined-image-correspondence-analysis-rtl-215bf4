// tb_master_store: a 20 x 16 feature frame is offered with capture on; every
// line of the 9 x 9 centre window (columns 5..13, lines 3..11) is read back
// and compared with the frame. `done` must pulse once, right after the last
// window pixel. A second frame offered with capture off must leave the
// window unchanged.
module tb_master_store;
  import pica_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int W = 20, H = 16, WIN = 9, X0 = 5, Y0 = 3;
  logic capture_en = 0, in_valid = 0, done;
  logic [4:0] in_x = 0;
  logic [3:0] in_y = 0;
  feat_t in_feat = '0;
  logic [3:0] row_sel = 0;
  feat_t row [WIN];

  master_store #(.IMG_W(W), .IMG_H(H), .WIN(WIN)) dut (.clk, .rst_n, .capture_en, .in_valid,
    .in_x, .in_y, .in_feat, .done, .row_sel, .row);

  feat_t frame [H][W];
  int ndone = 0, done_x = -1, done_y = -1;
  logic [4:0] px; logic [3:0] py;
  always @(posedge clk) begin
    if (rst_n && done) begin ndone++; done_x = int'(px); done_y = int'(py); end
    px <= in_x; py <= in_y;
  end

  task automatic send_frame(bit cap);
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) frame[y][x] = feat_t'($urandom);
    capture_en = cap;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
      @(negedge clk);
      in_valid = 1; in_x = 5'(x); in_y = 4'(y); in_feat = frame[y][x];
    end
    @(negedge clk);
    in_valid = 0;
    @(negedge clk);
  endtask

  feat_t keep [WIN][WIN];

  task automatic check_window();
    for (int r = 0; r < WIN; r++) begin
      row_sel = 4'(r);
      #1;
      for (int c = 0; c < WIN; c++) begin
        checks++;
        if (row[c] !== keep[r][c]) begin
          failures++;
          $display("FAIL r=%0d c=%0d %h exp %h", r, c, row[c], keep[r][c]);
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    send_frame(1);
    for (int r = 0; r < WIN; r++) for (int c = 0; c < WIN; c++) keep[r][c] = frame[Y0 + r][X0 + c];
    check_window();
    checks++;
    if (ndone != 1 || done_x != X0 + WIN - 1 || done_y != Y0 + WIN - 1) begin
      failures++; $display("FAIL done %0d at (%0d,%0d)", ndone, done_x, done_y);
    end
    send_frame(0);
    check_window();
    checks++;
    if (ndone != 1) begin failures++; $display("FAIL done without capture"); end
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
