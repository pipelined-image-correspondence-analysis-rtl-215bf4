// tb_corr_engine: random master window and random 24 x 12 feature frames
// with several thresholds. The sum of R over each of the 16 windows of the
// stripe (lines 1..9) is computed here directly from the definition
// (a double loop over the 9 x 9 window) and compared with each result, in
// order, with `res_last` on the last. Also checks that the result of a window
// comes two clocks after the pixel that completes it, and that nothing
// comes out with `enable` low.
module tb_corr_engine;
  import pica_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int W = 24, H = 12, WIN = 9, Y0 = 1, NWIN = W - WIN + 1;
  logic enable = 0, in_valid = 0;
  logic [7:0] t = 0;
  logic [4:0] in_x = 0;
  logic [3:0] in_y = 0;
  feat_t in_feat = '0;
  logic [3:0] row_sel;
  feat_t master_row [WIN];
  logic res_valid, res_last;
  logic [3:0] res_idx;
  logic [14:0] res_sum;

  corr_engine #(.IMG_W(W), .IMG_H(H), .WIN(WIN)) dut (.clk, .rst_n, .enable, .t, .in_valid,
    .in_x, .in_y, .in_feat, .row_sel, .master_row, .res_valid, .res_idx, .res_sum, .res_last);

  feat_t master [WIN][WIN];
  feat_t frame [H][W];
  always_comb for (int c = 0; c < WIN; c++) master_row[c] = master[row_sel][c];

  function automatic int rpix(feat_t a, feat_t b, int th);
    int da = a.d, db = b.d;
    if (da > th && db > th) return (a.o > b.o) ? a.o - b.o : b.o - a.o;
    if (da <= th && db <= th) return (a.i > b.i) ? a.i - b.i : b.i - a.i;
    return (da > db) ? da - db : db - da;
  endfunction

  int expect_sum [NWIN];
  int nres = 0, cyc = 0, sent_at [NWIN];
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (res_valid) begin
    checks++;
    if (!enable || int'(res_idx) != nres || int'(res_sum) != expect_sum[nres] ||
        res_last != (nres == NWIN - 1)) begin
      failures++;
      $display("FAIL idx %0d/%0d sum %0d/%0d last %b", res_idx, nres, res_sum, expect_sum[nres], res_last);
    end
    checks++;
    if (cyc - sent_at[nres] != 2) begin failures++; $display("FAIL latency %0d", cyc - sent_at[nres]); end
    nres++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      for (int r = 0; r < WIN; r++) for (int c = 0; c < WIN; c++) master[r][c] = feat_t'($urandom);
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) frame[y][x] = feat_t'($urandom);
      if (f == 1) // one window equal to the master: its sum must be zero
        for (int r = 0; r < WIN; r++) for (int c = 0; c < WIN; c++) frame[Y0 + r][7 + c] = master[r][c];
      t = (f == 2) ? 8'd0 : (f == 3) ? 8'd255 : 8'($urandom);
      for (int k = 0; k < NWIN; k++) begin
        expect_sum[k] = 0;
        for (int r = 0; r < WIN; r++) for (int c = 0; c < WIN; c++)
          expect_sum[k] += rpix(master[r][c], frame[Y0 + r][k + c], int'(t));
      end
      if (f == 1) begin checks++; if (expect_sum[7] != 0) failures++; end
      enable = (f != 4);
      nres = 0;
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          in_valid = ($urandom_range(0, 3) != 0);
          if (!in_valid) begin @(negedge clk); in_valid = 1; end
          in_x = 5'(x); in_y = 4'(y); in_feat = frame[y][x];
          if (y == Y0 + WIN - 1 && x >= WIN - 1) sent_at[x - WIN + 1] = cyc;
        end
        @(negedge clk);
        in_valid = 0;
      end
      repeat (4) @(negedge clk);
      checks++;
      if (nres != (enable ? NWIN : 0)) begin failures++; $display("FAIL %0d results", nres); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
