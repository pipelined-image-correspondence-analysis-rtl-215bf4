// corr_engine: correspondence of the master window with every window of the
// slave stripe, computed while the slave pixels stream in.
//
// The stripe is the WIN lines around the image centre (the horizontal
// epipolar line through the optical centre), lines Y0..Y0+WIN-1 with
// Y0 = (IMG_H-WIN)/2. It holds NWIN = IMG_W-WIN+1 windows; window k covers
// columns k..k+WIN-1. Slave pixel (r, x) of the stripe belongs to the WIN
// windows k = x-c, c = 0..WIN-1, where it meets master pixel (r, c). So each
// pixel is compared with the WIN master pixels of its line at once (WIN
// match_pixel units) and the WIN results go into WIN accumulators that
// shift along with the pixels:
//   acc[0] <= R(master[r][0], pixel)
//   acc[c] <= acc[c-1] + R(master[r][c], pixel)
// After pixel x, acc[WIN-1] holds the line-r part of window x-WIN+1. That
// part is added into a line-sum memory of NWIN words (read, add, write in
// one clock; every address is touched once per line). On the last stripe
// line the completed sum sum_{i,j} R(i,j) of window k is sent out instead,
// k = 0..NWIN-1 in order, `res_last` with the last. With the paper's
// sizes this is 9 accumulators, 312 window sums and 2880 stripe pixels per
// frame, as in its text; the accumulator chain and the line-sum memory are
// this design's way of doing it for pixels that arrive line by line.
//
// `row_sel` selects the master line that belongs to the current input
// pixel; `master_row` must return it combinationally. `enable` is held
// for a whole frame. Timing: a result leaves two clocks after the pixel
// that completes its window.
module corr_engine
  import pica_pkg::*;
#(
  parameter int unsigned IMG_W = IMG_W_DEF,
  parameter int unsigned IMG_H = IMG_H_DEF,
  parameter int unsigned WIN   = WIN_DEF,
  localparam int unsigned XW    = $clog2(IMG_W),
  localparam int unsigned YW    = $clog2(IMG_H),
  localparam int unsigned RW    = $clog2(WIN),
  localparam int unsigned NWIN  = IMG_W - WIN + 1,
  localparam int unsigned KW    = $clog2(NWIN),
  localparam int unsigned SUM_W = $clog2(WIN * WIN * 255 + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [7:0]       t,
  input  logic             in_valid,
  input  logic [XW-1:0]    in_x,
  input  logic [YW-1:0]    in_y,
  input  feat_t            in_feat,
  output logic [RW-1:0]    row_sel,
  input  feat_t            master_row [WIN],
  output logic             res_valid,
  output logic [KW-1:0]    res_idx,
  output logic [SUM_W-1:0] res_sum,
  output logic             res_last
);

  localparam int unsigned Y0 = (IMG_H - WIN) / 2;

  logic             in_stripe;
  logic [7:0]       r_pix [WIN];
  logic [SUM_W-1:0] acc [WIN];
  logic             a_valid;
  logic [KW-1:0]    a_k;
  logic [RW-1:0]    a_r;
  logic [SUM_W-1:0] sums [NWIN];

  always_comb begin
    in_stripe = in_valid && enable && (32'(in_y) >= Y0) && (32'(in_y) < Y0 + WIN);
    row_sel   = RW'(32'(in_y) - Y0);
  end

  for (genvar c = 0; c < WIN; c++) begin : g_match
    match_pixel u_match (.m(master_row[c]), .s(in_feat), .t(t), .r(r_pix[c]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < WIN; c++) acc[c] <= '0;
      a_valid <= 1'b0;
      a_k     <= '0;
      a_r     <= '0;
    end else begin
      a_valid <= 1'b0;
      if (in_stripe) begin
        acc[0] <= SUM_W'(r_pix[0]);
        for (int c = 1; c < WIN; c++) acc[c] <= acc[c-1] + SUM_W'(r_pix[c]);
        a_valid <= 32'(in_x) >= WIN - 1;
        a_k     <= KW'(32'(in_x) - (WIN - 1));
        a_r     <= row_sel;
      end
    end
  end

  logic [SUM_W-1:0] line_total;
  always_comb line_total = ((a_r == '0) ? '0 : sums[a_k]) + acc[WIN-1];

  always_ff @(posedge clk)
    if (a_valid && a_r != RW'(WIN - 1)) sums[a_k] <= line_total;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_idx   <= '0;
      res_sum   <= '0;
      res_last  <= 1'b0;
    end else begin
      res_valid <= a_valid && a_r == RW'(WIN - 1);
      res_last  <= a_valid && a_r == RW'(WIN - 1) && a_k == KW'(NWIN - 1);
      res_idx   <= a_k;
      res_sum   <= line_total;
    end
  end

endmodule
