// sobel_window: 3x3 neighbourhood generator for the Sobel filter.
//
// Two line buffers hold the previous two lines. When pixel (x,y) arrives,
// the column {line y-2, line y-1, line y} at x is shifted into a 3x3 register
// window, which then holds the neighbourhood of centre (x-1, y-1). The first
// window of a frame is therefore complete when the second pixel of the
// second line arrives, as the paper describes.
//
// Borders follow the paper's extra cells: the line above the first line
// repeats the first line, and the column left of the first column repeats
// the first column. The column right of the last one repeats the last
// column too; the paper allows zeros or the nearest value at corners, and
// this design takes the nearest value everywhere. The right-border window of
// each line is sent one clock after the last pixel of the line, so the
// input must leave at least one idle clock between lines (camera line
// blanking); a pixel that arrives in that slot is counted in `overrun`.
// The last line of a frame is never a centre: its window would need the
// next line. The tracker uses only the lines around the image centre.
//
// Timing: `out_valid` and the window follow the pixel that completes them
// by one clock. win[r][c]: r = 0 top line, c = 0 left column.
module sobel_window #(
  parameter int unsigned IMG_W = pica_pkg::IMG_W_DEF,
  parameter int unsigned IMG_H = pica_pkg::IMG_H_DEF,
  localparam int unsigned XW = $clog2(IMG_W),
  localparam int unsigned YW = $clog2(IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  input  logic [7:0]    in_pix,
  output logic          out_valid,
  output logic [XW-1:0] out_x,      // centre column
  output logic [YW-1:0] out_y,      // centre line
  output logic [7:0]    win [3][3],
  output logic [15:0]   overrun
);

  logic [7:0] lb1 [IMG_W];   // line y-1
  logic [7:0] lb2 [IMG_W];   // line y-2
  logic [7:0] col [3][3];    // col[c][r]: c = 0 oldest
  logic       flush_q;       // right-border window pending
  logic [YW-1:0] flush_y_q;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb1[in_x] <= in_pix;
      lb2[in_x] <= lb1[in_x];
    end
  end

  // column entering the window: top line repeats line 0 for the first centre line
  logic [7:0] nc [3];
  always_comb begin
    nc[0] = (in_y >= 2) ? lb2[in_x] : lb1[in_x];
    nc[1] = lb1[in_x];
    nc[2] = in_pix;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flush_q   <= 1'b0;
      flush_y_q <= '0;
      out_valid <= 1'b0;
      out_x     <= '0;
      out_y     <= '0;
      overrun   <= '0;
      for (int c = 0; c < 3; c++)
        for (int r = 0; r < 3; r++) col[c][r] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (flush_q) begin
        // right border: repeat the last column
        flush_q   <= 1'b0;
        col[0]    <= col[1];
        col[1]    <= col[2];
        out_valid <= 1'b1;
        out_x     <= XW'(IMG_W - 1);
        out_y     <= flush_y_q;
        if (in_valid) overrun <= overrun + 1'b1;
      end else if (in_valid) begin
        if (in_x == '0) begin
          col[1] <= nc;                                // left border repeats column 0
          col[2] <= nc;
        end else begin
          col[0] <= col[1];
          col[1] <= col[2];
          col[2] <= nc;
        end
        if (in_y != '0 && in_x != '0) begin
          out_valid <= 1'b1;
          out_x     <= in_x - 1'b1;
          out_y     <= in_y - 1'b1;
        end
        if (in_y != '0 && in_x == XW'(IMG_W - 1)) begin
          flush_q   <= 1'b1;
          flush_y_q <= in_y - 1'b1;
        end
      end
    end
  end

  always_comb
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) win[r][c] = col[c][r];

  // A pixel must not arrive in the clock reserved for the right-border window.
  a_line_gap: assert property (@(posedge clk) flush_q |-> !in_valid)
    else $error("sobel_window: pixel in the line-blanking slot");

endmodule
