// sobel_grad: Sobel gradients of a 3x3 window, one window per clock.
//
//   Dx = (p[0][2] + 2 p[1][2] + p[2][2]) - (p[0][0] + 2 p[1][0] + p[2][0])
//   Dy = (p[2][0] + 2 p[2][1] + p[2][2]) - (p[0][0] + 2 p[0][1] + p[0][2])
//
// p[r][c] with r the line (0 = top) and c the column (0 = left). Dx is the
// horizontal gradient, Dy the vertical one, each in -1020..1020 (11-bit
// signed). These are the paper's Sobel equations with the usual 1-2-1
// weights and with the sign of the last term of Dx read as + (a gradient
// must sum to zero). Its filter figure shows 1-1-1 weights instead; the
// equations are followed here. One register stage: one clock of latency, as
// in the paper's timing table. The side-band `in_tag` is delayed with
// the data.
module sobel_grad #(
  parameter int unsigned TAG_W = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [TAG_W-1:0]  in_tag,
  input  logic [7:0]        win [3][3],
  output logic              out_valid,
  output logic [TAG_W-1:0]  out_tag,
  output logic signed [10:0] dx,
  output logic signed [10:0] dy
);

  function automatic logic signed [10:0] tri_sum(input logic [7:0] a, input logic [7:0] b,
                                                 input logic [7:0] c);
    return 11'(a) + 11'({b, 1'b0}) + 11'(c);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      dx        <= '0;
      dy        <= '0;
    end else begin
      out_valid <= in_valid;
      out_tag   <= in_tag;
      dx <= tri_sum(win[0][2], win[1][2], win[2][2]) - tri_sum(win[0][0], win[1][0], win[2][0]);
      dy <= tri_sum(win[2][0], win[2][1], win[2][2]) - tri_sum(win[0][0], win[0][1], win[0][2]);
    end
  end

endmodule
