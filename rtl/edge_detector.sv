// edge_detector: data pre-processing. Turns the intensity stream into the
// three features of every pixel: intensity I, edge magnitude D and edge
// orientation O.
//
// sobel_window builds the 3x3 neighbourhood from two line buffers,
// sobel_grad forms the Sobel gradients Dx and Dy, and cordic_vec turns them
// into D and O. The centre pixel's intensity and coordinates travel with the
// data as a side-band tag, so each output carries the position it belongs
// to. Output is in raster order, one pixel per clock at most; the features
// of line y come out while line y+1 is received.
//
// Timing: a window leaves sobel_window one clock after the pixel that
// completes it and reaches the output CORDIC_ITER + 3 clocks later. The
// input needs one idle clock between lines (see sobel_window).
module edge_detector
  import pica_pkg::*;
#(
  parameter int unsigned IMG_W       = IMG_W_DEF,
  parameter int unsigned IMG_H       = IMG_H_DEF,
  parameter int unsigned CORDIC_ITER = CORDIC_ITER_DEF,
  parameter int unsigned D_SHIFT     = 2,
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
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y,
  output feat_t         out_feat,
  output logic [15:0]   overrun
);

  localparam int unsigned TW = XW + YW + 8;

  logic          w_valid;
  logic [XW-1:0] w_x;
  logic [YW-1:0] w_y;
  logic [7:0]    w_win [3][3];

  sobel_window #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_win (
    .clk, .rst_n,
    .in_valid, .in_x, .in_y, .in_pix,
    .out_valid(w_valid), .out_x(w_x), .out_y(w_y), .win(w_win),
    .overrun
  );

  logic                 g_valid;
  logic [TW-1:0]        g_tag;
  logic signed [10:0]   g_dx, g_dy;

  sobel_grad #(.TAG_W(TW)) u_grad (
    .clk, .rst_n,
    .in_valid(w_valid), .in_tag({w_x, w_y, w_win[1][1]}), .win(w_win),
    .out_valid(g_valid), .out_tag(g_tag), .dx(g_dx), .dy(g_dy)
  );

  logic [TW-1:0] c_tag;
  logic [7:0]    c_d, c_o;

  cordic_vec #(.ITER(CORDIC_ITER), .D_SHIFT(D_SHIFT), .TAG_W(TW)) u_cordic (
    .clk, .rst_n,
    .in_valid(g_valid), .in_tag(g_tag), .dx(g_dx), .dy(g_dy),
    .out_valid, .out_tag(c_tag), .d(c_d), .o(c_o)
  );

  assign {out_x, out_y, out_feat.i} = c_tag;
  assign out_feat.d = c_d;
  assign out_feat.o = c_o;

endmodule
