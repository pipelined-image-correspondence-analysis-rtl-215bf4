// pica_top: real-time image correspondence tracker.
//
// A camera streams 8-bit grey frames (320 x 240) line by line. The tracker
// keeps a 9x9 master window taken from the optical centre of one frame and,
// in every later frame, finds which 9x9 window along the centre line (the
// horizontal epipolar line) matches it best. The offset of that window from
// the centre says how far the camera must turn; the new position goes out
// over a 9600 baud serial line to the motor controller.
//
// Data path: pixel_rx (coordinates) -> edge_detector (Sobel window,
// gradients, CORDIC magnitude and orientation: I, D, O per pixel) ->
// master_store (capture frames) and corr_engine (slave frames; per-pixel R
// with threshold `t`, summed over the 312 windows while the pixels stream
// in) -> min_finder (least sum, its index, average R) -> position_calc ->
// motor_link (rate limit, uart_tx). track_ctrl decides per frame whether it
// is captured, tracked or ignored. No frame is stored: only the master
// window, two image lines and the 312 window sums are kept on chip.
//
// Timing: one pixel per clock at most, with at least one idle clock between
// lines. The result of a frame is ready a few tens of clocks after the last
// pixel of its centre stripe arrives (`result_valid`). All in one clock
// domain with an active-low asynchronous reset.
module pica_top
  import pica_pkg::*;
#(
  parameter int unsigned IMG_W       = IMG_W_DEF,
  parameter int unsigned IMG_H       = IMG_H_DEF,
  parameter int unsigned WIN         = WIN_DEF,
  parameter int unsigned CORDIC_ITER = CORDIC_ITER_DEF,
  parameter int unsigned D_SHIFT     = 2,
  parameter int unsigned CLK_HZ      = CLK_HZ_DEF,
  parameter int unsigned BAUD        = BAUD_DEF,
  parameter int unsigned MOVES_PER_S = 6,
  parameter int unsigned POS_W       = 16,
  localparam int unsigned NWIN  = IMG_W - WIN + 1,
  localparam int unsigned KW    = $clog2(NWIN),
  localparam int unsigned SUM_W = $clog2(WIN * WIN * 255 + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // camera pixel stream
  input  logic                    pix_valid,
  input  logic                    pix_sof,
  input  logic [7:0]              pix_data,
  // control
  input  logic [7:0]              t,            // edge threshold on D
  input  logic                    master_load,  // take the next frame as master
  // results
  output logic                    master_valid,
  output logic                    result_valid,
  output logic [KW-1:0]           min_idx,
  output logic [SUM_W-1:0]        min_sum,
  output logic [7:0]              min_avg,
  output logic signed [KW:0]      offset,
  output logic signed [POS_W-1:0] position,
  output logic                    position_valid,
  // motor link
  output logic                    motor_txd,
  output logic                    motor_busy,
  output logic [15:0]             moves_sent,
  output logic [15:0]             moves_dropped,
  // status
  output logic                    capture_active,
  output logic                    track_active,
  output logic [15:0]             frames_tracked,
  output logic [15:0]             line_overruns,
  output logic [15:0]             extra_pixels
);

  localparam int unsigned XW = $clog2(IMG_W);
  localparam int unsigned YW = $clog2(IMG_H);
  localparam int unsigned RW = $clog2(WIN);

  // pixel receiver
  logic          rx_valid;
  logic [XW-1:0] rx_x;
  logic [YW-1:0] rx_y;
  logic [7:0]    rx_pix;

  pixel_rx #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_rx (
    .clk, .rst_n,
    .in_valid(pix_valid), .in_sof(pix_sof), .in_pix(pix_data),
    .out_valid(rx_valid), .out_x(rx_x), .out_y(rx_y), .out_pix(rx_pix),
    .extra_pix(extra_pixels)
  );

  // pre-processing
  logic          f_valid;
  logic [XW-1:0] f_x;
  logic [YW-1:0] f_y;
  feat_t         f_feat;

  edge_detector #(.IMG_W(IMG_W), .IMG_H(IMG_H), .CORDIC_ITER(CORDIC_ITER),
                  .D_SHIFT(D_SHIFT)) u_edge (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_x(rx_x), .in_y(rx_y), .in_pix(rx_pix),
    .out_valid(f_valid), .out_x(f_x), .out_y(f_y), .out_feat(f_feat),
    .overrun(line_overruns)
  );

  // control
  logic frame_start, master_done, corr_done;
  assign frame_start = f_valid && f_x == '0 && f_y == '0;

  track_ctrl u_ctrl (
    .clk, .rst_n,
    .load_req(master_load), .frame_start, .master_done, .corr_done,
    .capture_en(capture_active), .track_en(track_active),
    .master_valid, .frames_tracked
  );

  // master window
  logic [RW-1:0] row_sel;
  feat_t         master_row [WIN];

  master_store #(.IMG_W(IMG_W), .IMG_H(IMG_H), .WIN(WIN)) u_master (
    .clk, .rst_n,
    .capture_en(capture_active),
    .in_valid(f_valid), .in_x(f_x), .in_y(f_y), .in_feat(f_feat),
    .done(master_done),
    .row_sel, .row(master_row)
  );

  // correspondence
  logic             r_valid, r_last;
  logic [KW-1:0]    r_idx;
  logic [SUM_W-1:0] r_sum;

  corr_engine #(.IMG_W(IMG_W), .IMG_H(IMG_H), .WIN(WIN)) u_corr (
    .clk, .rst_n,
    .enable(track_active), .t,
    .in_valid(f_valid), .in_x(f_x), .in_y(f_y), .in_feat(f_feat),
    .row_sel, .master_row,
    .res_valid(r_valid), .res_idx(r_idx), .res_sum(r_sum), .res_last(r_last)
  );

  assign corr_done = r_valid && r_last;

  // decision
  min_finder #(.NWIN(NWIN), .WIN(WIN)) u_min (
    .clk, .rst_n,
    .in_valid(r_valid), .in_idx(r_idx), .in_sum(r_sum), .in_last(r_last),
    .done(result_valid), .min_idx, .min_sum, .min_avg
  );

  position_calc #(.IMG_W(IMG_W), .WIN(WIN), .POS_W(POS_W)) u_pos (
    .clk, .rst_n,
    .in_valid(result_valid), .in_idx(min_idx),
    .out_valid(position_valid), .offset, .position
  );

  motor_link #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .MOVES_PER_S(MOVES_PER_S),
               .POS_W(POS_W)) u_motor (
    .clk, .rst_n,
    .cmd_valid(position_valid), .cmd_pos(position),
    .txd(motor_txd), .busy(motor_busy), .sent(moves_sent), .dropped(moves_dropped)
  );

endmodule
