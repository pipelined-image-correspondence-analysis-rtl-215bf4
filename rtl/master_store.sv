// master_store: the master window. Holds I, D and O of the WIN x WIN pixels
// at the optical centre of the master frame.
//
// While `capture_en` is high, every feature pixel whose position falls in
// the centre window (columns X0..X0+WIN-1, lines Y0..Y0+WIN-1, with
// X0 = (IMG_W-WIN)/2 and Y0 = (IMG_H-WIN)/2) is written into a linear array
// at address (y-Y0)*WIN + (x-X0): the paper's two-dimensional master
// matrix stored as one dimension. `done` pulses one clock after the last
// pixel of the window is written. The correspondence engine reads one whole
// window line at a time: `row` is combinational from `row_sel` and the
// array. The paper fixes the window size and its place at the optical
// centre; the exact centre offsets and the line-wide read port are this
// design's choices.
module master_store
  import pica_pkg::*;
#(
  parameter int unsigned IMG_W = IMG_W_DEF,
  parameter int unsigned IMG_H = IMG_H_DEF,
  parameter int unsigned WIN   = WIN_DEF,
  localparam int unsigned XW = $clog2(IMG_W),
  localparam int unsigned YW = $clog2(IMG_H),
  localparam int unsigned RW = $clog2(WIN)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          capture_en,
  input  logic          in_valid,
  input  logic [XW-1:0] in_x,
  input  logic [YW-1:0] in_y,
  input  feat_t         in_feat,
  output logic          done,
  input  logic [RW-1:0] row_sel,
  output feat_t         row [WIN]
);

  localparam int unsigned X0 = (IMG_W - WIN) / 2;
  localparam int unsigned Y0 = (IMG_H - WIN) / 2;
  localparam int unsigned N  = WIN * WIN;
  localparam int unsigned AW = $clog2(N);

  feat_t mem [N];

  logic in_win;
  logic [AW-1:0] addr;
  always_comb begin
    in_win = (32'(in_x) >= X0) && (32'(in_x) < X0 + WIN) &&
             (32'(in_y) >= Y0) && (32'(in_y) < Y0 + WIN);
    addr   = AW'((32'(in_y) - Y0) * WIN + (32'(in_x) - X0));
  end

  always_ff @(posedge clk)
    if (capture_en && in_valid && in_win) mem[addr] <= in_feat;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) done <= 1'b0;
    else        done <= capture_en && in_valid && in_win && (addr == AW'(N - 1));

  always_comb
    for (int c = 0; c < WIN; c++) row[c] = mem[32'(row_sel) * WIN + c];

endmodule
