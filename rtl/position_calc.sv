// position_calc: new camera position from the best window.
//
// Window X0 = (IMG_W-WIN)/2 is the one centred on the optical centre, where
// the master window sits; the best window's index minus X0 is how many
// pixels the object has moved along the epipolar line (`offset`, signed).
// The position register adds offset * POS_GAIN to the last position,
// saturating at the limits of its POS_W-bit signed range, and `out_valid`
// pulses with the new value one clock after `in_valid`. The paper asks
// for "the new position value of the camera" from the index of the least
// value; the relative-offset rule, the gain (motor steps per pixel) and
// the saturation are this design's choices.
module position_calc #(
  parameter int unsigned IMG_W    = pica_pkg::IMG_W_DEF,
  parameter int unsigned WIN      = pica_pkg::WIN_DEF,
  parameter int unsigned POS_W    = 16,
  parameter int          POS_GAIN = 1,
  localparam int unsigned NWIN = IMG_W - WIN + 1,
  localparam int unsigned KW   = $clog2(NWIN)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [KW-1:0]           in_idx,
  output logic                    out_valid,
  output logic signed [KW:0]      offset,
  output logic signed [POS_W-1:0] position
);

  localparam int unsigned X0 = (IMG_W - WIN) / 2;
  localparam longint PMAX = (64'sd1 <<< (POS_W - 1)) - 1;
  localparam longint PMIN = -(64'sd1 <<< (POS_W - 1));

  longint off, p;
  always_comb begin
    off = longint'(in_idx) - longint'(X0);
    p   = longint'(position) + off * longint'(POS_GAIN);
    if (p > PMAX) p = PMAX;
    if (p < PMIN) p = PMIN;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      offset    <= '0;
      position  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        offset   <= (KW+1)'(off);
        position <= POS_W'(p);
      end
    end
  end

endmodule
