// cordic_vec: pipelined vectoring CORDIC for edge magnitude and orientation.
//
// From the Sobel gradients (Dx, Dy) it computes, one pixel per clock,
//   D = min(255, round(sqrt(Dx^2 + Dy^2)) >> D_SHIFT)
//   O = atan(Dy/Dx) in -pi/2..pi/2 mapped linearly onto 0..255
// using only shifts, adds and compares, as the paper prescribes for
// square root and arc tangent. A first stage folds the vector into the right
// half plane (negating both components leaves Dy/Dx unchanged). Each of the
// ITER rotation stages then turns the vector towards the x axis by
// +-atan(2^-k) and adds the turned angle to z; at the end x is the magnitude
// times the CORDIC gain (about 1.6468) and z is the angle. A last stage
// multiplies by the reciprocal gain and maps the angle to a byte:
// O = ((z + pi/2) * 255 + pi/2) / pi with pi = 65536 angle units. A zero
// gradient has no orientation; it is given O = 128 (angle 0).
//
// The paper gives 16 clocks to the square root and to the arc tangent;
// ITER = 16 follows that, with the two computed side by side in one
// pipeline. Latency is ITER + 2 clocks, throughput one pixel per clock.
// Eight fraction bits are kept inside. D_SHIFT, which scales the magnitude
// (up to about 1443) into a byte, is this design's choice.
module cordic_vec #(
  parameter int unsigned ITER    = pica_pkg::CORDIC_ITER_DEF,
  parameter int unsigned D_SHIFT = 2,
  parameter int unsigned TAG_W   = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [TAG_W-1:0]  in_tag,
  input  logic signed [10:0] dx,
  input  logic signed [10:0] dy,
  output logic              out_valid,
  output logic [TAG_W-1:0]  out_tag,
  output logic [7:0]        d,
  output logic [7:0]        o
);

  localparam int FB = 8;                // fraction bits
  localparam int XW = 24;               // x/y width
  localparam int ZW = 19;               // angle width (pi = 65536)
  localparam int INV_GAIN = pica_pkg::cordic_inv_gain(ITER);

  logic signed [XW-1:0] xs [ITER+1];
  logic signed [XW-1:0] ys [ITER+1];
  logic signed [ZW-1:0] zs [ITER+1];
  logic                 vs [ITER+1];
  logic                 zr [ITER+1];   // zero vector
  logic [TAG_W-1:0]     ts [ITER+1];

  // stage 0: fold into the right half plane
  logic signed [XW-1:0] x_in, y_in;
  always_comb begin
    x_in = XW'(dx) <<< FB;
    y_in = XW'(dy) <<< FB;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0; vs[0] <= 1'b0; zr[0] <= 1'b0; ts[0] <= '0;
    end else begin
      xs[0] <= (dx < 0) ? -x_in : x_in;
      ys[0] <= (dx < 0) ? -y_in : y_in;
      zs[0] <= '0;
      vs[0] <= in_valid;
      zr[0] <= (dx == 0) && (dy == 0);
      ts[0] <= in_tag;
    end
  end

  // rotation stages
  for (genvar k = 0; k < ITER; k++) begin : g_stage
    localparam logic signed [ZW-1:0] ATAN = ZW'(pica_pkg::atan_tab(k));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        xs[k+1] <= '0; ys[k+1] <= '0; zs[k+1] <= '0;
        vs[k+1] <= 1'b0; zr[k+1] <= 1'b0; ts[k+1] <= '0;
      end else begin
        if (ys[k] >= 0) begin
          xs[k+1] <= xs[k] + (ys[k] >>> k);
          ys[k+1] <= ys[k] - (xs[k] >>> k);
          zs[k+1] <= zs[k] + ATAN;
        end else begin
          xs[k+1] <= xs[k] - (ys[k] >>> k);
          ys[k+1] <= ys[k] + (xs[k] >>> k);
          zs[k+1] <= zs[k] - ATAN;
        end
        vs[k+1] <= vs[k];
        zr[k+1] <= zr[k];
        ts[k+1] <= ts[k];
      end
    end
  end

  // output stage: gain correction and angle to byte
  logic [47:0] mag, mag_s;
  logic signed [ZW-1:0] th;
  logic [ZW:0]  u;
  logic [ZW+8:0] ou;
  always_comb begin
    mag = (48'(unsigned'(xs[ITER])) * 48'(INV_GAIN) + (48'd1 << (15 + FB))) >> (16 + FB);
    mag_s = mag >> D_SHIFT;
    th = zr[ITER] ? '0 : zs[ITER];
    if (th > ZW'(pica_pkg::ANGLE_PI / 2))  th = ZW'(pica_pkg::ANGLE_PI / 2);
    if (th < -ZW'(pica_pkg::ANGLE_PI / 2)) th = -ZW'(pica_pkg::ANGLE_PI / 2);
    u  = (ZW+1)'(th + ZW'(pica_pkg::ANGLE_PI / 2));
    ou = ((ZW+9)'(u) * 255 + (ZW+9)'(pica_pkg::ANGLE_PI / 2)) >> 16;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_tag <= '0; d <= '0; o <= '0;
    end else begin
      out_valid <= vs[ITER];
      out_tag   <= ts[ITER];
      d <= (mag_s > 48'd255) ? 8'd255 : mag_s[7:0];
      o <= (ou > (ZW+9)'(255)) ? 8'd255 : ou[7:0];
    end
  end

endmodule
