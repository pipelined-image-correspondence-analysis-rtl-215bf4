// pica_pkg: types and constants shared by the correspondence pipeline.
//
// The tracker compares a 9x9 window at the optical centre of a stored
// master frame with every 9x9 window along the horizontal epipolar line of
// later (slave) frames. Each pixel is described by three bytes: intensity I,
// edge magnitude D and edge orientation O. The frame size (320 x 240), the
// window size (9 x 9), the 312 windows per stripe, the 50 MHz clock and the
// 9600 baud motor link are the published figures; the widths of the
// internal values are this design's choices.
package pica_pkg;

  localparam int unsigned IMG_W_DEF   = 320;   // pixels per line
  localparam int unsigned IMG_H_DEF   = 240;   // lines per frame
  localparam int unsigned WIN_DEF     = 9;     // window side
  localparam int unsigned CLK_HZ_DEF  = 50_000_000;
  localparam int unsigned BAUD_DEF    = 9600;
  localparam int unsigned CORDIC_ITER_DEF = 16;

  typedef logic [7:0] byte_t;

  // The three features of one pixel.
  typedef struct packed {
    byte_t i;   // intensity
    byte_t d;   // edge magnitude
    byte_t o;   // edge orientation, -pi/2..pi/2 mapped to 0..255
  } feat_t;

  // CORDIC angle unit: pi == 65536, so atan(2^-k) = round(atan(2^-k)/pi*65536).
  localparam int ANGLE_PI = 65536;
  function automatic int atan_tab(input int k);
    case (k)
      0: return 16384;  1: return 9672;  2: return 5110;  3: return 2594;
      4: return 1302;   5: return 652;   6: return 326;   7: return 163;
      8: return 81;     9: return 41;   10: return 20;   11: return 10;
      12: return 5;    13: return 3;    14: return 1;    15: return 1;
      default: return 0;  // below one unit beyond 15 iterations
    endcase
  endfunction

  // Reciprocal of the CORDIC gain prod(sqrt(1+2^-2k)), scaled by 2^16.
  // 39797 for 16 or more iterations.
  function automatic int cordic_inv_gain(input int iters);
    real k;
    k = 1.0;
    for (int n = 0; n < iters; n++) k = k * $sqrt(1.0 + 2.0 ** (-2.0 * n));
    return int'(65536.0 / k + 0.5);
  endfunction

endpackage
