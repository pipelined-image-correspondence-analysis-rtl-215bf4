// match_pixel: difference R of one master pixel and one slave pixel.
//
// The edge magnitudes of both pixels are compared with the threshold t:
//   one above t, the other not:  R = |Dm - Ds|   (an edge in only one)
//   neither above t:             R = |Im - Is|   (no edge: compare intensity)
//   both above t:                R = |Om - Os|   (both edges: compare orientation)
// This is the paper's rule. It states the rule for values below and
// above t only; a magnitude equal to t counts here as not above.
// The orientation difference is a plain absolute difference, as printed,
// without wrap-around. Purely combinational.
module match_pixel
  import pica_pkg::*;
(
  input  feat_t      m,
  input  feat_t      s,
  input  logic [7:0] t,
  output logic [7:0] r
);

  function automatic logic [7:0] absdiff(input logic [7:0] a, input logic [7:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  logic m_edge, s_edge;
  always_comb begin
    m_edge = m.d > t;
    s_edge = s.d > t;
    unique case ({m_edge, s_edge})
      2'b00:   r = absdiff(m.i, s.i);
      2'b11:   r = absdiff(m.o, s.o);
      default: r = absdiff(m.d, s.d);
    endcase
  end

endmodule
