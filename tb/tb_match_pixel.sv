// tb_match_pixel: checks the threshold rule of match_pixel on random pixel
// pairs and on magnitudes at, just below and just above the threshold.
// The expected R is worked out here from the rule itself.
module tb_match_pixel;
  import pica_pkg::*;
  int checks = 0, failures = 0;
  feat_t m, s;
  logic [7:0] t, r;
  int n_i = 0, n_d = 0, n_o = 0;

  match_pixel dut (.m, .s, .t, .r);

  function automatic int expect_r(feat_t a, feat_t b, int th);
    bit ae = int'(a.d) > th, be = int'(b.d) > th;
    if (ae && be)   return (int'(a.o) > int'(b.o)) ? a.o - b.o : b.o - a.o;
    if (!ae && !be) return (int'(a.i) > int'(b.i)) ? a.i - b.i : b.i - a.i;
    return (int'(a.d) > int'(b.d)) ? a.d - b.d : b.d - a.d;
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      m = feat_t'($urandom); s = feat_t'($urandom); t = 8'($urandom);
      if (n % 4 == 1) s.d = t;                 // equal to threshold
      if (n % 4 == 2) begin m.d = t + 1; s.d = t; end
      #1;
      checks++;
      if (int'(r) != expect_r(m, s, int'(t))) begin
        failures++;
        $display("FAIL m=%h s=%h t=%0d r=%0d exp=%0d", m, s, t, r, expect_r(m, s, int'(t)));
      end
      if (m.d > t && s.d > t) n_o++; else if (m.d <= t && s.d <= t) n_i++; else n_d++;
    end
    checks++;
    if (n_i == 0 || n_d == 0 || n_o == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
