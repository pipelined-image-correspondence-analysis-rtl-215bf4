// tb_min_finder: searches of 312 window sums (the full stripe) with random
// values, planted minima, ties and extreme values. The expected least sum,
// its first index and sum/81 are worked out here. Checks that `done`
// comes exactly one clock after the last sum.
module tb_min_finder;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NWIN = 312, WIN = 9;
  logic in_valid = 0, in_last = 0, done;
  logic [8:0] in_idx = 0, min_idx;
  logic [14:0] in_sum = 0, min_sum;
  logic [7:0] min_avg;

  min_finder #(.NWIN(NWIN), .WIN(WIN)) dut (.clk, .rst_n, .in_valid, .in_idx, .in_sum, .in_last,
    .done, .min_idx, .min_sum, .min_avg);

  int v [NWIN];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 60; f++) begin
      int bi, bs;
      for (int k = 0; k < NWIN; k++) v[k] = $urandom_range(0, 20655);
      if (f % 5 == 1) v[$urandom_range(0, NWIN - 1)] = 0;
      if (f % 5 == 2) begin v[40] = 3; v[200] = 3; for (int k = 0; k < NWIN; k++) if (v[k] < 3) v[k] = 9; end
      if (f % 5 == 3) v[NWIN - 1] = 0;
      if (f == 4) for (int k = 0; k < NWIN; k++) v[k] = 20655;
      if (f == 9) for (int k = 0; k < NWIN; k++) v[k] = 20655 - k;
      bi = 0; bs = v[0];
      for (int k = 1; k < NWIN; k++) if (v[k] < bs) begin bs = v[k]; bi = k; end
      for (int k = 0; k < NWIN; k++) begin
        @(negedge clk);
        in_valid = 1; in_idx = 9'(k); in_sum = 15'(v[k]); in_last = (k == NWIN - 1);
        @(negedge clk);
        checks++;
        if (done != (k == NWIN - 1)) begin failures++; $display("FAIL done at %0d", k); end
        in_valid = 0;
        repeat ($urandom_range(0, 1)) @(negedge clk);
      end
      checks++;
      if (int'(min_idx) != bi || int'(min_sum) != bs || int'(min_avg) != bs / 81) begin
        failures++;
        $display("FAIL f=%0d idx %0d/%0d sum %0d/%0d avg %0d/%0d", f, min_idx, bi, min_sum, bs, min_avg, bs / 81);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
