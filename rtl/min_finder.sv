// min_finder: decision maker. Finds the window whose sum of R is least.
//
// Window sums arrive in index order; the first (`idx` = 0) restarts the
// search. A sum replaces the kept one only when it is strictly smaller, so
// of equal sums the lowest index wins. With the sum flagged `last` the
// result is out on the next clock: `done`, the index `min_idx`, the sum
// `min_sum` and the average R = sum / (WIN*WIN) in `min_avg`. Only the
// least value and its index are kept, as the paper describes. The
// search runs on the sums: dividing every sum by the same WIN*WIN cannot
// change which is least. The average is computed once, by multiplying by
// ceil(2^21 / (WIN*WIN)) and shifting right by 21, which is exact for every
// possible sum of a 9x9 window, instead of by a divider.
module min_finder #(
  parameter int unsigned NWIN = pica_pkg::IMG_W_DEF - pica_pkg::WIN_DEF + 1,
  parameter int unsigned WIN  = pica_pkg::WIN_DEF,
  localparam int unsigned KW    = $clog2(NWIN),
  localparam int unsigned SUM_W = $clog2(WIN * WIN * 255 + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [KW-1:0]    in_idx,
  input  logic [SUM_W-1:0] in_sum,
  input  logic             in_last,
  output logic             done,
  output logic [KW-1:0]    min_idx,
  output logic [SUM_W-1:0] min_sum,
  output logic [7:0]       min_avg
);

  localparam int unsigned N    = WIN * WIN;
  localparam longint unsigned MULT = ((64'd1 << 21) + 64'(N) - 1) / 64'(N);

  logic [KW-1:0]    best_idx;
  logic [SUM_W-1:0] best_sum;
  logic             take;
  logic [KW-1:0]    n_idx;
  logic [SUM_W-1:0] n_sum;

  always_comb begin
    take  = in_valid && (in_idx == '0 || in_sum < best_sum);
    n_idx = take ? in_idx : best_idx;
    n_sum = take ? in_sum : best_sum;
  end

  logic [63:0] prod;
  always_comb prod = 64'(n_sum) * MULT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_idx <= '0;
      best_sum <= '0;
      done     <= 1'b0;
      min_idx  <= '0;
      min_sum  <= '0;
      min_avg  <= '0;
    end else begin
      done <= in_valid && in_last;
      if (in_valid) begin
        best_idx <= n_idx;
        best_sum <= n_sum;
      end
      if (in_valid && in_last) begin
        min_idx <= n_idx;
        min_sum <= n_sum;
        min_avg <= 8'(prod >> 21);
      end
    end
  end

endmodule
