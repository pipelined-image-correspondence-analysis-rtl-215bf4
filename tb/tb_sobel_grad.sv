// tb_sobel_grad: random 3x3 windows; Dx and Dy are recomputed here from the
// Sobel weights and compared one clock later (the stated latency).
module tb_sobel_grad;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid;
  logic [3:0] in_tag = 0, out_tag;
  logic [7:0] win [3][3];
  logic signed [10:0] dx, dy;

  sobel_grad #(.TAG_W(4)) dut (.clk, .rst_n, .in_valid, .in_tag, .win, .out_valid, .out_tag, .dx, .dy);

  int kx [3][3] = '{'{-1, 0, 1}, '{-2, 0, 2}, '{-1, 0, 1}};
  int ky [3][3] = '{'{-1, -2, -1}, '{0, 0, 0}, '{1, 2, 1}};
  int ex, ey;

  initial begin
    for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) win[r][c] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++)
        win[r][c] = (n < 4) ? ((n[0] ^ (c == 2)) ? 8'd255 : 8'd0) : 8'($urandom);
      if (n == 5) for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) win[r][c] = (r == 2) ? 255 : 0;
      ex = 0; ey = 0;
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
        ex += kx[r][c] * int'(win[r][c]);
        ey += ky[r][c] * int'(win[r][c]);
      end
      in_valid = 1; in_tag = 4'(n);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(dx) != ex || int'(dy) != ey || out_tag != 4'(n)) begin
        failures++;
        $display("FAIL n=%0d dx=%0d/%0d dy=%0d/%0d v=%b", n, dx, ex, dy, ey, out_valid);
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
