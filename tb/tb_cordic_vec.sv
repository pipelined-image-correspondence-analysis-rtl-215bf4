// tb_cordic_vec: random and corner gradients through the CORDIC pipeline.
// The reference uses real arithmetic: D = min(255, round(sqrt(dx^2+dy^2)) >> 2)
// and O = round((atan(dy/dx) + pi/2) / pi * 255), both within 1 count; a
// zero gradient must give O = 128. Also checks the ITER + 2 clock latency
// and that a new pixel is accepted every clock.
module tb_cordic_vec;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int ITER = 16;
  logic in_valid = 0, out_valid;
  logic [11:0] in_tag = 0, out_tag;
  logic signed [10:0] dx = 0, dy = 0;
  logic [7:0] d, o;

  cordic_vec #(.ITER(ITER), .D_SHIFT(2), .TAG_W(12)) dut (
    .clk, .rst_n, .in_valid, .in_tag, .dx, .dy, .out_valid, .out_tag, .d, .o);

  localparam int N = 3000;
  int vx [N], vy [N];
  int sent_at [N];
  int cyc = 0, got = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int ref_d(int x, int y);
    int m = int'($floor($sqrt(real'(x * x + y * y)) + 0.5)) >> 2;
    return (m > 255) ? 255 : m;
  endfunction
  function automatic int ref_o(int x, int y);
    real th;
    if (x == 0 && y == 0) return 128;
    if (x == 0) th = (y > 0) ? 3.14159265358979 / 2 : -3.14159265358979 / 2;
    else th = $atan(real'(y) / real'(x));
    return int'($floor((th + 3.14159265358979 / 2) / 3.14159265358979 * 255.0 + 0.5));
  endfunction
  function automatic int iabs(int a); return a < 0 ? -a : a; endfunction

  initial begin
    for (int n = 0; n < N; n++) begin
      case (n)
        0: begin vx[n] = 0;     vy[n] = 0;     end
        1: begin vx[n] = 1020;  vy[n] = 1020;  end
        2: begin vx[n] = -1020; vy[n] = -1020; end
        3: begin vx[n] = 0;     vy[n] = 500;   end
        4: begin vx[n] = 0;     vy[n] = -500;  end
        5: begin vx[n] = -300;  vy[n] = 0;     end
        6: begin vx[n] = 7;     vy[n] = -3;    end
        default: begin
          vx[n] = int'($urandom_range(0, 2040)) - 1020;
          vy[n] = int'($urandom_range(0, 2040)) - 1020;
          if (n % 3 == 0) begin vx[n] = vx[n] / 16; vy[n] = vy[n] / 16; end
        end
      endcase
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = 1; dx = 11'(vx[n]); dy = 11'(vy[n]); in_tag = 12'(n);
      sent_at[n] = cyc;
    end
    @(negedge clk);
    in_valid = 0;
    wait (got == N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (out_valid) begin
    int n;
    n = int'(out_tag);
    checks++;
    if (n != got || iabs(int'(d) - ref_d(vx[n], vy[n])) > 1 ||
        iabs(int'(o) - ref_o(vx[n], vy[n])) > 1 || (vx[n] == 0 && vy[n] == 0 && o != 128)) begin
      failures++;
      $display("FAIL n=%0d dx=%0d dy=%0d d=%0d/%0d o=%0d/%0d", n, vx[n], vy[n], d, ref_d(vx[n], vy[n]),
               o, ref_o(vx[n], vy[n]));
    end
    checks++;
    if (cyc - sent_at[n] != ITER + 2) begin
      failures++;
      $display("FAIL latency %0d", cyc - sent_at[n]);
    end
    got++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
