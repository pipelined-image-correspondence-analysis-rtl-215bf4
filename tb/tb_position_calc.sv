// tb_position_calc: best-window indices at the full 320-pixel width
// (centre window 155). Checks offset = index - 155, the accumulated
// position, the one-clock latency, and saturation of the 8-bit position of
// a second instance.
module tb_position_calc;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, out_valid, out_valid8;
  logic [8:0] in_idx = 0;
  logic signed [9:0] offset, offset8;
  logic signed [15:0] position;
  logic signed [7:0] position8;

  position_calc dut (.clk, .rst_n, .in_valid, .in_idx, .out_valid, .offset, .position);
  position_calc #(.POS_W(8)) dut8 (.clk, .rst_n, .in_valid, .in_idx, .out_valid(out_valid8),
    .offset(offset8), .position(position8));

  int pos = 0, pos8 = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int idx, off;
      idx = (n == 0) ? 155 : (n == 1) ? 0 : (n == 2) ? 311 : (n < 10) ? 0 : $urandom_range(0, 311);
      off = idx - 155;
      pos += off;
      pos8 += off; if (pos8 > 127) pos8 = 127; if (pos8 < -128) pos8 = -128;
      @(negedge clk);
      in_valid = 1; in_idx = 9'(idx);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(offset) != off || int'(position) != pos || int'(position8) != pos8) begin
        failures++;
        $display("FAIL n=%0d off %0d/%0d pos %0d/%0d pos8 %0d/%0d", n, offset, off, position, pos, position8, pos8);
      end
      @(negedge clk);
      checks++;
      if (out_valid) begin failures++; $display("FAIL valid held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
