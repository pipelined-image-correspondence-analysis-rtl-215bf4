// tb_uart_tx: sends random bytes at 10 clocks per bit and decodes the line
// here by sampling each bit in its middle. Checks the start and stop bits,
// the data, the idle level, and that `ready` is low for exactly 10 bit
// times per byte.
module tb_uart_tx;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int DIV = 10;
  logic valid = 0, ready, txd;
  logic [7:0] data = 0;

  uart_tx #(.CLK_HZ(1000), .BAUD(100)) dut (.clk, .rst_n, .valid, .data, .ready, .txd);

  int busy_cnt;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (txd !== 1'b1 || !ready) failures++;
    for (int n = 0; n < 60; n++) begin
      logic [7:0] b, got;
      b = (n == 0) ? 8'h00 : (n == 1) ? 8'hFF : 8'($urandom);
      @(negedge clk);
      while (!ready) @(negedge clk);
      valid = 1; data = b;
      @(negedge clk);
      valid = 0; data = 8'($urandom);
      busy_cnt = 0;
      // now one clock into the start bit; sample in the middle of each bit
      repeat (DIV / 2 - 1) @(negedge clk);
      checks++;
      if (txd !== 1'b0) begin failures++; $display("FAIL start bit"); end
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(negedge clk);
        got[i] = txd;
      end
      repeat (DIV) @(negedge clk);
      checks++;
      if (txd !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      checks++;
      if (got != b) begin failures++; $display("FAIL byte %h got %h", b, got); end
    end
    // ready timing
    @(negedge clk);
    while (!ready) @(negedge clk);
    valid = 1; data = 8'h5A;
    @(negedge clk);
    valid = 0;
    busy_cnt = 0;
    while (!ready) begin busy_cnt++; @(negedge clk); end
    checks++;
    if (busy_cnt != 10 * DIV) begin failures++; $display("FAIL busy %0d clocks", busy_cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
