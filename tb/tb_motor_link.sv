// tb_motor_link: motor link at 12 clocks per bit and at most 2 moves per
// "second" of 1200 clocks, so positions must be at least 600 clocks apart.
// A serial receiver modelled here decodes the line. Checks that a position
// is accepted at once after reset, that positions arriving during the
// message or less than 600 clocks after the last accepted one are dropped
// (599 clocks: dropped, 600: accepted), that each accepted position goes
// out high byte first, and the sent and dropped counts.
module tb_motor_link;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int DIV = 12, GAP = 600;
  logic cmd_valid = 0, txd, busy;
  logic [15:0] cmd_pos = 0, sent, dropped;

  motor_link #(.CLK_HZ(1200), .BAUD(100), .MOVES_PER_S(2)) dut (.clk, .rst_n, .cmd_valid, .cmd_pos,
    .txd, .busy, .sent, .dropped);

  // serial receiver
  byte unsigned rx [$];
  initial begin
    @(posedge rst_n);
    forever begin
      logic [7:0] b;
      @(negedge clk);
      if (txd == 1'b0) begin
        repeat (DIV / 2) @(negedge clk);
        for (int i = 0; i < 8; i++) begin repeat (DIV) @(negedge clk); b[i] = txd; end
        repeat (DIV) @(negedge clk);
        if (txd != 1'b1) begin failures++; $display("FAIL stop bit"); end
        rx.push_back(b);
      end
    end
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic cmd(logic [15:0] p);
    @(negedge clk);
    cmd_valid = 1; cmd_pos = p;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  int t0;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    t0 = cyc;
    cmd(16'hA1B2);                       // accepted at once
    repeat (40) @(negedge clk);
    cmd(16'h1111);                       // dropped: busy
    repeat (300) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
    cmd(16'h2222);                       // dropped: too early
    while (cyc < t0 + GAP - 1) @(negedge clk);
    cmd(16'h3333);                       // dropped: 599 clocks
    cmd(16'hFE07);                       // accepted: 600 clocks
    repeat (20 * DIV + 40) @(negedge clk);
    checks++;
    if (sent != 2 || dropped != 3) begin failures++; $display("FAIL sent %0d dropped %0d", sent, dropped); end
    checks++;
    if (rx.size() != 4) begin failures++; $display("FAIL %0d bytes", rx.size()); end
    else begin
      byte unsigned e [4] = '{8'hA1, 8'hB2, 8'hFE, 8'h07};
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (rx[i] != e[i]) begin failures++; $display("FAIL byte %0d %h exp %h", i, rx[i], e[i]); end
      end
    end
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
