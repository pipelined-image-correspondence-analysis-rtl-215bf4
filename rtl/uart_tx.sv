// uart_tx: serial transmitter for the link to the motor control panel.
//
// Sends one byte per request in 8N1 framing (start bit 0, eight data bits
// LSB first, stop bit 1) at BAUD bits per second from a CLK_HZ clock; each
// bit lasts DIV = CLK_HZ / BAUD clocks (5208 at 50 MHz and 9600 baud). A
// byte is taken when `valid` and `ready` are both high; `ready` is low
// while a byte is being sent, 10 * DIV clocks. The line idles high. The
// paper gives the 9600 baud serial cable; the 8N1 framing is this
// design's choice.
module uart_tx #(
  parameter int unsigned CLK_HZ = pica_pkg::CLK_HZ_DEF,
  parameter int unsigned BAUD   = pica_pkg::BAUD_DEF,
  localparam int unsigned DIV = CLK_HZ / BAUD,
  localparam int unsigned DW  = $clog2(DIV + 1)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);

  logic [9:0]    shreg;   // stop, data[7:0], start; bit 0 goes out first
  logic [3:0]    nbits;   // bits still to send
  logic [DW-1:0] cnt;

  assign ready = (nbits == '0);
  assign txd   = ready ? 1'b1 : shreg[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '1;
      nbits <= '0;
      cnt   <= '0;
    end else if (nbits == '0) begin
      if (valid) begin
        shreg <= {1'b1, data, 1'b0};
        nbits <= 4'd10;
        cnt   <= DW'(DIV - 1);
      end
    end else if (cnt != '0) begin
      cnt <= cnt - 1'b1;
    end else begin
      cnt   <= DW'(DIV - 1);
      nbits <= nbits - 1'b1;
      shreg <= {1'b1, shreg[9:1]};
    end
  end

endmodule
