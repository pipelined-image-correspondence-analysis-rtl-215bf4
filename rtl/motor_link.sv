// motor_link: sends new camera positions to the motor control panel, no
// faster than the motor can follow.
//
// The motor turns to at most 4-6 new positions a second, while the
// correspondence pipeline can give a new position for every frame. A
// position is therefore accepted only when at least GAP = CLK_HZ /
// MOVES_PER_S clocks have passed since the last accepted one and the
// previous message has left; otherwise it is dropped and counted in
// `dropped`, as the paper suggests skipping frames when there is not
// enough time. An accepted position is sent as two bytes, high byte first,
// through uart_tx. `sent` counts accepted positions. The message format
// and the drop policy are this design's choices.
module motor_link #(
  parameter int unsigned CLK_HZ      = pica_pkg::CLK_HZ_DEF,
  parameter int unsigned BAUD        = pica_pkg::BAUD_DEF,
  parameter int unsigned MOVES_PER_S = 6,
  parameter int unsigned POS_W       = 16,
  localparam int unsigned GAP = CLK_HZ / MOVES_PER_S,
  localparam int unsigned GW  = $clog2(GAP + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmd_valid,
  input  logic [POS_W-1:0] cmd_pos,
  output logic             txd,
  output logic             busy,
  output logic [15:0]      sent,
  output logic [15:0]      dropped
);

  typedef enum logic [1:0] {S_IDLE, S_HI, S_LO} state_t;
  state_t state;

  logic [GW-1:0]  since;      // clocks since the last accepted position, saturating
  logic [15:0]    pos_q;
  logic           u_valid, u_ready;
  logic [7:0]     u_data;

  logic accept;
  assign accept = cmd_valid && state == S_IDLE && since >= GW'(GAP);
  assign busy   = state != S_IDLE || !u_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      since   <= GW'(GAP);
      pos_q   <= '0;
      sent    <= '0;
      dropped <= '0;
    end else begin
      if (since < GW'(GAP)) since <= since + 1'b1;
      if (cmd_valid) begin
        if (accept) begin
          pos_q <= 16'(cmd_pos);
          since <= GW'(1);
          sent  <= sent + 1'b1;
          state <= S_HI;
        end else begin
          dropped <= dropped + 1'b1;
        end
      end
      case (state)
        S_HI: if (u_ready) state <= S_LO;
        S_LO: if (u_ready) state <= S_IDLE;
        default: ;
      endcase
    end
  end

  always_comb begin
    u_valid = (state == S_HI || state == S_LO) && u_ready;
    u_data  = (state == S_HI) ? pos_q[15:8] : pos_q[7:0];
  end

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst_n, .valid(u_valid), .data(u_data), .ready(u_ready), .txd
  );

endmodule
