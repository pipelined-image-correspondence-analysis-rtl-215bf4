// pixel_rx: pixel receiver. Tags each incoming camera pixel with its column
// and line.
//
// The camera delivers 8-bit grey pixels line by line. This receiver takes them
// as a parallel stream: `in_valid` qualifies a pixel on `in_pix`, and
// `in_sof` marks the first pixel of a frame. Two counters track the position:
// the column wraps after IMG_W pixels and the line then advances. A pixel
// flagged `in_sof` always starts at (0,0), so a frame that was cut short
// cannot shift the next one. One register stage: outputs follow the input by
// one clock. Pixels after the last line of a frame, before the next `in_sof`,
// are dropped and counted in `extra_pix`.
//
// The paper says only that a receiver in the FPGA takes the pixel values
// from the camera. The FireWire link to the camera is outside this block;
// the parallel stream with a start-of-frame flag is this design's choice.
module pixel_rx #(
  parameter int unsigned IMG_W = pica_pkg::IMG_W_DEF,
  parameter int unsigned IMG_H = pica_pkg::IMG_H_DEF,
  localparam int unsigned XW = $clog2(IMG_W),
  localparam int unsigned YW = $clog2(IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sof,
  input  logic [7:0]    in_pix,
  output logic          out_valid,
  output logic [XW-1:0] out_x,
  output logic [YW-1:0] out_y,
  output logic [7:0]    out_pix,
  output logic [15:0]   extra_pix
);

  logic [XW-1:0] x_q;
  logic [YW-1:0] y_q;
  logic          in_frame_q;   // still inside the current frame

  // position of the incoming pixel; a start-of-frame flag forces (0,0)
  logic [XW-1:0] xc;
  logic [YW-1:0] yc;
  logic          ok;
  always_comb begin
    xc = in_sof ? '0 : x_q;
    yc = in_sof ? '0 : y_q;
    ok = in_sof || in_frame_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q        <= '0;
      y_q        <= '0;
      in_frame_q <= 1'b0;
      out_valid  <= 1'b0;
      out_x      <= '0;
      out_y      <= '0;
      out_pix    <= '0;
      extra_pix  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (ok) begin
          out_valid <= 1'b1;
          out_x     <= xc;
          out_y     <= yc;
          out_pix   <= in_pix;
          if (xc == XW'(IMG_W - 1)) begin
            x_q <= '0;
            y_q <= yc + 1'b1;
            in_frame_q <= (yc != YW'(IMG_H - 1));
          end else begin
            x_q <= xc + 1'b1;
            y_q <= yc;
            in_frame_q <= 1'b1;
          end
        end else begin
          extra_pix <= extra_pix + 1'b1;
        end
      end
    end
  end

endmodule
