// track_ctrl: frame-level controller of the tracker.
//
// Decides, at the first feature pixel of each frame (`frame_start`), what
// that frame is used for, and holds the decision for the whole frame:
//   S_CAPTURE  a new master was requested (`load_req`, kept pending until a
//              frame starts): the frame's centre window becomes the master;
//   S_TRACK    a master is held: the frame is a slave and is correlated;
//   S_IDLE     no master yet: the frame is ignored.
// `master_valid` drops when a capture starts and rises with
// `master_done`, so a frame cut short during capture leaves no half-old
// master in use. `frames_tracked` counts slave frames whose correlation
// finished (`corr_done`). The paper says the master image is taken
// first and changed once the tracked object has been found; when to
// change it is left to the system around the tracker, here the `load_req`
// input.
module track_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_req,
  input  logic        frame_start,
  input  logic        master_done,
  input  logic        corr_done,
  output logic        capture_en,
  output logic        track_en,
  output logic        master_valid,
  output logic [15:0] frames_tracked
);

  typedef enum logic [1:0] {S_IDLE, S_CAPTURE, S_TRACK} state_t;
  state_t state;
  logic   pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      pending        <= 1'b0;
      master_valid   <= 1'b0;
      frames_tracked <= '0;
    end else begin
      if (load_req) pending <= 1'b1;
      if (frame_start) begin
        if (pending || load_req) begin
          state        <= S_CAPTURE;
          pending      <= 1'b0;
          master_valid <= 1'b0;
        end else if (master_valid) begin
          state <= S_TRACK;
        end else begin
          state <= S_IDLE;
        end
      end
      if (state == S_CAPTURE && master_done) master_valid <= 1'b1;
      if (state == S_TRACK && corr_done) frames_tracked <= frames_tracked + 1'b1;
    end
  end

  assign capture_en = state == S_CAPTURE;
  assign track_en   = state == S_TRACK;

endmodule
