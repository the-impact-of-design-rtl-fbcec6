// fairisle_timing: timing unit of the cleaned Fairisle switch fabric.
//
// It decides when the headers on the input links are to be arbitrated. The
// frame start pulse is passed through a FS_DELAY-stage shift register; when the
// delayed pulse arrives the unit opens a header window, and the first cycle in
// that window in which any input shows its active bit is taken as the header
// cycle (t_h). route_enable is that decision registered, so it is high for one
// cycle at t_h+1, the cycle in which the decoder's registered tags hold the
// headers. The window closes when it fires and is flushed by a new frame
// start, so a header can never be taken in the same cycle as a frame start,
// nor fewer than FS_DELAY cycles after it.
//
// Following the cleaned design, the frame start only triggers the switching
// FS_DELAY (5) cycles late; the window and its exact clear conditions are this
// design's choice.
//
// Ports: fs is the frame start, active[i] the active bit of input i's current
// byte. route_enable is registered.
module fairisle_timing #(
  parameter int unsigned PORTS    = fairisle_pkg::PORTS,
  parameter int unsigned FS_DELAY = fairisle_pkg::FS_DELAY
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             fs,
  input  logic [PORTS-1:0] active,
  output logic             route_enable
);

  logic [FS_DELAY-1:0] fs_pipe;
  logic                fs_late;   // frame start, FS_DELAY cycles later
  logic                armed;     // header window open
  logic                take;      // this cycle is the header cycle

  assign fs_late = fs_pipe[FS_DELAY-1];
  assign take    = (armed || fs_late) && (|active) && !fs;

  always_ff @(posedge clk) begin
    if (rst) begin
      fs_pipe      <= '0;
      armed        <= 1'b0;
      route_enable <= 1'b0;
    end else begin
      fs_pipe      <= (fs_pipe << 1) | FS_DELAY'(fs);
      route_enable <= take;
      if (fs || take)   armed <= 1'b0;
      else if (fs_late) armed <= 1'b1;
    end
  end

  // A header taken in the frame-start cycle would break the frame structure.
  a_no_take_at_fs: assert property (@(posedge clk) disable iff (rst) fs |-> !take);

endmodule
