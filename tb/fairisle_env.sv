// fairisle_env: behavioural model of the port controllers' frame timing, for
// simulation only (not synthesizable logic).
//
// A 64-state machine, states numbered 1 to 64, that produces the frame start
// and says when the routing tags are to be sent:
//   state 1       start-up; the frame start is given at once (t_s = t_0)
//   states 2..5   the cycles t_s+1 .. t_s+4, in which no header may come
//   state 6       the header window: the tags are sent in this state (hdr = 1),
//                 possibly after waiting here up to MAX_WAIT cycles
//   states 7..58  the 52 cell bytes that follow the tag
//   states 59..63 the last cycles of the frame, carrying no data
//   state 64      the next frame start; the machine then goes on to state 2
// With no waiting, the frame starts of successive frames are 63 cycles apart
// (states 2..64). The test around this model fills the link bytes: tags in
// state 6 when hdr is high, cell bytes in states 7..58, zero elsewhere.
//
// Ports: fs (frame start), hdr (send the tags now), state (1..64) and data
// (the current state carries a cell byte). All change after the rising edge.
module fairisle_env #(
  parameter int MAX_WAIT = 3
) (
  input  logic clk,
  input  logic rst,
  output logic fs,
  output logic hdr,
  output int   state,
  output logic data
);

  logic go;   // header decision for this cycle, taken while in state 6

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= 1;
      go    <= 1'b0;
    end else begin
      case (state)
        6:       state <= go ? 7 : 6;
        64:      state <= 2;
        default: state <= state + 1;
      endcase
      go <= (MAX_WAIT == 0) || ($urandom % (MAX_WAIT + 1) == 0);
    end
  end

  assign fs   = !rst && (state == 1 || state == 64);
  assign hdr  = !rst && (state == 6) && go;
  assign data = (state >= 7 && state <= 58);

endmodule
