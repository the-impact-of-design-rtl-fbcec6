// fairisle_fabric: the cleaned Fairisle 4x4 ATM switch fabric (top level).
//
// Four input port controllers send cells to the fabric in step: a frame start
// pulse fs marks each frame, and every cell's one-byte routing tag arrives on
// all links in the same cycle t_h, at least FS_DELAY (5) cycles after the frame
// start; the cell's data bytes follow, one per clock. The fabric arbitrates
// the cells aimed at the same output (high priority first, round-robin within
// a priority), strips the tags, switches the winners' bytes to their outputs
// and returns acknowledgments:
//   dout[j] = 0                         from t_s+1 to t_h+5
//   dout[j] = din[i] five cycles before from t_h+6 to the next frame start
//                                       (inclusive), if input i won j
//   aout[i] = 0                         from t_s+1 to t_h+2
//   aout[i] = ain[j]  (combinational)   from t_h+3 to the next frame start
//                                       (inclusive), if input i won j;
//                                       0 for an input that lost or sent none
// The environment keeps the next frame start at least 6 cycles after the
// header and 11 after the current frame start; with 52-byte cells the frame is
// 64 cycles long.
//
// Structure: the arbitration unit (timing unit, decoder, priority filter and
// four arbiters) feeds the grant and output-disable signals to the
// acknowledgment unit and the dataswitch. The block structure and the timing
// above follow the published cleaned fabric; register placement inside the
// blocks and the tag layout are this design's choices. Reset is synchronous
// and active high.
module fairisle_fabric #(
  parameter int unsigned PORTS      = fairisle_pkg::PORTS,
  parameter int unsigned WIDTH      = fairisle_pkg::WIDTH,
  parameter int unsigned DATA_DELAY = fairisle_pkg::DATA_DELAY,
  parameter int unsigned FS_DELAY   = fairisle_pkg::FS_DELAY
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             fs,
  input  logic [WIDTH-1:0] din  [PORTS],
  input  logic [PORTS-1:0] ain,
  output logic [WIDTH-1:0] dout [PORTS],
  output logic [PORTS-1:0] aout
);

  logic [$clog2(PORTS)-1:0] grant [PORTS];
  logic [PORTS-1:0]         odis;

  fairisle_arbitration #(.PORTS(PORTS), .WIDTH(WIDTH), .FS_DELAY(FS_DELAY)) u_arbitration (
    .clk, .rst, .fs, .din, .grant, .odis
  );

  fairisle_ack #(.PORTS(PORTS)) u_ack (
    .clk, .rst, .fs, .grant, .odis, .ain, .aout
  );

  fairisle_dataswitch #(.PORTS(PORTS), .WIDTH(WIDTH), .DATA_DELAY(DATA_DELAY)) u_dataswitch (
    .clk, .rst, .fs, .din, .grant, .odis, .dout
  );

endmodule
