// fairisle_dataswitch: data switch of the cleaned Fairisle fabric.
//
// It delays every input link long enough for the arbitration to finish and
// then, for each output, picks the byte of the input that output granted,
// or sends 0 while the output is disabled. The data pass through
// DATA_DELAY-1 registers and the registered output multiplexer, DATA_DELAY
// cycles in all: dout[j] at cycle t equals din[grant[j]] at t-DATA_DELAY.
//
// The arbiters' grant and disable signals (valid from t_h+2) pass through a
// control delay line of DATA_DELAY-2 registers before they steer the output
// multiplexer. That lines them up with the data so that the first byte
// switched is the one after the header (dout from t_h+6 carries din from
// t_h+1) and the header itself is stripped. A frame start fs at t_s still
// lets the byte of that cycle through and blanks every output from t_s+1: it
// masks the multiplexer at once and flushes the control delay line to
// "disabled", after which the arbiters' own disable (from t_s+1) arrives
// through the line. So the last byte of a cell, sent in the cycle before the
// next frame start and switched out in the frame-start cycle, is not lost.
//
// The 5-cycle latency, the zero outputs from t_s+1 to t_h+5 and the extra
// registers on the control and data paths into the dataswitch follow the
// cleaned fabric; the register counts and the frame-start flush are this
// design's way of meeting that timing.
module fairisle_dataswitch #(
  parameter int unsigned PORTS      = fairisle_pkg::PORTS,
  parameter int unsigned WIDTH      = fairisle_pkg::WIDTH,
  parameter int unsigned DATA_DELAY = fairisle_pkg::DATA_DELAY
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     fs,
  input  logic [WIDTH-1:0]         din   [PORTS],
  input  logic [$clog2(PORTS)-1:0] grant [PORTS],
  input  logic [PORTS-1:0]         odis,
  output logic [WIDTH-1:0]         dout  [PORTS]
);

  localparam int unsigned DSTAGES = DATA_DELAY - 1;  // data registers before the mux
  localparam int unsigned CSTAGES = DATA_DELAY - 2;  // control registers before the mux

  logic [WIDTH-1:0]         dpipe [DSTAGES][PORTS];
  logic [$clog2(PORTS)-1:0] gpipe [CSTAGES][PORTS];
  logic [PORTS-1:0]         opipe [CSTAGES];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < DSTAGES; s++)
        for (int i = 0; i < PORTS; i++) dpipe[s][i] <= '0;
      for (int s = 0; s < CSTAGES; s++) begin
        opipe[s] <= '1;
        for (int j = 0; j < PORTS; j++) gpipe[s][j] <= '0;
      end
      for (int j = 0; j < PORTS; j++) dout[j] <= '0;
    end else begin
      dpipe[0] <= din;
      for (int s = 1; s < DSTAGES; s++) dpipe[s] <= dpipe[s-1];
      gpipe[0] <= grant;
      opipe[0] <= fs ? '1 : odis;
      for (int s = 1; s < CSTAGES; s++) begin
        gpipe[s] <= gpipe[s-1];
        opipe[s] <= fs ? '1 : opipe[s-1];
      end
      for (int j = 0; j < PORTS; j++)
        dout[j] <= (fs || opipe[CSTAGES-1][j]) ? '0 : dpipe[DSTAGES-1][gpipe[CSTAGES-1][j]];
    end
  end

endmodule
