// fairisle_ack: acknowledgment unit of the cleaned Fairisle fabric.
//
// An output port controller answers the cell it receives on its own ack line
// ain[j]. This unit passes ain[j] straight back, without a clock delay, to the
// input that output j granted; an input that lost arbitration, or sent no
// cell, sees 0 (the negative acknowledgment).
//
// The unit keeps its own registered copy of the arbiters' grant and disable
// signals. The copy is one cycle behind the arbiters and is disabled at once
// by a frame start, so aout carries acknowledgments from t_h+3 up to and
// including the next frame-start cycle and is 0 from t_s+1 to t_h+2, as the cleaned
// fabric's acknowledgment timing requires. The copy register is this design's
// way of meeting that timing.
module fairisle_ack #(
  parameter int unsigned PORTS = fairisle_pkg::PORTS
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     fs,
  input  logic [$clog2(PORTS)-1:0] grant [PORTS],
  input  logic [PORTS-1:0]         odis,
  input  logic [PORTS-1:0]         ain,
  output logic [PORTS-1:0]         aout
);

  logic [$clog2(PORTS)-1:0] grant_q [PORTS];
  logic [PORTS-1:0]         odis_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      odis_q <= '1;
      for (int j = 0; j < PORTS; j++) grant_q[j] <= '0;
    end else begin
      odis_q <= fs ? '1 : odis;
      for (int j = 0; j < PORTS; j++) grant_q[j] <= grant[j];
    end
  end

  always_comb begin
    aout = '0;
    for (int j = 0; j < PORTS; j++)
      if (!odis_q[j]) aout[grant_q[j]] = aout[grant_q[j]] | ain[j];
  end

  // Each input requests one output, so two enabled outputs never grant the
  // same input.
  for (genvar a = 0; a < PORTS; a++) begin : g_chk
    for (genvar b = a + 1; b < PORTS; b++) begin : g_pair
      a_distinct: assert property (@(posedge clk) disable iff (rst)
        !(!odis_q[a] && !odis_q[b] && grant_q[a] == grant_q[b]));
    end
  end

endmodule
