// fairisle_decoder: routing-tag decoder of the cleaned Fairisle fabric.
//
// Every clock it registers the routing tag fields of the byte on each input
// link and decodes them into request matrices indexed [output][input]:
// req_hi[j][i] is set when input i is active, has its priority bit set and
// routes to output j; req_lo[j][i] likewise for a cell without priority. The
// register means the requests describe the bytes of the previous cycle, which
// lines them up with the timing unit's registered route_enable (t_h+1).
// active[i] is the combinational active bit of the current byte, used by the
// timing unit to spot the headers.
//
// The decoder's place in the arbitration unit follows the published fabric;
// the tag layout (fairisle_pkg::tag_t) and the register are this design's
// choice.
module fairisle_decoder #(
  parameter int unsigned PORTS = fairisle_pkg::PORTS,
  parameter int unsigned WIDTH = fairisle_pkg::WIDTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] din    [PORTS],
  output logic [PORTS-1:0] active,
  output logic [PORTS-1:0] req_hi [PORTS],
  output logic [PORTS-1:0] req_lo [PORTS]
);
  import fairisle_pkg::*;

  tag_t tag [PORTS];

  always_comb begin
    for (int i = 0; i < PORTS; i++) begin
      tag[i]    = tag_t'(din[i][7:0]);
      active[i] = tag[i].active;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < PORTS; j++) begin
        req_hi[j] <= '0;
        req_lo[j] <= '0;
      end
    end else begin
      for (int j = 0; j < PORTS; j++) begin
        for (int i = 0; i < PORTS; i++) begin
          req_hi[j][i] <= tag[i].active &&  tag[i].prio && (int'(tag[i].route) == j);
          req_lo[j][i] <= tag[i].active && !tag[i].prio && (int'(tag[i].route) == j);
        end
      end
    end
  end

endmodule
