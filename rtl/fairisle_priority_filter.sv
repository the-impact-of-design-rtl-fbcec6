// fairisle_priority_filter: first stage of the two-stage arbitration.
//
// For each output port it passes on only the high-priority requests when at
// least one input with its priority bit set wants that output, and otherwise
// the low-priority requests. The round-robin arbiters then choose among what
// is left, so high-priority cells always take precedence and the choice within
// a priority level is fair. Purely combinational; request vectors are indexed
// [output][input].
module fairisle_priority_filter #(
  parameter int unsigned PORTS = fairisle_pkg::PORTS
) (
  input  logic [PORTS-1:0] req_hi [PORTS],
  input  logic [PORTS-1:0] req_lo [PORTS],
  output logic [PORTS-1:0] req    [PORTS]
);

  always_comb begin
    for (int j = 0; j < PORTS; j++)
      req[j] = (|req_hi[j]) ? req_hi[j] : req_lo[j];
  end

endmodule
