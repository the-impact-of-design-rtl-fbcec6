// fairisle_arbiter: round-robin arbiter for one output port.
//
// On route_enable (one cycle, t_h+1) it chooses one input among the filtered
// requests for its output, starting the search at the input after the one it
// granted last, and registers the choice: grant holds the winning input's
// number and odis (output disable) drops to 0 from t_h+2 for the rest of the
// frame. With no request the output stays disabled. A frame start disables the
// output again from the next cycle, so the grant of a cell covers its whole
// frame. In the cleaned fabric the disable comes one cycle later than in the
// original one, so the dataswitch can send the last byte of a cell; here that
// is reached by the dataswitch's own control delay, which is lined up with the
// data delay.
//
// The round-robin rule and the grant/disable outputs follow the published
// fabric; the pointer encoding and reset values are this design's choice
// (after reset input 0 has the first turn).
module fairisle_arbiter #(
  parameter int unsigned PORTS = fairisle_pkg::PORTS
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     fs,
  input  logic                     route_enable,
  input  logic [PORTS-1:0]         req,
  output logic [$clog2(PORTS)-1:0] grant,
  output logic                     odis
);

  typedef logic [$clog2(PORTS)-1:0] idx_t;

  idx_t last;     // input granted most recently
  idx_t winner;
  logic found;

  // Search the inputs in the order last+1, last+2, ..., last.
  always_comb begin
    winner = last;
    found  = 1'b0;
    for (int k = 1; k <= PORTS; k++) begin
      idx_t cand;
      cand = idx_t'((int'(last) + k) % PORTS);
      if (!found && req[cand]) begin
        winner = cand;
        found  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      grant <= '0;
      odis  <= 1'b1;
      last  <= idx_t'(PORTS - 1);
    end else if (fs) begin
      odis  <= 1'b1;
    end else if (route_enable) begin
      odis <= !found;
      if (found) begin
        grant <= winner;
        last  <= winner;
      end
    end
  end

  // The grant only moves when an arbitration takes place.
  a_grant_stable: assert property (@(posedge clk) disable iff (rst)
                                   !route_enable |=> $stable(grant));

endmodule
