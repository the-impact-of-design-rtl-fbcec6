// fairisle_arbitration: arbitration unit of the cleaned Fairisle fabric.
//
// Made of the timing unit, the routing-tag decoder, the priority filter and
// one round-robin arbiter per output port, as in the published fabric. Timing,
// for a header on the inputs at cycle t_h (at least FS_DELAY cycles after the
// frame start t_s):
//   t_h    header bytes on din; the timing unit takes the header cycle and the
//          decoder registers the tags
//   t_h+1  route_enable; the filtered requests reach the arbiters
//   t_h+2  grant[j] / odis[j] valid for every output j, held to the next t_s
//   t_s+1  every odis[j] is 1 again after a frame start
// So arbitration is complete two cycles after the headers arrive.
module fairisle_arbitration #(
  parameter int unsigned PORTS    = fairisle_pkg::PORTS,
  parameter int unsigned WIDTH    = fairisle_pkg::WIDTH,
  parameter int unsigned FS_DELAY = fairisle_pkg::FS_DELAY
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     fs,
  input  logic [WIDTH-1:0]         din   [PORTS],
  output logic [$clog2(PORTS)-1:0] grant [PORTS],
  output logic [PORTS-1:0]         odis
);

  logic [PORTS-1:0] active;
  logic [PORTS-1:0] req_hi [PORTS];
  logic [PORTS-1:0] req_lo [PORTS];
  logic [PORTS-1:0] req    [PORTS];
  logic             route_enable;

  fairisle_timing #(.PORTS(PORTS), .FS_DELAY(FS_DELAY)) u_timing (
    .clk, .rst, .fs, .active, .route_enable
  );

  fairisle_decoder #(.PORTS(PORTS), .WIDTH(WIDTH)) u_decoder (
    .clk, .rst, .din, .active, .req_hi, .req_lo
  );

  fairisle_priority_filter #(.PORTS(PORTS)) u_filter (
    .req_hi, .req_lo, .req
  );

  for (genvar j = 0; j < PORTS; j++) begin : g_arb
    fairisle_arbiter #(.PORTS(PORTS)) u_arbiter (
      .clk, .rst, .fs, .route_enable,
      .req   (req[j]),
      .grant (grant[j]),
      .odis  (odis[j])
    );
  end

endmodule
