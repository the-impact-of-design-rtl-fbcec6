// fairisle_pkg: shared sizes, types and the routing-tag layout of the
// Fairisle 4x4 ATM switch fabric.
//
// A cell enters the fabric as a one-byte routing tag (the header) followed by
// the cell's data bytes, one byte per clock on each of the four input links.
// The tag carries an active bit (a cell is present), a priority bit and the
// two-bit number of the requested output port. The fabric size (4x4), the
// byte-wide links, the 5-cycle data latency and the 5-cycle frame-start delay
// follow the published cleaned fabric; the bit positions inside the tag are
// this design's choice.
package fairisle_pkg;

  localparam int unsigned PORTS      = 4;  // 4 by 4 fabric
  localparam int unsigned WIDTH      = 8;  // one byte per link per clock
  localparam int unsigned DATA_DELAY = 5;  // Din to Dout latency in cycles
  localparam int unsigned FS_DELAY   = 5;  // frame start to earliest header

  typedef logic [WIDTH-1:0]         byte_t;
  typedef logic [$clog2(PORTS)-1:0] port_t;

  // Routing tag, the first byte of every cell.
  //   bit 0    : active   - a cell is present on this link
  //   bit 1    : prio     - high-priority cell
  //   bits 3:2 : route    - requested output port
  //   bits 7:4 : unused by the fabric
  typedef struct packed {
    logic [3:0] spare;
    port_t      route;
    logic       prio;
    logic       active;
  } tag_t;

  function automatic tag_t make_tag(logic active, logic prio, port_t route);
    tag_t t;
    t.spare  = '0;
    t.route  = route;
    t.prio   = prio;
    t.active = active;
    return t;
  endfunction

endpackage
