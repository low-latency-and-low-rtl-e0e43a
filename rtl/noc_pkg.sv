// noc_pkg: widths, the flit control word and the X-Y route function shared by
// every block of the 2x2 wormhole network.
//
// A link carries, per cycle, a strobe, a 36-bit payload word and a 12-bit
// control word. The control word holds the last-word flag, the 5-bit address
// of the destination network port and the one-hot route, i.e. the output port
// the packet must take on the switch that receives the word. The 36-bit data
// width, the 5-bit destination and the one-hot route come from the link
// signalling of the design; the bit order of the control word and the two
// reserved bits are this design's choice.
//
// Addressing (this design's choice): a destination address is
// {2'b00, node[1:0], local}, so the eight network ports of the 2x2 array are
// numbered 0..7 = 2*node + local. Node n sits at x = n[0], y = n[1].
// Every 4-port switch uses port 0 and 1 for its two local ports, port 2 for
// the link to its horizontal neighbour (node n^1) and port 3 for the link to
// its vertical neighbour (node n^2).
package noc_pkg;

  localparam int unsigned NPORTS     = 4;   // ports per switch
  localparam int unsigned NOC_DATA_W = 36;  // payload bits per word
  localparam int unsigned DEST_W     = 5;   // destination address bits
  localparam int unsigned CTRL_W     = 12;  // stored control bits per word
  localparam int unsigned NNODES     = 4;   // switches in the 2x2 array
  localparam int unsigned NLOCAL     = 2;   // local ports per switch
  localparam int unsigned NNETPORTS  = NNODES * NLOCAL;

  localparam int unsigned P_LOCAL0 = 0;
  localparam int unsigned P_LOCAL1 = 1;
  localparam int unsigned P_HORIZ  = 2;
  localparam int unsigned P_VERT   = 3;

  typedef logic [NPORTS-1:0] route_t;
  typedef logic [DEST_W-1:0] dest_t;
  typedef logic [1:0]        node_t;

  typedef struct packed {
    logic  last;   // [11] last word of the packet
    dest_t dest;   // [10:6] destination network port
    logic [1:0] rsvd;  // [5:4] reserved, zero
    route_t route; // [3:0] one-hot output port on the receiving switch
  } ctrl_t;

  // Output port that X-Y routing picks on switch `node` for `dest`:
  // first correct x, then y, then deliver to the local port.
  function automatic route_t xy_route(input node_t node, input dest_t dest);
    route_t r;
    r = '0;
    if (dest[1] != node[0])      r[P_HORIZ] = 1'b1;
    else if (dest[2] != node[1]) r[P_VERT]  = 1'b1;
    else if (dest[0])            r[P_LOCAL1] = 1'b1;
    else                         r[P_LOCAL0] = 1'b1;
    return r;
  endfunction

endpackage
