// route_lookup: next-hop route look-up of a switch in the 2x2 array.
//
// A word arriving at a switch already carries the route for this switch. When
// it leaves through a mesh port the switch must also tell the neighbour which
// output that neighbour has to use, so while the word passes it computes the
// X-Y route on the neighbour: port 2 leads to node NODE^1, port 3 to node
// NODE^2. For words leaving through a local port (0 or 1) the next route is
// zero, the network interface needs none. Purely combinational.
//
// Look-up of the next route during the hop follows the design description;
// the X-Y rule is the one its example uses, the table is written as logic.
module route_lookup
  import noc_pkg::*;
#(
  parameter node_t NODE = 2'd0
) (
  input  dest_t  dest,       // destination network port
  input  route_t route,      // one-hot output port on this switch (may be 0)
  output route_t next_route  // one-hot output port on the next switch
);

  always_comb begin
    next_route = '0;
    if (route[P_HORIZ])     next_route = xy_route(NODE ^ 2'b01, dest);
    else if (route[P_VERT]) next_route = xy_route(NODE ^ 2'b10, dest);
  end

endmodule
