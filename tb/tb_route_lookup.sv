// tb_route_lookup: exhaustive test of the next-hop route look-up on all four
// switches of the 2x2 array. The expected route is worked out from grid
// coordinates: the neighbour reached through port 2 differs in x, the one
// through port 3 in y; on the neighbour, X-Y routing takes port 2 while x
// differs, port 3 while y differs, else local port 0 or 1. Local outputs
// expect no next route.
module tb_route_lookup;
  import noc_pkg::*;

  dest_t  dest;
  route_t route;
  route_t nr [4];
  int checks = 0, failures = 0;

  route_lookup #(.NODE(2'd0)) u0 (.dest, .route, .next_route(nr[0]));
  route_lookup #(.NODE(2'd1)) u1 (.dest, .route, .next_route(nr[1]));
  route_lookup #(.NODE(2'd2)) u2 (.dest, .route, .next_route(nr[2]));
  route_lookup #(.NODE(2'd3)) u3 (.dest, .route, .next_route(nr[3]));

  function automatic route_t expect_next(int node, int dst, int port);
    int nx, ny, dx, dy;
    if (port < 2) return '0;
    nx = node % 2; ny = node / 2;
    if (port == 2) nx = 1 - nx; else ny = 1 - ny;
    dx = (dst / 2) % 2; dy = (dst / 4) % 2;
    if (dx != nx) return 4'b0100;
    if (dy != ny) return 4'b1000;
    return (dst % 2) ? 4'b0010 : 4'b0001;
  endfunction

  initial begin
    for (int dst = 0; dst < 8; dst++)
      for (int port = 0; port < 4; port++) begin
        dest = dest_t'(dst); route = route_t'(1 << port);
        #1;
        for (int n = 0; n < 4; n++) begin
          checks++;
          if (nr[n] != expect_next(n, dst, port)) begin
            failures++;
            $display("FAIL node %0d dest %0d port %0d: got %b", n, dst, port, nr[n]);
          end
        end
      end
    route = '0; #1;
    for (int n = 0; n < 4; n++) begin
      checks++;
      if (nr[n] != '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
