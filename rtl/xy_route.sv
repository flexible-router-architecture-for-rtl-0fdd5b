// xy_route: routing logic of an input port (dimension-ordered XY routing).
//
// Combinational. A packet first travels along X until its destination
// column is reached, then along Y, and leaves through the Local port at its
// destination. The router's own coordinates are parameters; the packet's
// destination comes in as coordinates. Y grows towards North (a choice of
// this design; the routing rule itself is the one the router is built for).
//
// Ports: dst_x, dst_y in; dir out (E, W, N, S or L). No clock, no latency.
module xy_route
  import noc_pkg::*;
#(
  parameter int unsigned X = 0,
  parameter int unsigned Y = 0
) (
  input  coord_t dst_x,
  input  coord_t dst_y,
  output dir_e   dir
);

  localparam coord_t MY_X = coord_t'(X);
  localparam coord_t MY_Y = coord_t'(Y);

  always_comb begin
    if (dst_x > MY_X)      dir = DIR_E;
    else if (dst_x < MY_X) dir = DIR_W;
    else if (dst_y > MY_Y) dir = DIR_N;
    else if (dst_y < MY_Y) dir = DIR_S;
    else                   dir = DIR_L;
  end

endmodule
