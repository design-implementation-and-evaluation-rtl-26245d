// route_nrc: next-hop route computation for lookahead XY routing in a 2D mesh.
//
// A router at (X, Y) that sends a head flit out of port out_port works out which output
// port the flit will take at the next router, so that router need not compute a route
// before allocating. The next router's coordinates follow from this router's own and the
// port: east is X+1, west X-1, north Y+1, south Y-1. XY dimension-order routing is then
// applied at those coordinates: first along X until the destination column is reached,
// then along Y, then the local port. For out_port = local the flit leaves the network
// here and the result is the local port.
//
// Purely combinational. The algorithm is the document's; the port numbering and the
// treatment of the local port are this design's.
module route_nrc
  import noc_pkg::*;
#(
  parameter int X = 0,
  parameter int Y = 0
) (
  input  logic [PORT_W-1:0]  out_port,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output logic [PORT_W-1:0]  next_port
);

  logic [COORD_W-1:0] nx, ny;

  always_comb begin
    nx = COORD_W'(X);
    ny = COORD_W'(Y);
    case (out_port)
      PORT_EAST:  nx = COORD_W'(X + 1);
      PORT_WEST:  nx = COORD_W'(X - 1);
      PORT_NORTH: ny = COORD_W'(Y + 1);
      PORT_SOUTH: ny = COORD_W'(Y - 1);
      default: ;
    endcase
    next_port = xy_route(nx, ny, dst_x, dst_y);
  end

endmodule
