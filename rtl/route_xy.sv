// route_xy: route computation unit of a mesh router (XY dimension order).
//
// From the destination tile id (DID) of a head flit and the router's own mesh
// coordinates it picks the output port: first along X (east or west) until the
// column matches, then along Y (north or south), then the local port. Tile ids
// are row-major, id = y*MESH_X + x, with row 0 on the north edge, so the
// document's example path from tile 4 to tile 15 runs 4-5-6-7-11-15.
// Purely combinational.
module route_xy
  import noc_pkg::*;
#(
  parameter int unsigned MX = MESH_X
) (
  input  logic [TILE_W-1:0] did,
  input  logic [1:0]        cur_x,
  input  logic [1:0]        cur_y,
  output port_e             out_port
);
  logic [1:0] dx, dy;
  assign dx = 2'(did % MX);
  assign dy = 2'(did / MX);

  always_comb begin
    if      (dx > cur_x) out_port = PORT_EAST;
    else if (dx < cur_x) out_port = PORT_WEST;
    else if (dy > cur_y) out_port = PORT_SOUTH;
    else if (dy < cur_y) out_port = PORT_NORTH;
    else                 out_port = PORT_LOCAL;
  end
endmodule
