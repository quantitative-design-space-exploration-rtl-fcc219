// rs_router: routing decision of a routing-switch at mesh position
// (MY_X, MY_Y).
//
// Given the destination of a connection it returns the output port to use.
// The decision depends on the routing algorithm, the switch position and the
// destination, and for the adaptive algorithms also on which output ports
// are free:
//   ALG_XY             x first, then y; refused if that port is in use.
//   ALG_TABLE          port read from the routing table; refused if in use.
//   ALG_ADAPTIVE_XY    x first; if that port is in use, the other direction
//                      that still shortens the path (y) is taken.
//   ALG_ADAPTIVE_XY_BT as adaptive XY, and ports that already refused this
//                      connection downstream ('tried') are skipped, so the
//                      switch can retry after a refusal (backtracking).
// Only minimal paths are produced. Ports that lead off the mesh and
// destinations outside it are never accepted (this design's choice).
// The block is purely combinational; the arbiter registers its result.
module rs_router
  import noc_pkg::*;
#(
  parameter int unsigned  MESH_X = 4,
  parameter int unsigned  MESH_Y = 4,
  parameter int unsigned  MY_X   = 0,
  parameter int unsigned  MY_Y   = 0,
  parameter routing_alg_e ALGO   = ALG_ADAPTIVE_XY_BT
) (
  input  logic [COORD_W-1:0] dest_x,
  input  logic [COORD_W-1:0] dest_y,
  input  port_e              table_port,
  input  logic [NPORTS-1:0]  out_free,
  input  logic [NPORTS-1:0]  tried,
  output port_e              port,
  output logic               ok,
  output logic               alt
);

  logic [NPORTS-1:0] on_mesh, usable;
  logic              in_range, has_x, has_y;
  port_e             xdir, ydir, primary;

  always_comb begin
    on_mesh          = '1;
    on_mesh[P_NORTH] = (MY_Y > 0);
    on_mesh[P_SOUTH] = (MY_Y + 1 < MESH_Y);
    on_mesh[P_EAST]  = (MY_X + 1 < MESH_X);
    on_mesh[P_WEST]  = (MY_X > 0);
    usable   = out_free & ~tried & on_mesh;
    in_range = (int'(dest_x) < MESH_X) && (int'(dest_y) < MESH_Y);

    has_x = (int'(dest_x) != MY_X);
    has_y = (int'(dest_y) != MY_Y);
    xdir  = (int'(dest_x) > MY_X) ? P_EAST  : P_WEST;
    ydir  = (int'(dest_y) > MY_Y) ? P_SOUTH : P_NORTH;

    if (ALGO == ALG_TABLE) primary = table_port;
    else if (has_x)        primary = xdir;
    else if (has_y)        primary = ydir;
    else                   primary = P_LOCAL;

    port = primary;
    ok   = 1'b0;
    alt  = 1'b0;
    if (in_range) begin
      if (usable[primary]) begin
        ok = 1'b1;
      end else if ((ALGO == ALG_ADAPTIVE_XY || ALGO == ALG_ADAPTIVE_XY_BT)
                   && has_x && has_y && usable[ydir]) begin
        port = ydir;
        ok   = 1'b1;
        alt  = 1'b1;
      end
    end
  end

endmodule
