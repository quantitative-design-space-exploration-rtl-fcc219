// rs_routing_table: routing table for static table-based routing.
//
// One entry per destination node of the MESH_X x MESH_Y mesh holds the output
// port to take from this switch (position MY_X, MY_Y). Reset loads the
// dimension-order (XY) route, computed here: east/west until the x
// coordinates match, then north/south, local at the node itself. A write
// port lets other routes be loaded afterwards; writes take effect on the next
// clock. The read is combinational. The paper names the routing table as one
// way to implement a static algorithm; its contents and write port are this
// design's choice.
module rs_routing_table
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X = 4,
  parameter int unsigned MESH_Y = 4,
  parameter int unsigned MY_X   = 0,
  parameter int unsigned MY_Y   = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] rd_x,
  input  logic [COORD_W-1:0] rd_y,
  output port_e              rd_port,
  input  logic               we,
  input  logic [COORD_W-1:0] wr_x,
  input  logic [COORD_W-1:0] wr_y,
  input  port_e              wr_port
);

  localparam int unsigned N = MESH_X * MESH_Y;

  port_e tbl [N];

  function automatic port_e xy_route(int unsigned dx, int unsigned dy);
    if (dx > MY_X)      return P_EAST;
    else if (dx < MY_X) return P_WEST;
    else if (dy > MY_Y) return P_SOUTH;
    else if (dy < MY_Y) return P_NORTH;
    else                return P_LOCAL;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N; i++)
        tbl[i] <= xy_route(i % MESH_X, i / MESH_X);
    end else if (we && (int'(wr_x) < MESH_X) && (int'(wr_y) < MESH_Y)) begin
      tbl[int'(wr_y) * MESH_X + int'(wr_x)] <= wr_port;
    end
  end

  always_comb begin
    if ((int'(rd_x) < MESH_X) && (int'(rd_y) < MESH_Y))
      rd_port = tbl[int'(rd_y) * MESH_X + int'(rd_x)];
    else
      rd_port = P_LOCAL;
  end

endmodule
