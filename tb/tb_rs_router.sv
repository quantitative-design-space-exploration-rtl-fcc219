// tb_rs_router: checks the routing decision of a switch at (1,2) in a 4 x 4
// mesh for all four routing algorithms at once. Random destinations (some
// outside the mesh), random free-port and tried-port masks are applied;
// a reference model written here from the algorithm rules gives the expected
// port, ok and alt outputs.
module tb_rs_router;
  import noc_pkg::*;
  localparam int MX = 4, MY = 4, X0 = 1, Y0 = 2;
  logic [COORD_W-1:0] dx, dy;
  logic [NPORTS-1:0] free, tried;
  port_e tport;
  port_e p [4];
  logic ok [4], alt [4];
  int checks = 0, failures = 0;

  rs_router #(.MESH_X(MX), .MESH_Y(MY), .MY_X(X0), .MY_Y(Y0), .ALGO(ALG_XY)) u0
    (.dest_x(dx), .dest_y(dy), .table_port(tport), .out_free(free), .tried(tried), .port(p[0]), .ok(ok[0]), .alt(alt[0]));
  rs_router #(.MESH_X(MX), .MESH_Y(MY), .MY_X(X0), .MY_Y(Y0), .ALGO(ALG_TABLE)) u1
    (.dest_x(dx), .dest_y(dy), .table_port(tport), .out_free(free), .tried(tried), .port(p[1]), .ok(ok[1]), .alt(alt[1]));
  rs_router #(.MESH_X(MX), .MESH_Y(MY), .MY_X(X0), .MY_Y(Y0), .ALGO(ALG_ADAPTIVE_XY)) u2
    (.dest_x(dx), .dest_y(dy), .table_port(tport), .out_free(free), .tried(tried), .port(p[2]), .ok(ok[2]), .alt(alt[2]));
  rs_router #(.MESH_X(MX), .MESH_Y(MY), .MY_X(X0), .MY_Y(Y0), .ALGO(ALG_ADAPTIVE_XY_BT)) u3
    (.dest_x(dx), .dest_y(dy), .table_port(tport), .out_free(free), .tried(tried), .port(p[3]), .ok(ok[3]), .alt(alt[3]));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Port usable: free, not tried, and leading to a node inside the mesh.
  function automatic bit usable(int q);
    bit inside_mesh;
    case (q)
      1: inside_mesh = (Y0 > 0);
      2: inside_mesh = (X0 < MX-1);
      3: inside_mesh = (Y0 < MY-1);
      4: inside_mesh = (X0 > 0);
      default: inside_mesh = 1;
    endcase
    return free[q] && !tried[q] && inside_mesh;
  endfunction

  int n_alt = 0, n_refuse = 0;

  initial begin
    for (int it = 0; it < 4000; it++) begin
      int x, y, xy_p, y_p, e_p;
      bit e_ok, e_alt;
      x = $urandom_range(MX); y = $urandom_range(MY);   // MX/MY itself is off the mesh
      dx = COORD_W'(x); dy = COORD_W'(y);
      free = NPORTS'($urandom); tried = NPORTS'($urandom) & NPORTS'($urandom);
      if (x != X0) xy_p = (x > X0) ? 2 : 4;
      else if (y != Y0) xy_p = (y > Y0) ? 3 : 1;
      else xy_p = 0;
      y_p = (y > Y0) ? 3 : 1;
      tport = port_e'($urandom_range(4));
      #1;
      for (int a = 0; a < 4; a++) begin
        int prim;
        bit tr;
        prim = (a == 1) ? int'(tport) : xy_p;
        e_p = prim; e_ok = 0; e_alt = 0;
        if (x < MX && y < MY) begin
          if (usable(prim)) e_ok = 1;
          else if (a >= 2 && x != X0 && y != Y0 && usable(y_p)) begin
            e_p = y_p; e_ok = 1; e_alt = 1;
          end
        end
        checks++;
        if (ok[a] != e_ok || alt[a] != e_alt || (e_ok && int'(p[a]) != e_p)) begin
          failures++;
          $display("algo %0d dest (%0d,%0d) free %b tried %b: got %0d/%0d/%0d expected %0d/%0d/%0d",
                   a, x, y, free, tried, p[a], ok[a], alt[a], e_p, e_ok, e_alt);
        end
        if (e_alt) n_alt++;
        if (!e_ok) n_refuse++;
      end
    end
    checks++;
    if (n_alt == 0 || n_refuse == 0) begin failures++; $display("detour or refusal never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
