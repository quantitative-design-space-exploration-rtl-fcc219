// tb_rs_routing_table: checks the routing table of a switch at (2,1) in a
// 4 x 4 mesh. After reset every entry must hold the dimension-order route
// (computed here from the coordinates); entries written through the write
// port must read back from the next cycle on, and other entries stay put.
module tb_rs_routing_table;
  import noc_pkg::*;
  localparam int MX = 4, MY = 4, X0 = 2, Y0 = 1;
  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] rd_x, rd_y, wr_x, wr_y;
  port_e rd_port, wr_port;
  logic we;
  int checks = 0, failures = 0;
  port_e model [MX*MY];

  rs_routing_table #(.MESH_X(MX), .MESH_Y(MY), .MY_X(X0), .MY_Y(Y0)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic port_e xy(int x, int y);
    if (x != X0) return (x > X0) ? P_EAST : P_WEST;
    if (y != Y0) return (y > Y0) ? P_SOUTH : P_NORTH;
    return P_LOCAL;
  endfunction

  task automatic check_all();
    for (int y = 0; y < MY; y++)
      for (int x = 0; x < MX; x++) begin
        rd_x = COORD_W'(x); rd_y = COORD_W'(y);
        #1;
        checks++;
        if (rd_port != model[y*MX+x]) begin
          failures++; $display("entry (%0d,%0d) = %0d, expected %0d", x, y, rd_port, model[y*MX+x]);
        end
      end
  endtask

  initial begin
    we = 0; wr_x = 0; wr_y = 0; wr_port = P_LOCAL; rd_x = 0; rd_y = 0;
    for (int y = 0; y < MY; y++) for (int x = 0; x < MX; x++) model[y*MX+x] = xy(x, y);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int k = 0; k < 40; k++) begin
      int x, y;
      x = $urandom_range(MX-1); y = $urandom_range(MY-1);
      @(negedge clk);
      we = 1; wr_x = COORD_W'(x); wr_y = COORD_W'(y); wr_port = port_e'($urandom_range(4));
      model[y*MX+x] = wr_port;
      @(negedge clk);
      we = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
