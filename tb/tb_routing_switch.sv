// tb_routing_switch: checks a complete routing-switch at (1,1) of a 4 x 4
// mesh, as two instances fed with the same input stimulus: one with
// adaptive XY routing and backtracking (the default), one with plain XY
// routing. Each output port has a model of the next switch that answers a
// request with ack or nack one cycle later and holds it until the request
// drops (the four-phase link handshake).
// Checked: head word forwarded; request on the output 5 cycles after it
// reaches the input (input register plus three cycles of target
// determination, after one cycle in which the idle port sees it); data words delayed by one cycle; tear-down drops the
// output request 2 cycles after the input request, ack 3 cycles after;
// a busy XY port leads to an adaptive detour (or to a refusal with XY);
// a downstream nack leads to a retry on the other port (backtracking) or to
// a nack upstream (XY); two simultaneous connections through the crossbar.
// A third instance is a 3-port switch (local, east, south) that must ignore
// and never use its missing ports.
module tb_routing_switch;
  import noc_pkg::*;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int cyc = 0;

  logic [NPORTS-1:0] in_req, in_valid;
  logic [NPORTS-1:0][W-1:0] in_data;
  logic [NPORTS-1:0] in_ack [3], in_nack [3], out_req [3], out_valid [3], out_ack [3], out_nack [3];
  logic [NPORTS-1:0][W-1:0] out_data [3];
  logic ev_setup [3], ev_refuse [3], ev_bt [3], ev_alt [3];
  logic [NPORTS-1:0] nack_mode;   // per output: downstream refuses
  int n_bt [3], n_alt [3], n_refuse [3];
  localparam logic [NPORTS-1:0] EN3 = 5'b01101;   // local, east, south

  for (genvar k = 0; k < 3; k++) begin : g_dut
    routing_switch #(.DATA_W(W), .INPUT_REG(1'b1),
                     .ALGO(k == 1 ? ALG_XY : ALG_ADAPTIVE_XY_BT), .PORT_EN(k == 2 ? EN3 : 5'b11111),
                     .MESH_X(4), .MESH_Y(4), .MY_X(1), .MY_Y(1)) dut (
      .clk, .rst_n,
      .in_req, .in_valid, .in_data, .in_ack(in_ack[k]), .in_nack(in_nack[k]),
      .out_req(out_req[k]), .out_valid(out_valid[k]), .out_data(out_data[k]),
      .out_ack(out_ack[k]), .out_nack(out_nack[k]),
      .tbl_we(1'b0), .tbl_x('0), .tbl_y('0), .tbl_port(P_LOCAL),
      .ev_setup(ev_setup[k]), .ev_refuse(ev_refuse[k]), .ev_backtrack(ev_bt[k]), .ev_alt(ev_alt[k]));

    // Next-switch models.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_ack[k] <= '0; out_nack[k] <= '0;
      end else begin
        for (int o = 0; o < NPORTS; o++) begin
          if (!out_req[k][o]) begin
            out_ack[k][o] <= 1'b0; out_nack[k][o] <= 1'b0;
          end else if (!out_ack[k][o] && !out_nack[k][o]) begin
            out_ack[k][o]  <= !nack_mode[o];
            out_nack[k][o] <=  nack_mode[o];
          end
        end
      end
    end
    always @(posedge clk) begin
      if (ev_bt[k]) n_bt[k]++;
      if (ev_alt[k]) n_alt[k]++;
      if (ev_refuse[k]) n_refuse[k]++;
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (cycle %0d)", msg, cyc); end
  endtask

  function automatic logic [W-1:0] head(int dx, int dy, int sx, int sy);
    head_t h;
    h = '{src_y: 4'(sy), src_x: 4'(sx), dest_y: 4'(dy), dest_x: 4'(dx)};
    return W'(h);
  endfunction

  // Wait (at negedges) until cond of instance k holds; returns cycles waited.
  task automatic wait_out_req(int k, int o, output int n);
    n = 0;
    while (!out_req[k][o] && n < 50) begin @(negedge clk); n++; end
  endtask

  initial begin
    int n, t0;
    in_req = '0; in_valid = '0; in_data = '0; nack_mode = '0;
    n_bt = '{0, 0, 0}; n_alt = '{0, 0, 0}; n_refuse = '{0, 0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- T1: west -> (3,1) leaves east. Timing of set-up, data, tear-down.
    in_req[P_WEST] = 1; in_data[P_WEST] = head(3, 1, 0, 1);
    @(negedge clk);
    wait_out_req(0, P_EAST, n);
    chk(n == 4, $sformatf("output request 5 cycles after input request (got %0d)", n + 1));
    chk(out_req[1][P_EAST], "XY instance also uses east");
    chk(out_data[0][P_EAST] == head(3, 1, 0, 1), "head word forwarded");
    n = 0;
    while (!in_ack[0][P_WEST] && n < 20) begin @(negedge clk); n++; end
    chk(n == 2 && in_ack[1][P_WEST], $sformatf("ack upstream 2 cycles after output request (got %0d)", n));
    chk(!in_ack[2][P_WEST] && !in_nack[2][P_WEST] && out_req[2] == 0, "3-port switch ignores its missing west port");
    for (int i = 0; i < 4; i++) begin
      in_valid[P_WEST] = 1; in_data[P_WEST] = 32'hA000_0000 + i;
      @(negedge clk);
      for (int k = 0; k < 2; k++)
        chk(out_valid[k][P_EAST] && out_data[k][P_EAST] == 32'hA000_0000 + i, "data word one cycle later");
    end
    in_valid[P_WEST] = 0;
    @(negedge clk);
    chk(out_valid[0] == 0, "no stray strobe");

    // ---- T2: while west->east is up, north wants (3,2): XY port east is busy.
    in_req[P_NORTH] = 1; in_data[P_NORTH] = head(3, 2, 1, 0);
    @(negedge clk);
    wait_out_req(0, P_SOUTH, n);
    chk(n == 4, "adaptive detour to south");
    chk(n_alt[0] == 1, "detour counted");
    n = 0;
    while (!in_nack[1][P_NORTH] && n < 20) begin @(negedge clk); n++; end
    chk(in_nack[1][P_NORTH] && n_refuse[1] == 1, "XY instance refuses the busy port");
    repeat (2) @(negedge clk);
    chk(in_ack[0][P_NORTH] && in_ack[0][P_WEST], "two connections at once");
    in_valid[P_NORTH] = 1; in_data[P_NORTH] = 32'h5555_0001;
    in_valid[P_WEST]  = 1; in_data[P_WEST]  = 32'h3333_0002;
    @(negedge clk);
    chk(out_data[0][P_SOUTH] == 32'h5555_0001 && out_data[0][P_EAST] == 32'h3333_0002
        && out_valid[0][P_SOUTH] && out_valid[0][P_EAST], "both connections carry their own data");
    in_valid = '0;

    // Tear both down.
    in_req[P_NORTH] = 0; in_req[P_WEST] = 0; in_data = '0;
    @(negedge clk);   // input register
    @(negedge clk);   // destroy, first cycle
    chk(!out_req[0][P_EAST] && !out_req[0][P_SOUTH], "output request dropped 2 cycles after input");
    chk(in_ack[0][P_WEST], "ack held during destroy");
    @(negedge clk);
    @(negedge clk);
    chk(!in_ack[0][P_WEST] && !in_ack[0][P_NORTH] && !in_nack[1][P_NORTH], "ack low 3 cycles after tear-down");
    repeat (3) @(negedge clk);

    // ---- T3: local -> (2,2); the next switch east refuses.
    nack_mode[P_EAST] = 1;
    in_req[P_LOCAL] = 1; in_data[P_LOCAL] = head(2, 2, 1, 1);
    n = 0;
    while (!in_ack[0][P_LOCAL] && !in_nack[0][P_LOCAL] && n < 40) begin @(negedge clk); n++; end
    chk(in_ack[0][P_LOCAL] && n_bt[0] == 1, "backtracking: retried south after the east refusal");
    chk(out_req[0][P_SOUTH] && !out_req[0][P_EAST], "connection now runs south");
    chk(in_nack[1][P_LOCAL] || n_refuse[1] == 1, "XY: refusal passed upstream");
    chk(in_ack[2][P_LOCAL] && out_req[2][P_SOUTH] && n_bt[2] == 1, "3-port switch backtracks to south as well");
    n = 0;
    while (!in_nack[1][P_LOCAL] && n < 20) begin @(negedge clk); n++; end
    chk(in_nack[1][P_LOCAL], "XY instance nacks upstream");
    in_req[P_LOCAL] = 0;
    repeat (6) @(negedge clk);
    chk(in_ack[0] == 0 && in_nack[1] == 0 && out_req[0] == 0, "all idle");

    // ---- T4: east and south both refuse: backtracking gives up upstream.
    nack_mode[P_SOUTH] = 1;
    in_req[P_LOCAL] = 1; in_data[P_LOCAL] = head(2, 2, 1, 1);
    n = 0;
    while (!in_nack[0][P_LOCAL] && n < 60) begin @(negedge clk); n++; end
    chk(in_nack[0][P_LOCAL] && n_bt[0] == 3, "all feasible ports refused: nack upstream");
    in_req[P_LOCAL] = 0;
    repeat (4) @(negedge clk);
    chk(in_nack[0] == 0, "refusal released");
    nack_mode = '0;

    // ---- T5: destination is this switch: local output.
    in_req[P_EAST] = 1; in_data[P_EAST] = head(1, 1, 2, 1);
    @(negedge clk);
    wait_out_req(0, P_LOCAL, n);
    chk(n == 4 && out_data[0][P_LOCAL] == head(1, 1, 2, 1), "delivered to local port");
    chk(out_req[2][P_LOCAL], "3-port switch delivers from east to local");
    in_req[P_EAST] = 0;
    repeat (6) @(negedge clk);
    // 3-port switch: a destination to the west cannot be reached.
    in_req[P_LOCAL] = 1; in_data[P_LOCAL] = head(0, 1, 1, 1);
    n = 0;
    while (!in_nack[2][P_LOCAL] && n < 20) begin @(negedge clk); n++; end
    chk(in_nack[2][P_LOCAL] && out_req[2] == 0, "3-port switch refuses a route through a missing port");
    chk(in_ack[0][P_LOCAL] || out_req[0][P_WEST], "5-port switch routes it west");
    in_req[P_LOCAL] = 0;
    in_req[P_EAST] = 0;
    repeat (5) @(negedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
