// tb_rs_port_ctrl: checks the connection state machine of one input port,
// with the test bench standing in for the arbiter and the crossbar.
// Backtracking instance: set-up, grant, a downstream refusal that sends the
// port back to "determine connection target" with the port marked as tried,
// a second grant, ack, an active connection, and a two-cycle tear-down.
// Non-backtracking instance: a downstream refusal becomes a nack upstream,
// held until the upstream request drops; a refusal by the arbiter does the
// same. The outputs are compared with the expected state each cycle.
module tb_rs_port_ctrl;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // one set of signals per instance: [0] backtracking, [1] not
  logic        in_req [2], grant [2], refuse [2], sel_ack [2], sel_nack [2];
  head_t       head [2];
  port_e       gport [2];
  logic        route_req [2], fwd_req [2], rel [2], up_ack [2], up_nack [2], conn_valid [2], ev_bt [2];
  logic [COORD_W-1:0] dx [2], dy [2];
  logic [NPORTS-1:0] tried [2];
  port_e       cport [2];
  conn_state_e st [2];

  for (genvar k = 0; k < 2; k++) begin : g_dut
    rs_port_ctrl #(.BACKTRACK(k == 0)) dut (
      .clk, .rst_n, .in_req(in_req[k]), .in_head(head[k]), .grant(grant[k]), .refuse(refuse[k]),
      .grant_port(gport[k]), .sel_ack(sel_ack[k]), .sel_nack(sel_nack[k]),
      .route_req(route_req[k]), .dest_x(dx[k]), .dest_y(dy[k]), .tried(tried[k]),
      .fwd_req(fwd_req[k]), .release_o(rel[k]), .up_ack(up_ack[k]), .up_nack(up_nack[k]),
      .conn_valid(conn_valid[k]), .conn_port(cport[k]), .state(st[k]), .ev_backtrack(ev_bt[k]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  task automatic step(); @(negedge clk); endtask

  initial begin
    for (int k = 0; k < 2; k++) begin
      in_req[k] = 0; grant[k] = 0; refuse[k] = 0; sel_ack[k] = 0; sel_nack[k] = 0;
      head[k] = '0; gport[k] = P_LOCAL;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    step();
    for (int k = 0; k < 2; k++)
      chk(st[k] == CS_IDLE && !route_req[k] && !fwd_req[k] && !up_ack[k] && !up_nack[k], "idle after reset");

    // A request with head word dest (2,3), src (1,1).
    for (int k = 0; k < 2; k++) begin
      in_req[k] = 1; head[k] = '{src_y: 4'd1, src_x: 4'd1, dest_y: 4'd3, dest_x: 4'd2};
    end
    step();
    for (int k = 0; k < 2; k++)
      chk(st[k] == CS_DETERMINE && route_req[k] && dx[k] == 2 && dy[k] == 3 && tried[k] == 0,
          "request latched, determining target");
    head[0] = '0; head[1] = '0;   // head only needs to be valid when req rises here
    step(); step();
    for (int k = 0; k < 2; k++) begin grant[k] = 1; gport[k] = P_EAST; end
    step();
    for (int k = 0; k < 2; k++) begin grant[k] = 0; end
    for (int k = 0; k < 2; k++)
      chk(st[k] == CS_WAIT && fwd_req[k] && conn_valid[k] && cport[k] == P_EAST && !up_ack[k],
          "granted, waiting for connection");
    step();
    // Downstream refuses.
    for (int k = 0; k < 2; k++) sel_nack[k] = 1;
    #1;
    chk(rel[0] && ev_bt[0], "backtracking port releases the refused output");
    chk(rel[1] && !ev_bt[1], "plain port releases the refused output");
    step();
    for (int k = 0; k < 2; k++) sel_nack[k] = 0;
    chk(st[0] == CS_DETERMINE && tried[0] == 5'b00100 && !conn_valid[0] && !up_nack[0],
        "backtracking: back to determine, east marked tried");
    chk(st[1] == CS_REFUSED && up_nack[1] && !fwd_req[1], "no backtracking: nack upstream");
    // Upstream of instance 1 gives up.
    in_req[1] = 0;
    step();
    chk(st[1] == CS_IDLE && !up_nack[1], "refusal cleared when req drops");

    // Instance 0: second attempt via south, acked.
    step();
    grant[0] = 1; gport[0] = P_SOUTH;
    step();
    grant[0] = 0;
    chk(st[0] == CS_WAIT && cport[0] == P_SOUTH, "second attempt granted south");
    step();
    sel_ack[0] = 1;
    step();
    chk(st[0] == CS_ACTIVE && up_ack[0] && fwd_req[0], "connection active, ack upstream");
    step(); step();
    // Tear-down: two cycles, release in the second.
    in_req[0] = 0;
    step();
    chk(st[0] == CS_DESTROY1 && !fwd_req[0] && up_ack[0] && !rel[0], "destroy, first cycle");
    step();
    chk(st[0] == CS_DESTROY2 && rel[0] && up_ack[0], "destroy, second cycle releases");
    sel_ack[0] = 0;
    step();
    chk(st[0] == CS_IDLE && !up_ack[0] && !conn_valid[0], "idle after tear-down");

    // Refusal by the arbiter itself.
    in_req[1] = 1; head[1] = '{src_y: 4'd0, src_x: 4'd0, dest_y: 4'd0, dest_x: 4'd3};
    step(); step(); step();
    refuse[1] = 1;
    step();
    refuse[1] = 0;
    chk(st[1] == CS_REFUSED && up_nack[1], "arbiter refusal gives nack");
    in_req[1] = 0;
    step();
    chk(st[1] == CS_IDLE, "idle again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
