// routing_switch: centralized, circuit-switched 5-port routing-switch for a
// 2-D mesh NoC.
//
// Ports 0..4 are local, north, east, south and west. Every port has a
// forward link (req, valid, data) and a backward link (ack, nack) in each
// direction. Inside, each input passes an optional input register
// (INPUT_REG) and is watched by its own connection control (rs_port_ctrl).
// A single arbiter and a single router are shared by all five inputs (the
// centralized architecture): the arbiter picks one input that needs a target,
// the router decides the output port from the destination, the switch
// position (MY_X, MY_Y), the algorithm ALGO and the ports in use, and the
// arbiter grants or refuses it. The crossbar then joins input and output
// until the connection is torn down. There are no data buffers.
//
// Timing, uncontended, INPUT_REG = 1: a request passes the input register
// (one cycle), is seen by the idle port control (one cycle) and then spends
// three cycles in "determine connection target"; it is on the output link
// five cycles after it arrived. Data words pass with one cycle of
// latency per switch when INPUT_REG = 1 and none when 0. Tear-down takes two
// cycles. The routing table (ALGO = ALG_TABLE only) can be rewritten through
// tbl_*. ev_* pulse once per set-up grant, refusal, backtracking retry and
// adaptive detour, for statistics.
//
// PORT_EN selects which of the five ports exist (bit 0 local ... bit 4
// west); the default builds all five. Clearing bits gives the smaller 3- and
// 4-port switches: a port left out has no register and no control, its
// outputs are tied to 0 and the router never chooses it. Which ports a
// 3- or 4-port switch keeps is left to the user.
//
// The block structure (switch, arbiter, router, input registers) and the
// state names follow the paper; the link handshake, the port numbering and
// the head-word layout are this design's choices.
module routing_switch
  import noc_pkg::*;
#(
  parameter int unsigned  DATA_W    = 32,
  parameter bit           INPUT_REG = 1'b1,
  parameter routing_alg_e ALGO      = ALG_ADAPTIVE_XY_BT,
  parameter int unsigned  MESH_X    = 4,
  parameter int unsigned  MESH_Y    = 4,
  parameter int unsigned  MY_X      = 0,
  parameter int unsigned  MY_Y      = 0,
  parameter logic [NPORTS-1:0] PORT_EN = '1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // input ports
  input  logic [NPORTS-1:0]             in_req,
  input  logic [NPORTS-1:0]             in_valid,
  input  logic [NPORTS-1:0][DATA_W-1:0] in_data,
  output logic [NPORTS-1:0]             in_ack,
  output logic [NPORTS-1:0]             in_nack,
  // output ports
  output logic [NPORTS-1:0]             out_req,
  output logic [NPORTS-1:0]             out_valid,
  output logic [NPORTS-1:0][DATA_W-1:0] out_data,
  input  logic [NPORTS-1:0]             out_ack,
  input  logic [NPORTS-1:0]             out_nack,
  // routing-table write port (ALG_TABLE)
  input  logic                          tbl_we,
  input  logic [COORD_W-1:0]            tbl_x,
  input  logic [COORD_W-1:0]            tbl_y,
  input  port_e                         tbl_port,
  // statistics
  output logic                          ev_setup,
  output logic                          ev_refuse,
  output logic                          ev_backtrack,
  output logic                          ev_alt
);

  initial begin
    assert (DATA_W >= HEAD_W) else $fatal(1, "DATA_W must hold a head word");
  end

  localparam bit BACKTRACK = (ALGO == ALG_ADAPTIVE_XY_BT);

  logic [NPORTS-1:0]             r_req, r_valid;
  logic [NPORTS-1:0][DATA_W-1:0] r_data;

  logic [NPORTS-1:0]                route_req, fwd_req, release_v, conn_valid;
  logic [NPORTS-1:0]                grant, refuse, sel_ack, sel_nack, bt;
  logic [NPORTS-1:0][COORD_W-1:0]   dest_x, dest_y;
  logic [NPORTS-1:0][NPORTS-1:0]    tried;
  logic [NPORTS-1:0][PORT_W-1:0]    conn_port;
  logic [NPORTS-1:0][PORT_W-1:0]    own_idx;
  logic [NPORTS-1:0]                own_valid, out_free;
  logic [PORT_W-1:0]                sel;
  port_e                            grant_port, rt_port, table_port;
  logic                             rt_ok, rt_alt, grant_alt;

  logic [NPORTS-1:0]             sw_req, sw_valid, dn_ack, dn_nack;
  logic [NPORTS-1:0][DATA_W-1:0] sw_data;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
   if (PORT_EN[p]) begin : g_on
    port_e       cport;
    conn_state_e cstate;

    rs_input_reg #(.DATA_W(DATA_W), .INPUT_REG(INPUT_REG)) u_ireg (
      .clk, .rst_n,
      .in_req(in_req[p]), .in_valid(in_valid[p]), .in_data(in_data[p]),
      .out_req(r_req[p]), .out_valid(r_valid[p]), .out_data(r_data[p])
    );

    rs_port_ctrl #(.BACKTRACK(BACKTRACK)) u_ctrl (
      .clk, .rst_n,
      .in_req      (r_req[p]),
      .in_head     (head_t'(r_data[p][HEAD_W-1:0])),
      .grant       (grant[p]),
      .refuse      (refuse[p]),
      .grant_port  (grant_port),
      .sel_ack     (sel_ack[p]),
      .sel_nack    (sel_nack[p]),
      .route_req   (route_req[p]),
      .dest_x      (dest_x[p]),
      .dest_y      (dest_y[p]),
      .tried       (tried[p]),
      .fwd_req     (fwd_req[p]),
      .release_o   (release_v[p]),
      .up_ack      (in_ack[p]),
      .up_nack     (in_nack[p]),
      .conn_valid  (conn_valid[p]),
      .conn_port   (cport),
      .state       (cstate),
      .ev_backtrack(bt[p])
    );
    assign conn_port[p] = cport;
    assign out_req[p]   = sw_req[p];
    assign out_valid[p] = sw_valid[p];
    assign out_data[p]  = sw_data[p];
    assign dn_ack[p]    = out_ack[p];
    assign dn_nack[p]   = out_nack[p];
   end else begin : g_off
    // Port left out: no register, no control, never routed to.
    assign r_req[p]      = 1'b0;
    assign r_valid[p]    = 1'b0;
    assign r_data[p]     = '0;
    assign route_req[p]  = 1'b0;
    assign dest_x[p]     = '0;
    assign dest_y[p]     = '0;
    assign tried[p]      = '0;
    assign fwd_req[p]    = 1'b0;
    assign release_v[p]  = 1'b0;
    assign in_ack[p]     = 1'b0;
    assign in_nack[p]    = 1'b0;
    assign conn_valid[p] = 1'b0;
    assign conn_port[p]  = P_LOCAL;
    assign bt[p]         = 1'b0;
    assign out_req[p]    = 1'b0;
    assign out_valid[p]  = 1'b0;
    assign out_data[p]   = '0;
    assign dn_ack[p]     = 1'b0;
    assign dn_nack[p]    = 1'b0;
   end
  end

  if (ALGO == ALG_TABLE) begin : g_table
    rs_routing_table #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .MY_X(MY_X), .MY_Y(MY_Y)) u_table (
      .clk, .rst_n,
      .rd_x(dest_x[sel]), .rd_y(dest_y[sel]), .rd_port(table_port),
      .we(tbl_we), .wr_x(tbl_x), .wr_y(tbl_y), .wr_port(tbl_port)
    );
  end else begin : g_no_table
    assign table_port = P_LOCAL;
  end

  rs_router #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .MY_X(MY_X), .MY_Y(MY_Y), .ALGO(ALGO)) u_router (
    .dest_x    (dest_x[sel]),
    .dest_y    (dest_y[sel]),
    .table_port(table_port),
    .out_free  (out_free & PORT_EN),
    .tried     (tried[sel]),
    .port      (rt_port),
    .ok        (rt_ok),
    .alt       (rt_alt)
  );

  rs_arbiter u_arbiter (
    .clk, .rst_n,
    .route_req (route_req),
    .sel       (sel),
    .rt_port   (rt_port),
    .rt_ok     (rt_ok),
    .rt_alt    (rt_alt),
    .release_i (release_v),
    .dn_ack    (dn_ack),
    .dn_nack   (dn_nack),
    .out_free  (out_free),
    .grant     (grant),
    .refuse    (refuse),
    .grant_port(grant_port),
    .grant_alt (grant_alt),
    .own_valid (own_valid),
    .own_idx   (own_idx)
  );

  rs_switch #(.DATA_W(DATA_W)) u_switch (
    .own_valid (own_valid),
    .own_idx   (own_idx),
    .fwd_req   (fwd_req),
    .in_valid  (r_valid),
    .in_data   (r_data),
    .out_req   (sw_req),
    .out_valid (sw_valid),
    .out_data  (sw_data),
    .conn_valid(conn_valid),
    .conn_port (conn_port),
    .dn_ack    (dn_ack),
    .dn_nack   (dn_nack),
    .sel_ack   (sel_ack),
    .sel_nack  (sel_nack)
  );

  assign ev_setup     = |grant;
  assign ev_refuse    = |refuse;
  assign ev_backtrack = |bt;
  assign ev_alt       = (|grant) & grant_alt;

endmodule
