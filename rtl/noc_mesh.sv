// noc_mesh: circuit-switched Network-on-Chip with a MESH_X x MESH_Y mesh
// topology (4 x 4, sixteen functional units, by default).
//
// Each node (x, y), numbered n = y * MESH_X + x, has a 5-port routing-switch
// and a network interface on the switch's local port. Neighbouring switches
// are joined by links: the east output of (x, y) drives the west input of
// (x+1, y) and the south output of (x, y) drives the north input of
// (x, y+1), with the ack/nack lines running back the other way. Links are
// plain wires. Ports on the mesh edge are tied off and never chosen by the
// router.
//
// A functional unit at node n sends a transfer by raising tx_valid[n] with a
// destination and a length (see network_interface); words arriving for it
// appear on rx_valid[n]/rx_data[n]. A connection is built switch by switch,
// then carries one word per cycle until the sender closes it. Refused
// set-ups are retried by the sending interface (tx_retry pulses). The ev_*
// outputs pulse per switch for set-up grants, refusals, backtracking
// retries and adaptive detours. The routing tables (ALGO = ALG_TABLE) keep
// their reset contents here. The mesh arrangement follows the paper; the
// port-level wiring is this design's own.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned  DATA_W    = 32,
  parameter int unsigned  MESH_X    = 4,
  parameter int unsigned  MESH_Y    = 4,
  parameter bit           INPUT_REG = 1'b1,
  parameter routing_alg_e ALGO      = ALG_ADAPTIVE_XY_BT,
  parameter int unsigned  LEN_W     = 8,
  localparam int unsigned NN        = MESH_X * MESH_Y
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NN-1:0]                 tx_valid,
  input  logic [NN-1:0][COORD_W-1:0]    tx_dest_x,
  input  logic [NN-1:0][COORD_W-1:0]    tx_dest_y,
  input  logic [NN-1:0][LEN_W-1:0]      tx_len,
  output logic [NN-1:0]                 tx_rd,
  input  logic [NN-1:0][DATA_W-1:0]     tx_data,
  output logic [NN-1:0]                 tx_done,
  output logic [NN-1:0]                 tx_retry,
  output logic [NN-1:0]                 rx_valid,
  output logic [NN-1:0][DATA_W-1:0]     rx_data,
  output logic [NN-1:0][COORD_W-1:0]    rx_src_x,
  output logic [NN-1:0][COORD_W-1:0]    rx_src_y,
  output logic [NN-1:0]                 rx_busy,
  output logic [NN-1:0]                 ev_setup,
  output logic [NN-1:0]                 ev_refuse,
  output logic [NN-1:0]                 ev_backtrack,
  output logic [NN-1:0]                 ev_alt
);

  // Per node and port: lines into the switch (i_*) and out of it (o_*).
  logic [NN-1:0][NPORTS-1:0]             i_req, i_valid, i_ack, i_nack;
  logic [NN-1:0][NPORTS-1:0][DATA_W-1:0] i_data;
  logic [NN-1:0][NPORTS-1:0]             o_req, o_valid, o_ack, o_nack;
  logic [NN-1:0][NPORTS-1:0][DATA_W-1:0] o_data;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;

      // West input <- east output of (x-1, y); east input <- west output of (x+1, y).
      if (x > 0) begin : g_w
        assign i_req  [N][P_WEST] = o_req  [N-1][P_EAST];
        assign i_valid[N][P_WEST] = o_valid[N-1][P_EAST];
        assign i_data [N][P_WEST] = o_data [N-1][P_EAST];
        assign o_ack  [N][P_WEST] = i_ack  [N-1][P_EAST];
        assign o_nack [N][P_WEST] = i_nack [N-1][P_EAST];
      end else begin : g_w_edge
        assign i_req  [N][P_WEST] = 1'b0;
        assign i_valid[N][P_WEST] = 1'b0;
        assign i_data [N][P_WEST] = '0;
        assign o_ack  [N][P_WEST] = 1'b0;
        assign o_nack [N][P_WEST] = 1'b0;
      end
      if (x + 1 < MESH_X) begin : g_e
        assign i_req  [N][P_EAST] = o_req  [N+1][P_WEST];
        assign i_valid[N][P_EAST] = o_valid[N+1][P_WEST];
        assign i_data [N][P_EAST] = o_data [N+1][P_WEST];
        assign o_ack  [N][P_EAST] = i_ack  [N+1][P_WEST];
        assign o_nack [N][P_EAST] = i_nack [N+1][P_WEST];
      end else begin : g_e_edge
        assign i_req  [N][P_EAST] = 1'b0;
        assign i_valid[N][P_EAST] = 1'b0;
        assign i_data [N][P_EAST] = '0;
        assign o_ack  [N][P_EAST] = 1'b0;
        assign o_nack [N][P_EAST] = 1'b0;
      end
      if (y > 0) begin : g_n
        assign i_req  [N][P_NORTH] = o_req  [N-MESH_X][P_SOUTH];
        assign i_valid[N][P_NORTH] = o_valid[N-MESH_X][P_SOUTH];
        assign i_data [N][P_NORTH] = o_data [N-MESH_X][P_SOUTH];
        assign o_ack  [N][P_NORTH] = i_ack  [N-MESH_X][P_SOUTH];
        assign o_nack [N][P_NORTH] = i_nack [N-MESH_X][P_SOUTH];
      end else begin : g_n_edge
        assign i_req  [N][P_NORTH] = 1'b0;
        assign i_valid[N][P_NORTH] = 1'b0;
        assign i_data [N][P_NORTH] = '0;
        assign o_ack  [N][P_NORTH] = 1'b0;
        assign o_nack [N][P_NORTH] = 1'b0;
      end
      if (y + 1 < MESH_Y) begin : g_s
        assign i_req  [N][P_SOUTH] = o_req  [N+MESH_X][P_NORTH];
        assign i_valid[N][P_SOUTH] = o_valid[N+MESH_X][P_NORTH];
        assign i_data [N][P_SOUTH] = o_data [N+MESH_X][P_NORTH];
        assign o_ack  [N][P_SOUTH] = i_ack  [N+MESH_X][P_NORTH];
        assign o_nack [N][P_SOUTH] = i_nack [N+MESH_X][P_NORTH];
      end else begin : g_s_edge
        assign i_req  [N][P_SOUTH] = 1'b0;
        assign i_valid[N][P_SOUTH] = 1'b0;
        assign i_data [N][P_SOUTH] = '0;
        assign o_ack  [N][P_SOUTH] = 1'b0;
        assign o_nack [N][P_SOUTH] = 1'b0;
      end

      routing_switch #(
        .DATA_W(DATA_W), .INPUT_REG(INPUT_REG), .ALGO(ALGO),
        .MESH_X(MESH_X), .MESH_Y(MESH_Y), .MY_X(x), .MY_Y(y)
      ) u_rs (
        .clk, .rst_n,
        .in_req   (i_req[N]),   .in_valid (i_valid[N]), .in_data (i_data[N]),
        .in_ack   (i_ack[N]),   .in_nack  (i_nack[N]),
        .out_req  (o_req[N]),   .out_valid(o_valid[N]), .out_data(o_data[N]),
        .out_ack  (o_ack[N]),   .out_nack (o_nack[N]),
        .tbl_we   (1'b0),       .tbl_x    ('0),         .tbl_y   ('0),
        .tbl_port (P_LOCAL),
        .ev_setup (ev_setup[N]), .ev_refuse(ev_refuse[N]),
        .ev_backtrack(ev_backtrack[N]), .ev_alt(ev_alt[N])
      );

      network_interface #(
        .DATA_W(DATA_W), .LEN_W(LEN_W), .MY_X(x), .MY_Y(y)
      ) u_ni (
        .clk, .rst_n,
        .tx_valid (tx_valid[N]), .tx_dest_x(tx_dest_x[N]), .tx_dest_y(tx_dest_y[N]),
        .tx_len   (tx_len[N]),   .tx_rd    (tx_rd[N]),     .tx_data  (tx_data[N]),
        .tx_done  (tx_done[N]),  .tx_retry (tx_retry[N]),
        .rx_valid (rx_valid[N]), .rx_data  (rx_data[N]),
        .rx_src_x (rx_src_x[N]), .rx_src_y (rx_src_y[N]),  .rx_busy  (rx_busy[N]),
        .net_out_req  (i_req[N][P_LOCAL]),  .net_out_valid(i_valid[N][P_LOCAL]),
        .net_out_data (i_data[N][P_LOCAL]), .net_out_ack  (i_ack[N][P_LOCAL]),
        .net_out_nack (i_nack[N][P_LOCAL]),
        .net_in_req   (o_req[N][P_LOCAL]),  .net_in_valid (o_valid[N][P_LOCAL]),
        .net_in_data  (o_data[N][P_LOCAL]), .net_in_ack   (o_ack[N][P_LOCAL]),
        .net_in_nack  (o_nack[N][P_LOCAL])
      );
    end
  end

endmodule
