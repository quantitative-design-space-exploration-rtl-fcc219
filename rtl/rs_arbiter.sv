// rs_arbiter: centralized arbiter of a routing-switch.
//
// One arbiter and one router serve all input ports (the centralized
// architecture). Input ports that are determining a connection target raise
// route_req. The arbiter works in a three-cycle sequence that makes up the
// "determine connection target" state:
//   PICK   choose one requesting input, round robin, and register it in sel;
//   ROUTE  the router evaluates the selected input's destination; its
//          result is registered;
//   GRANT  if the router found a port and that port is still free, the port
//          is given to the input (grant pulse, grant_port) and recorded in the
//          ownership table; otherwise the input is refused (refuse pulse).
// The ownership table (own_valid, own_idx) configures the crossbar. An output
// is free when nobody owns it and both backward lines from the next switch
// (dn_ack, dn_nack) are low, i.e. the port behind it has returned to idle.
// An input gives its port back with release. The round-robin policy and the
// exact split of the three cycles are this design's choice.
module rs_arbiter
  import noc_pkg::*;
(
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [NPORTS-1:0]              route_req,
  output logic [PORT_W-1:0]              sel,
  input  port_e                          rt_port,
  input  logic                           rt_ok,
  input  logic                           rt_alt,
  input  logic [NPORTS-1:0]              release_i,
  input  logic [NPORTS-1:0]              dn_ack,
  input  logic [NPORTS-1:0]              dn_nack,
  output logic [NPORTS-1:0]              out_free,
  output logic [NPORTS-1:0]              grant,
  output logic [NPORTS-1:0]              refuse,
  output port_e                          grant_port,
  output logic                           grant_alt,
  output logic [NPORTS-1:0]              own_valid,
  output logic [NPORTS-1:0][PORT_W-1:0]  own_idx
);

  typedef enum logic [1:0] {PH_PICK, PH_ROUTE, PH_GRANT} phase_e;

  phase_e            phase;
  logic [PORT_W-1:0] rr_ptr;
  port_e             rt_port_q;
  logic              rt_ok_q, rt_alt_q;
  logic              pick_found;
  logic [PORT_W-1:0] pick_idx;
  logic              do_grant;

  assign out_free = ~own_valid & ~dn_ack & ~dn_nack;

  // Round-robin choice starting at rr_ptr.
  always_comb begin
    pick_found = 1'b0;
    pick_idx   = '0;
    for (int unsigned k = 0; k < NPORTS; k++) begin
      int unsigned i;
      i = (int'(rr_ptr) + k) % NPORTS;
      if (!pick_found && route_req[i]) begin
        pick_found = 1'b1;
        pick_idx   = PORT_W'(i);
      end
    end
  end

  assign do_grant   = (phase == PH_GRANT) && rt_ok_q && out_free[rt_port_q];
  assign grant_port = rt_port_q;
  assign grant_alt  = rt_alt_q;

  always_comb begin
    grant  = '0;
    refuse = '0;
    if (phase == PH_GRANT) begin
      if (do_grant) grant[sel]  = 1'b1;
      else          refuse[sel] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH_PICK;
      rr_ptr    <= '0;
      sel       <= '0;
      rt_port_q <= P_LOCAL;
      rt_ok_q   <= 1'b0;
      rt_alt_q  <= 1'b0;
    end else begin
      unique case (phase)
        PH_PICK: if (pick_found) begin
          sel    <= pick_idx;
          rr_ptr <= (int'(pick_idx) == NPORTS - 1) ? '0 : pick_idx + 1'b1;
          phase  <= PH_ROUTE;
        end
        PH_ROUTE: begin
          rt_port_q <= rt_port;
          rt_ok_q   <= rt_ok;
          rt_alt_q  <= rt_alt;
          phase     <= PH_GRANT;
        end
        PH_GRANT: phase <= PH_PICK;
        default:  phase <= PH_PICK;
      endcase
    end
  end

  // Ownership table.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_valid <= '0;
      own_idx   <= '0;
    end else begin
      for (int unsigned o = 0; o < NPORTS; o++)
        if (own_valid[o] && release_i[own_idx[o]]) own_valid[o] <= 1'b0;
      if (do_grant) begin
        own_valid[rt_port_q] <= 1'b1;
        own_idx[rt_port_q]   <= sel;
      end
    end
  end

  // A port is only granted when free, and an input owns at most one port.
  a_grant_free: assert property (@(posedge clk) disable iff (!rst_n)
    do_grant |-> !own_valid[rt_port_q]);
  logic sel_owns;
  always_comb begin
    sel_owns = 1'b0;
    for (int unsigned o = 0; o < NPORTS; o++)
      if (own_valid[o] && own_idx[o] == sel) sel_owns = 1'b1;
  end
  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n)
    do_grant |-> !sel_owns);

endmodule
