// rs_port_ctrl: connection control of one input port of a routing-switch.
//
// A state machine per input port runs the circuit-switched connection life
// cycle named in the paper:
//   CS_IDLE       nothing to do. A rising req from the link starts a
//                 connection; the head word on the data lines gives the
//                 destination, which is stored.
//   CS_DETERMINE  "determine connection target": route_req asks the shared
//                 arbiter and router for an output port. Uncontended this
//                 takes three cycles; it ends with grant or refuse.
//   CS_WAIT       "wait for connection to establish": req and the head word
//                 are forwarded on the granted output until the next switch
//                 (or the destination interface) answers with ack or nack.
//   CS_ACTIVE     "active connection": ack is returned upstream and data
//                 words flow through the crossbar.
//   CS_DESTROY1/2 "destroy connection", two cycles after req drops: the
//                 forward req is dropped, then the output port returned.
//   CS_REFUSED    nack is held upstream until the upstream req drops.
// With BACKTRACK = 1 a nack from downstream does not end the attempt: the
// output that refused is marked in 'tried', given back, and the port goes
// back to CS_DETERMINE so another feasible port is tried; only when the
// router finds none is nack sent upstream, where the previous switch retries
// in the same way. Without backtracking a nack is passed straight upstream.
// ack and nack are held until the port is idle again (a four-phase
// handshake), which lets the upstream switch know when the link is reusable.
// The handshake and the exact cycle split are this design's choices.
module rs_port_ctrl
  import noc_pkg::*;
#(
  parameter bit BACKTRACK = 1'b1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_req,
  input  head_t              in_head,
  input  logic               grant,
  input  logic               refuse,
  input  port_e              grant_port,
  input  logic               sel_ack,
  input  logic               sel_nack,
  output logic               route_req,
  output logic [COORD_W-1:0] dest_x,
  output logic [COORD_W-1:0] dest_y,
  output logic [NPORTS-1:0]  tried,
  output logic               fwd_req,
  output logic               release_o,
  output logic               up_ack,
  output logic               up_nack,
  output logic               conn_valid,
  output port_e              conn_port,
  output conn_state_e        state,
  output logic               ev_backtrack
);

  always_comb begin
    route_req    = (state == CS_DETERMINE);
    fwd_req      = (state == CS_WAIT) || (state == CS_ACTIVE);
    up_ack       = (state == CS_ACTIVE) || (state == CS_DESTROY1) || (state == CS_DESTROY2);
    up_nack      = (state == CS_REFUSED);
    release_o    = 1'b0;
    ev_backtrack = 1'b0;
    if (state == CS_DESTROY2) release_o = 1'b1;
    if (state == CS_WAIT && in_req && !sel_ack && sel_nack) begin
      release_o    = 1'b1;
      ev_backtrack = BACKTRACK;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= CS_IDLE;
      dest_x     <= '0;
      dest_y     <= '0;
      tried      <= '0;
      conn_valid <= 1'b0;
      conn_port  <= P_LOCAL;
    end else begin
      unique case (state)
        CS_IDLE: if (in_req) begin
          dest_x <= in_head.dest_x;
          dest_y <= in_head.dest_y;
          tried  <= '0;
          state  <= CS_DETERMINE;
        end
        CS_DETERMINE: begin
          if (grant) begin
            conn_valid <= 1'b1;
            conn_port  <= grant_port;
            state      <= CS_WAIT;
          end else if (refuse) begin
            state <= CS_REFUSED;
          end
        end
        CS_WAIT: begin
          if (!in_req) begin
            state <= CS_DESTROY1;
          end else if (sel_ack) begin
            state <= CS_ACTIVE;
          end else if (sel_nack) begin
            conn_valid <= 1'b0;
            if (BACKTRACK) begin
              tried[conn_port] <= 1'b1;
              state            <= CS_DETERMINE;
            end else begin
              state <= CS_REFUSED;
            end
          end
        end
        CS_ACTIVE:   if (!in_req) state <= CS_DESTROY1;
        CS_DESTROY1: state <= CS_DESTROY2;
        CS_DESTROY2: begin
          conn_valid <= 1'b0;
          state      <= CS_IDLE;
        end
        CS_REFUSED:  if (!in_req) state <= CS_IDLE;
        default:     state <= CS_IDLE;
      endcase
    end
  end

  // grant and refuse only reach a port that is determining a target.
  a_grant_state: assert property (@(posedge clk) disable iff (!rst_n)
    (grant || refuse) |-> (state == CS_DETERMINE));

endmodule
