// rs_switch: crossbar of a routing-switch.
//
// Each output port o is connected to the input that owns it
// (own_valid[o], own_idx[o], set by the arbiter). The forward lines carry
// data unconditionally while the port is owned, so the head word reaches the
// next switch during set-up; req and the word strobe valid are passed only
// while the owning input's control asserts fwd_req. Outputs nobody owns
// drive zeros. In the backward direction each connected input i sees the
// ack/nack lines of its output conn_port[i]. The crossbar is combinational;
// no buffers are needed because the NoC is circuit switched.
module rs_switch
  import noc_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic [NPORTS-1:0]              own_valid,
  input  logic [NPORTS-1:0][PORT_W-1:0]  own_idx,
  input  logic [NPORTS-1:0]              fwd_req,
  input  logic [NPORTS-1:0]              in_valid,
  input  logic [NPORTS-1:0][DATA_W-1:0]  in_data,
  output logic [NPORTS-1:0]              out_req,
  output logic [NPORTS-1:0]              out_valid,
  output logic [NPORTS-1:0][DATA_W-1:0]  out_data,
  input  logic [NPORTS-1:0]              conn_valid,
  input  logic [NPORTS-1:0][PORT_W-1:0]  conn_port,
  input  logic [NPORTS-1:0]              dn_ack,
  input  logic [NPORTS-1:0]              dn_nack,
  output logic [NPORTS-1:0]              sel_ack,
  output logic [NPORTS-1:0]              sel_nack
);

  always_comb begin
    for (int unsigned o = 0; o < NPORTS; o++) begin
      out_req[o]   = 1'b0;
      out_valid[o] = 1'b0;
      out_data[o]  = '0;
      if (own_valid[o]) begin
        out_req[o]   = fwd_req[own_idx[o]];
        out_valid[o] = fwd_req[own_idx[o]] & in_valid[own_idx[o]];
        out_data[o]  = in_data[own_idx[o]];
      end
    end
    for (int unsigned i = 0; i < NPORTS; i++) begin
      sel_ack[i]  = conn_valid[i] & dn_ack[conn_port[i]];
      sel_nack[i] = conn_valid[i] & dn_nack[conn_port[i]];
    end
  end

endmodule
