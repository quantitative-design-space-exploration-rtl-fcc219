// rs_input_reg: optional pipeline register on one input port of a
// routing-switch.
//
// It registers the forward lines of a link (req, valid, data) so that the
// path from one switch's crossbar to the next one's crossbar is cut by a
// flip-flop stage. With INPUT_REG = 1 (the configuration used for the area
// and power figures) the lines arrive one clock later; with INPUT_REG = 0 the
// block is a plain wire, which gives the unregistered variant. The backward
// ack/nack lines are not registered: they already come from flip-flops in
// the port control. The reset value of 0 is this design's choice.
module rs_input_reg #(
  parameter int unsigned DATA_W    = 32,
  parameter bit          INPUT_REG = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_req,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_req,
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data
);

  if (INPUT_REG) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_req   <= 1'b0;
        out_valid <= 1'b0;
        out_data  <= '0;
      end else begin
        out_req   <= in_req;
        out_valid <= in_valid;
        out_data  <= in_data;
      end
    end
  end else begin : g_wire
    assign out_req   = in_req;
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end

endmodule
