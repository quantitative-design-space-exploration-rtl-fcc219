// tb_rs_input_reg: checks the input-port register of the routing-switch.
// With INPUT_REG = 1 every forward line must appear exactly one clock later
// and reset to zero; with INPUT_REG = 0 the lines must pass unchanged in the
// same cycle. Random stimulus, compared with the previous cycle's inputs.
module tb_rs_input_reg;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  logic req, valid;
  logic [W-1:0] data;
  logic r_req, r_valid, w_req, w_valid;
  logic [W-1:0] r_data, w_data;
  int checks = 0, failures = 0;

  rs_input_reg #(.DATA_W(W), .INPUT_REG(1'b1)) dut_reg (.clk, .rst_n,
    .in_req(req), .in_valid(valid), .in_data(data),
    .out_req(r_req), .out_valid(r_valid), .out_data(r_data));
  rs_input_reg #(.DATA_W(W), .INPUT_REG(1'b0)) dut_wire (.clk, .rst_n,
    .in_req(req), .in_valid(valid), .in_data(data),
    .out_req(w_req), .out_valid(w_valid), .out_data(w_data));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic p_req, p_valid;
    logic [W-1:0] p_data;
    req = 1; valid = 1; data = '1;
    @(posedge clk); #1;
    checks++;
    if (r_req || r_valid || r_data != 0) begin failures++; $display("reset value wrong"); end
    @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      req = 1'($urandom); valid = 1'($urandom); data = $urandom;
      p_req = req; p_valid = valid; p_data = data;
      #1;
      checks++;
      if (w_req != req || w_valid != valid || w_data != data) begin
        failures++; $display("wire variant differs at %0d", i);
      end
      @(posedge clk); #1;
      checks++;
      if (r_req != p_req || r_valid != p_valid || r_data != p_data) begin
        failures++; $display("register variant differs at %0d", i);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
