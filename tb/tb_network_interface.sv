// tb_network_interface: checks the network interface against a model of
// its routing-switch's local port.
// Sending: the first set-up attempt is refused, so the interface must drop
// its request, pulse tx_retry, wait at least BACKOFF cycles and try again;
// the second attempt is acked and the words read from the functional unit
// must arrive in order with valid, the request must drop after the last one
// and tx_done must follow once ack is low. Receiving: an incoming
// connection must be acked one cycle after its request, its words passed to
// the functional unit with the sender's coordinates, and ack dropped when
// the request drops.
module tb_network_interface;
  import noc_pkg::*;
  localparam int W = 32, LEN = 6, BO = 8;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic tx_valid, tx_rd, tx_done, tx_retry, rx_valid, rx_busy;
  logic [COORD_W-1:0] tx_dest_x, tx_dest_y, rx_src_x, rx_src_y;
  logic [7:0] tx_len;
  logic [W-1:0] tx_data, rx_data;
  logic net_out_req, net_out_valid, net_out_ack, net_out_nack;
  logic [W-1:0] net_out_data, net_in_data;
  logic net_in_req, net_in_valid, net_in_ack, net_in_nack;

  network_interface #(.DATA_W(W), .LEN_W(8), .BACKOFF(BO), .MY_X(1), .MY_Y(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  // Functional unit: word i of the transfer is 0xD0000000 + i.
  int rd_count = 0;
  assign tx_data = 32'hD000_0000 + rd_count;
  always @(posedge clk) if (tx_rd) rd_count <= rd_count + 1;

  // Local-port model: refuses the first request, acks the second.
  int attempts = 0, words = 0, retries = 0, done = 0;
  int drop_t = 0, retry_t = 0, gap = 0;
  always @(posedge clk) begin
    if (tx_retry) retries++;
    if (tx_done) done++;
    if (net_out_req && !net_out_ack && !net_out_nack) begin
      attempts++;
      if (attempts > 1) gap = ($time - drop_t) / 10;
      checks++;
      if (net_out_data[15:0] != 16'h2133 || net_out_valid) begin   // src (1,2), dest (3,3)
        failures++; $display("FAIL: head word %h", net_out_data);
      end
      if (attempts == 1) net_out_nack <= 1'b1;
      else               net_out_ack  <= 1'b1;
    end
    if (!net_out_req) begin
      if (net_out_nack) drop_t = $time;
      net_out_ack <= 1'b0; net_out_nack <= 1'b0;
    end
    if (net_out_ack && net_out_valid) begin
      checks++;
      if (net_out_data != 32'hD000_0000 + words) begin
        failures++; $display("FAIL: word %0d = %h", words, net_out_data);
      end
      words++;
    end
  end

  initial begin
    tx_valid = 0; tx_dest_x = 3; tx_dest_y = 3; tx_len = LEN;
    net_out_ack = 0; net_out_nack = 0;
    net_in_req = 0; net_in_valid = 0; net_in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    tx_valid = 1;
    while (!tx_done) @(negedge clk);
    tx_valid = 0;
    chk(attempts == 2 && retries == 1, "one refusal, one retry");
    chk(gap >= BO, $sformatf("retry waited %0d cycles, at least BACKOFF", gap));
    chk(words == LEN && rd_count == LEN, "all words sent");
    chk(!net_out_req && !net_out_ack, "request dropped and ack low before tx_done");
    @(negedge clk);
    chk(done == 1, "one tx_done pulse");

    // Receiving side: sender (0,3), three words.
    net_in_req = 1; net_in_data = 32'h0000_3012;
    @(negedge clk);
    chk(net_in_ack && !net_in_nack && rx_busy, "incoming connection acked after one cycle");
    chk(rx_src_x == 0 && rx_src_y == 3, "sender recorded");
    for (int i = 0; i < 3; i++) begin
      net_in_valid = 1; net_in_data = 32'hBEEF_0000 + i;
      #1;
      chk(rx_valid && rx_data == 32'hBEEF_0000 + i, "word delivered");
      @(negedge clk);
    end
    net_in_valid = 0;
    #1 chk(!rx_valid, "no word without valid");
    net_in_req = 0;
    @(negedge clk);
    chk(!net_in_ack && !rx_busy, "ack dropped with the request");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
