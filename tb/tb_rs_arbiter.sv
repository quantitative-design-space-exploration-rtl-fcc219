// tb_rs_arbiter: checks the centralized arbiter. A small model of the
// router answers for whichever input is selected, from a table set by the
// test. Checked: a lone request is granted in the third cycle; the
// ownership table records the grant; a second request for an owned port is
// refused; a router refusal is passed on; release frees a port only once the
// downstream ack/nack lines are low; five simultaneous requests are served
// one by one, three cycles apart, in round-robin order.
module tb_rs_arbiter;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NPORTS-1:0] route_req, release_i, dn_ack, dn_nack, out_free, grant, refuse, own_valid;
  logic [NPORTS-1:0][PORT_W-1:0] own_idx;
  logic [PORT_W-1:0] sel;
  port_e rt_port, grant_port;
  logic rt_ok, rt_alt, grant_alt;
  port_e want [NPORTS];
  logic  want_ok [NPORTS];
  int checks = 0, failures = 0;

  rs_arbiter dut (.*);

  always #5 clk = ~clk;
  always_comb begin
    rt_port = want[sel];
    rt_ok   = want_ok[sel];
    rt_alt  = sel[0];
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  // Raise route_req[i] and wait for the answer; returns cycles taken and result.
  task automatic request(int i, output int cycles, output bit granted);
    @(negedge clk);
    route_req[i] = 1;
    cycles = 1;
    forever begin
      #1;
      if (grant[i] || refuse[i]) break;
      @(negedge clk);
      cycles++;
    end
    granted = grant[i];
    @(negedge clk);
    route_req[i] = 0;
  endtask

  initial begin
    int c;
    bit g;
    int order [$];
    route_req = 0; release_i = 0; dn_ack = 0; dn_nack = 0;
    for (int i = 0; i < NPORTS; i++) begin want[i] = P_LOCAL; want_ok[i] = 1; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(out_free == '1 && own_valid == '0, "all ports free after reset");

    want[2] = P_EAST;
    request(2, c, g);
    chk(g && c == 3, $sformatf("lone request granted in 3 cycles (took %0d)", c));
    chk(own_valid[P_EAST] && own_idx[P_EAST] == 3'd2 && !out_free[P_EAST], "ownership recorded");

    want[3] = P_EAST;
    request(3, c, g);
    chk(!g, "request for an owned port refused");

    want[4] = P_NORTH; want_ok[4] = 0;
    request(4, c, g);
    chk(!g, "router refusal passed on");
    if (g) begin   // give a wrongly granted port back so the test can go on
      @(negedge clk); release_i[4] = 1; @(negedge clk); release_i[4] = 0;
    end
    want_ok[4] = 1;

    dn_ack[P_EAST] = 1;
    release_i[2] = 1;
    @(negedge clk);
    release_i[2] = 0;
    chk(!own_valid[P_EAST], "release clears ownership");
    chk(!out_free[P_EAST], "port stays busy while downstream ack is high");
    dn_ack[P_EAST] = 0;
    #1 chk(out_free[P_EAST], "port free once downstream is idle");

    // Five simultaneous requests, each for a different port.
    for (int i = 0; i < NPORTS; i++) want[i] = port_e'((i + 1) % NPORTS);
    begin
      int last_t, gaps_ok;
      last_t = -1; gaps_ok = 1;
      @(negedge clk);
      route_req = '1;
      while (route_req != 0) begin
        #1;
        for (int i = 0; i < NPORTS; i++)
          if (grant[i]) begin
            order.push_back(i);
            if (last_t >= 0 && ($time - last_t) != 30) gaps_ok = 0;
            last_t = $time;
          end
        @(negedge clk);
        if (order.size() > 0) route_req[order[$]] = 0;
      end
      chk(gaps_ok == 1, "grants are three cycles apart");
    end
    chk(order.size() == NPORTS, "all five requests granted");
    for (int k = 1; k < order.size(); k++)
      chk(order[k] == (order[k-1] + 1) % NPORTS, "round-robin order");
    chk(own_valid == '1, "five ports owned");
    release_i = '1;
    @(negedge clk);
    release_i = '0;
    chk(own_valid == '0 && out_free == '1, "all released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
