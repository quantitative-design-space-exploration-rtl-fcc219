// tb_rs_switch: checks the crossbar. Random ownership tables (each output
// owned by at most one input), random request, strobe and data lines, and
// random downstream ack/nack are applied; the expected forward and backward
// values are computed here from the connection table.
module tb_rs_switch;
  import noc_pkg::*;
  localparam int W = 32;
  logic [NPORTS-1:0] own_valid, fwd_req, in_valid, out_req, out_valid, conn_valid, dn_ack, dn_nack, sel_ack, sel_nack;
  logic [NPORTS-1:0][PORT_W-1:0] own_idx, conn_port;
  logic [NPORTS-1:0][W-1:0] in_data, out_data;
  int checks = 0, failures = 0;

  rs_switch #(.DATA_W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      int perm [NPORTS];
      for (int i = 0; i < NPORTS; i++) perm[i] = i;
      perm.shuffle();
      own_valid = '0; conn_valid = '0; own_idx = '0; conn_port = '0;
      for (int i = 0; i < NPORTS; i++) begin
        // input i connected to output perm[i] with probability 1/2
        if ($urandom_range(1)) begin
          own_valid[perm[i]] = 1; own_idx[perm[i]] = PORT_W'(i);
          conn_valid[i] = 1; conn_port[i] = PORT_W'(perm[i]);
        end
        in_data[i] = $urandom;
      end
      fwd_req = NPORTS'($urandom); in_valid = NPORTS'($urandom);
      dn_ack = NPORTS'($urandom); dn_nack = NPORTS'($urandom);
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        logic e_req, e_val;
        logic [W-1:0] e_dat;
        e_req = 0; e_val = 0; e_dat = '0;
        for (int i = 0; i < NPORTS; i++)
          if (conn_valid[i] && perm[i] == o) begin
            e_req = fwd_req[i]; e_val = fwd_req[i] & in_valid[i]; e_dat = in_data[i];
          end
        checks++;
        if (out_req[o] != e_req || out_valid[o] != e_val || out_data[o] != e_dat) begin
          failures++; $display("output %0d wrong", o);
        end
      end
      for (int i = 0; i < NPORTS; i++) begin
        checks++;
        if (sel_ack[i] != (conn_valid[i] & dn_ack[perm[i]]) || sel_nack[i] != (conn_valid[i] & dn_nack[perm[i]])) begin
          failures++; $display("backward %0d wrong", i);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
