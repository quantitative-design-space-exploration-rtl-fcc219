// tb_noc_mesh: end-to-end test of the 4 x 4 mesh NoC at its default
// parameters (32-bit words, input registers, adaptive XY routing with
// backtracking).
// Every functional unit sends NT transfers of 1..MAXLEN words to random
// destinations (its own node included), all starting at once so that
// connections compete for links. Word i of transfer t from node s is
// {s, t, i}. Each receiver checks that every word carries the sender named
// by the head word and that the words of a connection arrive in order
// without gaps; at the end every transfer must be complete, word counts must
// match, and the network must be idle. The mechanisms of the design are
// counted and each must have happened: connection set-up, arbiter refusal,
// interface retry, adaptive detour, backtracking, delivery to the own node,
// and two connections crossing one switch at the same time.
module tb_noc_mesh;
  import noc_pkg::*;
  localparam int MX = 4, MY = 4, NN = MX * MY, W = 32;
  localparam int NT = 12, MAXLEN = 24;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic [NN-1:0] tx_valid, tx_rd, tx_done, tx_retry, rx_valid, rx_busy;
  logic [NN-1:0][COORD_W-1:0] tx_dest_x, tx_dest_y, rx_src_x, rx_src_y;
  logic [NN-1:0][7:0] tx_len;
  logic [NN-1:0][W-1:0] tx_data, rx_data;
  logic [NN-1:0] ev_setup, ev_refuse, ev_backtrack, ev_alt;

  noc_mesh dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Transfer plan.
  int dest [NN][NT];
  int len  [NN][NT];
  int cur  [NN];      // transfer index in progress
  int widx [NN];      // words read of the current transfer
  int sent_words = 0, recv_words = 0;
  int recv_cnt [NN][NT];
  int n_setup = 0, n_refuse = 0, n_bt = 0, n_alt = 0, n_retry = 0, n_self = 0, n_multi = 0;

  // A switch carrying two or more connections at once.
  logic [NN-1:0] multi;
  for (genvar y = 0; y < MY; y++)
    for (genvar x = 0; x < MX; x++)
      assign multi[y*MX+x] = $countones(dut.g_y[y].g_x[x].u_rs.u_arbiter.own_valid) >= 2;

  always_comb
    for (int n = 0; n < NN; n++) begin
      int t;
      t = (cur[n] < NT) ? cur[n] : 0;
      tx_valid[n]  = (rst_n && cur[n] < NT);
      tx_dest_x[n] = COORD_W'(dest[n][t] % MX);
      tx_dest_y[n] = COORD_W'(dest[n][t] / MX);
      tx_len[n]    = 8'(len[n][t]);
      tx_data[n]   = {8'(n), 8'(t), 16'(widx[n])};
    end

  // Everything is sampled in the middle of the cycle. A word read in one
  // cycle (tx_rd) is taken at the next rising edge, so the functional unit
  // moves on to the following word half a cycle after that edge.
  logic [NN-1:0] rd_pend = '0;

  always @(negedge clk) begin
    for (int n = 0; n < NN; n++) begin
      if (rd_pend[n]) widx[n] = widx[n] + 1;
      rd_pend[n] = tx_rd[n];
      if (tx_rd[n]) sent_words++;
      if (tx_done[n]) begin
        if (dest[n][cur[n]] == n) n_self++;
        cur[n] = cur[n] + 1; widx[n] = 0;
      end
      if (tx_retry[n]) n_retry++;
      if (ev_setup[n]) n_setup++;
      if (ev_refuse[n]) n_refuse++;
      if (ev_backtrack[n]) n_bt++;
      if (ev_alt[n]) n_alt++;
      if (rx_valid[n]) begin
        int s, t, i;
        s = int'(rx_data[n][31:24]); t = int'(rx_data[n][23:16]); i = int'(rx_data[n][15:0]);
        recv_words++;
        checks++;
        if (s != int'(rx_src_y[n]) * MX + int'(rx_src_x[n]) || s >= NN || t >= NT
            || dest[s][t] != n || i != recv_cnt[s][t]) begin
          failures++;
          $display("FAIL: node %0d got word %h (src reg %0d,%0d)", n, rx_data[n], rx_src_x[n], rx_src_y[n]);
        end else begin
          recv_cnt[s][t]++;
        end
      end
    end
    if (multi != 0) n_multi++;
  end

  task automatic count(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL: %s never happened", what); end
  endtask

  initial begin
    int t0;
    for (int n = 0; n < NN; n++) begin
      cur[n] = 0; widx[n] = 0;
      for (int t = 0; t < NT; t++) begin
        dest[n][t] = (t == 0) ? n : $urandom_range(NN - 1);
        len[n][t]  = $urandom_range(MAXLEN, 1);
        recv_cnt[n][t] = 0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    t0 = $time;
    begin
      bit all_done;
      do begin
        @(posedge clk);
        all_done = 1;
        for (int n = 0; n < NN; n++) if (cur[n] < NT) all_done = 0;
      end while (!all_done);
    end
    repeat (10) @(posedge clk);
    $display("all %0d transfers done after %0d cycles", NN * NT, ($time - t0) / 10);
    for (int n = 0; n < NN; n++)
      for (int t = 0; t < NT; t++) begin
        checks++;
        if (recv_cnt[n][t] != len[n][t]) begin
          failures++; $display("FAIL: transfer %0d.%0d received %0d of %0d words", n, t, recv_cnt[n][t], len[n][t]);
        end
      end
    checks++;
    if (sent_words != recv_words) begin failures++; $display("FAIL: sent %0d received %0d", sent_words, recv_words); end
    checks++;
    if (rx_busy != 0 || tx_valid != 0) begin failures++; $display("FAIL: network not idle"); end
    count("connection set-ups", n_setup);
    count("arbiter refusals", n_refuse);
    count("interface retries", n_retry);
    count("adaptive detours", n_alt);
    count("backtracking retries", n_bt);
    count("deliveries to own node", n_self);
    count("cycles with 2+ crossings", n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
