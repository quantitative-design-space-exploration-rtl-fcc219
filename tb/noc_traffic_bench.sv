// noc_traffic_bench: random-traffic load generator and meter for one
// 4 x 4 noc_mesh built with routing algorithm ALGO.
// For each requested utilization in LOADS it resets the mesh and runs CYCLES
// clock cycles. Every node creates messages of MSG_LEN words at random
// times, with probability LOAD / (100 * MSG_LEN) per cycle, so that on its own it
// would keep its injection link busy LOAD percent of the time; the
// destination is uniformly random among the other nodes. Messages queue in
// the node until its interface is free. Achieved utilization is the number
// of words delivered divided by 16 * CYCLES; latency runs from a message's
// creation to its last word arriving. Every delivered word is checked for
// the right sender and order; errors are counted in 'errors'.
module noc_traffic_bench
  import noc_pkg::*;
#(
  parameter routing_alg_e ALGO    = ALG_ADAPTIVE_XY_BT,
  parameter int           DATA_W  = 32,
  parameter bit           INPUT_REG = 1'b1,
  parameter int           CYCLES  = 4000,
  parameter int           MSG_LEN = 64,
  parameter int           NLOADS  = 4,
  parameter int           LOADS [NLOADS] = '{10, 30, 50, 80}
) (
  input  logic clk,
  output logic done,
  output real  achieved [NLOADS],
  output real  latency  [NLOADS],
  output real  gbps     [NLOADS],
  output int   errors,
  output int   retries,
  output int   detours,
  output int   backtracks
);
  localparam int MX = 4, MY = 4, NN = MX * MY, W = DATA_W;
  logic rst_n;
  logic [NN-1:0] tx_valid, tx_rd, tx_done, tx_retry, rx_valid, rx_busy;
  logic [NN-1:0][COORD_W-1:0] tx_dest_x, tx_dest_y, rx_src_x, rx_src_y;
  logic [NN-1:0][7:0] tx_len;
  logic [NN-1:0][W-1:0] tx_data, rx_data;
  logic [NN-1:0] ev_setup, ev_refuse, ev_backtrack, ev_alt;

  noc_mesh #(.ALGO(ALGO), .DATA_W(W), .INPUT_REG(INPUT_REG)) dut (.*);

  // Word i of a message from node n: the low 16 bits hold {n, i}, the rest
  // repeats i so that every bit of a wide word is exercised.
  function automatic logic [W-1:0] word(int n, int i);
    logic [W-1:0] w;
    w = '0;
    for (int b = 16; b < W; b += 16) w[b +: 16] = 16'(i);
    w[15:0] = {4'(n), 12'(i)};
    return w;
  endfunction

  typedef struct { int dest; int born; } msg_t;
  msg_t q [NN][$];
  int   widx [NN];           // next word of the head message, popped at the clock edge
  int   rx_cnt [NN];       // words of the open incoming connection
  int   cyc, load, words, lat_sum, lat_n;
  bit   running;
  int   born_of [NN][NN];  // creation time of the message s -> d in flight

  always_comb
    for (int n = 0; n < NN; n++) begin
      tx_valid[n]  = running && q[n].size() > 0;
      tx_dest_x[n] = q[n].size() > 0 ? COORD_W'(q[n][0].dest % MX) : '0;
      tx_dest_y[n] = q[n].size() > 0 ? COORD_W'(q[n][0].dest / MX) : '0;
      tx_len[n]    = 8'(MSG_LEN);
      tx_data[n]   = word(n, widx[n]);
    end

  // The word counter behaves like a FIFO read pointer: it moves at the clock
  // edge that consumes a word, so a sink without input registers on the path
  // never sees a word twice.
  always @(posedge clk)
    for (int n = 0; n < NN; n++)
      if (!rst_n || tx_done[n]) widx[n] <= 0;
      else if (tx_rd[n])        widx[n] <= widx[n] + 1;

  always @(negedge clk) if (running) begin
    cyc++;
    for (int n = 0; n < NN; n++) begin
      if (tx_done[n]) void'(q[n].pop_front());
      if ($urandom_range(MSG_LEN * 100 - 1) < load) begin
        msg_t m;
        m.dest = $urandom_range(NN - 2);
        if (m.dest >= n) m.dest++;
        m.born = cyc;
        q[n].push_back(m);
      end
      if (q[n].size() > 0 && widx[n] == 0) born_of[n][q[n][0].dest] = q[n][0].born;
      if (tx_retry[n]) retries++;
      if (ev_alt[n]) detours++;
      if (ev_backtrack[n]) backtracks++;
      if (!rx_busy[n]) rx_cnt[n] = 0;
      if (rx_valid[n]) begin
        int s;
        s = int'(rx_src_y[n]) * MX + int'(rx_src_x[n]);
        if (rx_data[n] != word(s, rx_cnt[n])) errors++;
        rx_cnt[n]++;
        words++;
        if (rx_cnt[n] == MSG_LEN) begin
          lat_sum += cyc - born_of[s][n];
          lat_n++;
        end
      end
    end
  end

  initial begin
    done = 0; errors = 0; retries = 0; detours = 0; backtracks = 0;
    running = 0; rst_n = 0; cyc = 0;
    for (int l = 0; l < NLOADS; l++) begin
      running = 0;
      rst_n = 0;
      for (int n = 0; n < NN; n++) begin q[n].delete(); rx_cnt[n] = 0; end
      repeat (3) @(negedge clk);
      rst_n = 1;
      load = LOADS[l]; words = 0; lat_sum = 0; lat_n = 0; cyc = 0;
      running = 1;
      repeat (CYCLES) @(negedge clk);
      running = 0;
      achieved[l] = 100.0 * words / (NN * CYCLES);
      latency[l]  = (lat_n > 0) ? real'(lat_sum) / lat_n : 0.0;
      gbps[l]     = real'(words) * W / CYCLES;   // Gbit/s at a 1 GHz clock
    end
    done = 1;
  end
endmodule
