// tb_noc_traffic: random-traffic workload on the 4 x 4 mesh for the four
// routing algorithms: XY, routing table, adaptive XY, adaptive XY with
// backtracking. Each is loaded at requested utilizations of 10, 20, 40 and
// 80 percent with 64-word messages; achieved utilization and average
// message latency are printed as a table.
// Checked: no word is corrupted or out of order; at 10 percent every
// algorithm delivers what is requested (within 2 points); at the highest
// retries, detours and backtracking all occur; with backtracking fewer
// set-ups are cancelled back to the sending interface than with XY or
// adaptive XY routing. 40 percent of a 32-bit link at 1 GHz per node is
// 204.8 Gbit/s for the sixteen nodes together.
module tb_noc_traffic;
  import noc_pkg::*;
  localparam int NL = 4;
  localparam int LOADS [NL] = '{10, 20, 40, 80};
  logic clk = 0;
  int checks = 0, failures = 0;
  logic done [4];
  real  ach [4][NL], lat [4][NL];
  int   err [4], rty [4], det [4], bt [4];
  string name [4] = '{"XY-routing", "routing table", "adaptive XY", "adaptive XY, backtracking"};

  always #5 clk = ~clk;

  for (genvar a = 0; a < 4; a++) begin : g_alg
    noc_traffic_bench #(.ALGO(routing_alg_e'(a)), .NLOADS(NL), .LOADS(LOADS)) u (
      .clk, .done(done[a]), .achieved(ach[a]), .latency(lat[a]), .gbps(),
      .errors(err[a]), .retries(rty[a]), .detours(det[a]), .backtracks(bt[a]));
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("requested %%   achieved %% (average latency, cycles)");
    for (int l = 0; l < NL; l++)
      $display("  %3d   XY %5.1f (%5.1f)  table %5.1f (%5.1f)  adaptive %5.1f (%5.1f)  backtracking %5.1f (%5.1f)",
               LOADS[l], ach[0][l], lat[0][l], ach[1][l], lat[1][l], ach[2][l], lat[2][l], ach[3][l], lat[3][l]);
    for (int a = 0; a < 4; a++) begin
      $display("%s: retries %0d detours %0d backtracking %0d", name[a], rty[a], det[a], bt[a]);
      chk(err[a] == 0, {name[a], ": words intact"});
      chk(ach[a][0] > LOADS[0] - 2.0, {name[a], ": low load delivered"});
      chk(rty[a] > 0, {name[a], ": refusals retried"});
    end
    chk(det[2] > 0 && det[3] > 0, "adaptive detours taken");
    chk(bt[3] > 0 && bt[0] == 0, "backtracking only with the backtracking algorithm");
    chk(rty[3] < rty[0] && rty[3] < rty[2],
        "backtracking cancels fewer set-ups at the sending interface than XY and adaptive XY");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
