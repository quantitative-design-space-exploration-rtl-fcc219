// tb_noc_design_space: the 4 x 4 mesh with adaptive XY routing and
// backtracking, built with data words of 16, 32, 64, 128 and 256 bits with
// input registers, and of 16 and 256 bits without them. Every configuration
// is offered the same random traffic: 204.8 Gbit/s in total at a 1 GHz
// clock, i.e. 12.8 bits per cycle per node, in messages of 512 bits. So the
// requested link utilization is 1280 / DATA_W percent and a message is
// 512 / DATA_W words. Average message latency and delivered Gbit/s are
// printed per configuration.
// Checked: every word arrives intact and in order in every configuration;
// each configuration delivers traffic; 128- and 256-bit words give a lower
// average latency than 16-bit words and 256-bit words deliver more Gbit/s;
// leaving out the input registers lowers the latency of the 256-bit mesh.
// (With 512-bit messages the connection set-up, five cycles per switch,
// dominates, so no configuration carries the full requested rate.)
module tb_noc_design_space;
  import noc_pkg::*;
  localparam int NC = 7;
  localparam int WID [NC] = '{16, 32, 64, 128, 256, 16, 256};
  localparam bit REG [NC] = '{1, 1, 1, 1, 1, 0, 0};
  logic clk = 0;
  int checks = 0, failures = 0;
  logic done [NC];
  real  ach [NC][1], lat [NC][1], gb [NC][1];
  int   err [NC], rty [NC], det [NC], bt [NC];

  always #5 clk = ~clk;

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    localparam int LOAD [1] = '{1280 / WID[c]};
    noc_traffic_bench #(.ALGO(ALG_ADAPTIVE_XY_BT), .DATA_W(WID[c]), .INPUT_REG(REG[c]),
                        .CYCLES(3000), .MSG_LEN(512 / WID[c]), .NLOADS(1), .LOADS(LOAD)) u (
      .clk, .done(done[c]), .achieved(ach[c]), .latency(lat[c]), .gbps(gb[c]),
      .errors(err[c]), .retries(rty[c]), .detours(det[c]), .backtracks(bt[c]));
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
    bit all;
    do begin
      @(posedge clk);
      all = 1;
      for (int c = 0; c < NC; c++) if (!done[c]) all = 0;
    end while (!all);
    $display("word bits  input reg  requested %%  delivered Gbit/s  average latency (cycles)");
    for (int c = 0; c < NC; c++)
      $display("  %4d        %0d         %3d          %6.1f          %7.1f",
               WID[c], REG[c], 1280 / WID[c], gb[c][0], lat[c][0]);
    for (int c = 0; c < NC; c++) begin
      chk(err[c] == 0, $sformatf("%0d-bit words intact", WID[c]));
      chk(gb[c][0] > 0.0, $sformatf("%0d-bit configuration delivers", WID[c]));
    end
    chk(lat[4][0] < lat[0][0], "256-bit words: lower latency than 16-bit words");
    chk(lat[3][0] < lat[0][0], "128-bit words: lower latency than 16-bit words");
    chk(gb[4][0] > gb[0][0], "256-bit words: more Gbit/s than 16-bit words");
    chk(lat[6][0] < lat[4][0], "256-bit words: lower latency without input registers");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
