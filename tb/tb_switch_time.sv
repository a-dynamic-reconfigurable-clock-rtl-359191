// Switching-time testbench: how long the system clock pauses during a
// change, with 2 clocks and with 16 clocks.
//
// Clock changer A has two clocks (half periods 6 ns and 4 ns). Clock
// changer B has sixteen (half periods 6.0, 5.8, ..., 3.0 ns, then 4 ns last),
// and its first and last clocks are the very same signals as A's. The same
// requests are sent to both at the same moment, so the pause must be
// identical: the switching time does not depend on the number of clocks.
// B then steps through many frequency pairs. Each pause is checked against
// the window 1 old period + 4 new periods .. 3 old periods + 9 new
// periods, and is printed in periods of the old clock.
`timescale 1ps/1ps
module tb_switch_time;
  import clkgen_pkg::*;
  localparam int NB = 16;
  realtime hpb [NB];
  logic [NB-1:0] cb;
  logic [1:0] ca;
  logic rst_n;
  logic a_change, a_changed, a_sys, a_min, a_max;
  logic b_change, b_changed, b_sys, b_min, b_max;
  logic [0:0] a_nv;
  logic [3:0] b_nv;
  int checks = 0, failures = 0;

  assign ca = {cb[NB-1], cb[0]};

  clock_changer #(.N_CLK(2)) dut_a (
    .pll_clk(ca), .rst_n(rst_n), .change(a_change), .new_clock_value(a_nv), .min_ck(a_min),
    .max_ck(a_max), .changed(a_changed), .sys_clk(a_sys), .clk_int(), .req_clk(), .step(),
    .sync_out(), .cur_idx(), .clk_en(), .isolated(), .state());
  clock_changer #(.N_CLK(NB)) dut_b (
    .pll_clk(cb), .rst_n(rst_n), .change(b_change), .new_clock_value(b_nv), .min_ck(b_min),
    .max_ck(b_max), .changed(b_changed), .sys_clk(b_sys), .clk_int(), .req_clk(), .step(),
    .sync_out(), .cur_idx(), .clk_en(), .isolated(), .state());

  initial begin
    for (int i = 0; i < NB - 1; i++) hpb[i] = 6000.0 - 200.0 * i;
    hpb[NB-1] = 4000.0;
  end

  for (genvar i = 0; i < NB; i++) begin : g_clk
    initial begin
      cb[i] = 1'b0;
      #(50.0 + 370.0 * i);
      forever #(hpb[i]) cb[i] = ~cb[i];
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // pause of the system clock: time between the edge that samples the
  // request and the first edge after it
  task automatic pause_b(input int from, input int to, output realtime gap);
    realtime t0;
    @(posedge b_sys); #1 b_change = 1'b1; b_nv = 4'(to);
    @(posedge b_sys); t0 = $realtime; #1 b_change = 1'b0;
    @(posedge b_sys); gap = $realtime - t0;
    @(posedge b_changed);
    check(gap >= 2.0 * hpb[from] + 8.0 * hpb[to] - 1.0 &&
          gap <= 6.0 * hpb[from] + 18.0 * hpb[to] + 1.0,
          $sformatf("pause %0t for %0d -> %0d outside window", gap, from, to));
  endtask

  realtime ga, gb;
  task automatic pause_a(input int to);
    realtime t0;
    @(posedge a_sys); #1 a_change = 1'b1; a_nv = 1'(to);
    @(posedge a_sys); t0 = $realtime; #1 a_change = 1'b0;
    @(posedge a_sys); ga = $realtime - t0;
    @(posedge a_changed);
  endtask

  initial begin
    int cur;
    rst_n = 1'b0; a_change = 0; b_change = 0; a_nv = 0; b_nv = 0;
    #40000 rst_n = 1'b1;
    repeat (2) @(posedge a_sys);
    // A and B side by side: same clocks, same requests, same moment
    cur = 0;
    for (int k = 0; k < 6; k++) begin
      int to;
      to = (cur == 0) ? NB - 1 : 0;
      fork
        pause_a((to == 0) ? 0 : 1);
        pause_b(cur, to, gb);
      join
      check(ga == gb, $sformatf("2-clock pause %0t differs from 16-clock pause %0t", ga, gb));
      $display("2 clocks vs 16 clocks, %0d -> %0d: pause %0.2f / %0.2f old periods",
               cur, to, ga / (2.0 * hpb[cur]), gb / (2.0 * hpb[cur]));
      cur = to;
      repeat (3) @(posedge b_sys);
    end
    // sweep over frequency pairs with 16 clocks
    for (int k = 0; k < 24; k++) begin
      int to;
      to = (k * 5 + 3) % NB;
      pause_b(cur, to, gb);
      $display("16 clocks, %0d -> %0d (half periods %0t -> %0t): pause %0.2f old periods",
               cur, to, hpb[cur], hpb[to], gb / (2.0 * hpb[cur]));
      check(gb / (2.0 * hpb[cur]) <= 20.0, "pause longer than 20 old periods");
      cur = to;
      repeat (2) @(posedge b_sys);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
