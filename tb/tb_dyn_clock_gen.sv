// End-to-end testbench for dyn_clock_gen at its default parameters (four
// fixed PLLs, 8-bit programming code for the adjustable pair). A small
// decision-maker model on each side issues a sequence of change requests on
// its own system clock, waits for changed each time and checks the result
// (new period, min/max flags, no glitch), while the two versions run at the
// same time.
//
// Mechanisms counted, each of which must occur at least once: a change to a
// higher and to a lower frequency, a request for the clock already in use,
// reaching min ck and max ck on each side, a PLL being programmed and
// locking while the system keeps running, and a synchroniser output pulse
// train during a change.
`timescale 1ps/1ps
module tb_dyn_clock_gen;
  import clkgen_pkg::*;
  localparam int N = 4;
  localparam realtime HP [N] = '{10000.0, 7000.0, 5000.0, 3000.0};

  logic [N-1:0] fclk;
  logic f_rst_n, f_change, f_min, f_max, f_changed, f_sys, f_iso;
  logic [1:0] f_nv;
  changer_state_e f_state;
  logic [1:0] p_clk, p_lock, p_load;
  logic [7:0] p_data, p_nv;
  logic p_rst_n, p_change, p_min, p_max, p_changed, p_sys, p_busy;
  int checks = 0, failures = 0;

  dyn_clock_gen dut (
    .fixed_pll_clk(fclk), .fixed_rst_n(f_rst_n), .fixed_change(f_change),
    .fixed_new_clock_value(f_nv), .fixed_min_ck(f_min), .fixed_max_ck(f_max),
    .fixed_changed(f_changed), .fixed_sys_clk(f_sys), .fixed_isolated(f_iso),
    .fixed_state(f_state),
    .pair_pll_clk(p_clk), .pair_pll_lock(p_lock), .pair_prog_data(p_data),
    .pair_prog_load(p_load), .pair_rst_n(p_rst_n), .pair_change(p_change),
    .pair_new_clock_value(p_nv), .pair_min_ck(p_min), .pair_max_ck(p_max),
    .pair_changed(p_changed), .pair_sys_clk(p_sys), .pair_busy(p_busy));

  for (genvar i = 0; i < N; i++) begin : g_clk
    initial begin
      fclk[i] = 1'b0;
      #(1100.0 * i + 300.0);
      forever #(HP[i]) fclk[i] = ~fclk[i];
    end
  end
  adj_pll_model #(.PROG_W(8)) pll0 (.prog_data(p_data), .prog_load(p_load[0]),
                                     .clk(p_clk[0]), .lock(p_lock[0]));
  adj_pll_model #(.PROG_W(8)) pll1 (.prog_data(p_data), .prog_load(p_load[1]),
                                     .clk(p_clk[1]), .lock(p_lock[1]));

  function automatic realtime php(input int code);
    return 20000.0 - 60.0 * code;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  // mechanism counters
  int n_up = 0, n_down = 0, n_same = 0, n_fmin = 0, n_fmax = 0;
  int n_pmin = 0, n_pmax = 0, n_lock = 0, n_sync = 0, n_gap_in_range = 0;

  always @(posedge dut.u_fixed.sync_out) n_sync++;

  // glitch monitors: every high pulse is a half period of a known clock
  realtime fr = 0, pr = 0;
  always @(posedge f_sys) fr = $realtime;
  always @(negedge f_sys) begin
    realtime hi; bit ok;
    hi = $realtime - fr; ok = 0;
    for (int i = 0; i < N; i++) if (hi > HP[i] - 1.0 && hi < HP[i] + 1.0) ok = 1;
    if (f_rst_n) check(ok, $sformatf("fixed side: system clock pulse of %0t", hi));
  end
  int p_cur = 0, p_new = 0;
  always @(posedge p_sys) pr = $realtime;
  always @(negedge p_sys) begin
    realtime hi;
    hi = $realtime - pr;
    if (p_rst_n)
      check((hi > php(p_cur) - 1.0 && hi < php(p_cur) + 1.0) ||
            (hi > php(p_new) - 1.0 && hi < php(p_new) + 1.0),
            $sformatf("pair side: system clock pulse of %0t", hi));
  end

  // ---------------- fixed-PLL side ----------------
  int f_cur = 0;
  task automatic f_req(input int v);
    realtime t0, t1, ta;
    if (v > f_cur) n_up++; else if (v < f_cur) n_down++; else n_same++;
    @(posedge f_sys); #1 f_change = 1'b1; f_nv = 2'(v);
    @(posedge f_sys); t0 = $realtime; #1 f_change = 1'b0;
    @(posedge f_sys); t1 = $realtime;
    // the change should normally take no more than 20 original periods
    if ((t1 - t0) / (2.0 * HP[f_cur]) <= 20.0)
      n_gap_in_range++;
    ta = $realtime;
    @(posedge f_sys);
    check($realtime - ta > 2.0 * HP[v] - 1.0 && $realtime - ta < 2.0 * HP[v] + 1.0,
          "fixed side: new period");
    @(posedge f_changed);
    @(posedge f_sys); #1;
    check(f_min == (v == 0) && f_max == (v == N - 1), "fixed side: min/max");
    if (f_min) n_fmin++;
    if (f_max) n_fmax++;
    f_cur = v;
  endtask

  // ---------------- adjustable-PLL side ----------------
  task automatic p_req(input int code);
    realtime ta;
    p_new = code;
    @(posedge p_sys); #1 p_change = 1'b1; p_nv = 8'(code);
    @(posedge p_sys); #1 p_change = 1'b0;
    wait (p_lock != 2'b11);
    n_lock++;
    @(posedge p_changed);
    repeat (2) @(posedge p_sys);
    ta = $realtime;
    @(posedge p_sys);
    check($realtime - ta > 2.0 * php(code) - 1.0 && $realtime - ta < 2.0 * php(code) + 1.0,
          "pair side: new period");
    check(p_min == (code == 0) && p_max == (code == 255), "pair side: min/max");
    if (p_min) n_pmin++;
    if (p_max) n_pmax++;
    p_cur = code;
  endtask

  initial begin
    f_rst_n = 1'b0; p_rst_n = 1'b0;
    f_change = 0; f_nv = 0; p_change = 0; p_nv = 0;
    #60000 f_rst_n = 1'b1; p_rst_n = 1'b1;
    repeat (3) @(posedge f_sys);
    fork
      begin
        f_req(1); f_req(3); f_req(3); f_req(0); f_req(2); f_req(1); f_req(0); f_req(3);
      end
      begin
        p_req(100); p_req(255); p_req(0); p_req(180);
      end
    join
    check(n_up > 0,   "no change to a higher frequency");
    check(n_down > 0, "no change to a lower frequency");
    check(n_same > 0, "no request for the running clock");
    check(n_fmin > 0 && n_fmax > 0, "fixed side never reached min or max ck");
    check(n_pmin > 0 && n_pmax > 0, "pair side never reached min or max ck");
    check(n_lock > 0, "no PLL lock wait");
    check(n_sync > 0, "no synchroniser output");
    check(n_gap_in_range > 0, "no change within 20 original periods");
    $display("mechanisms: up=%0d down=%0d same=%0d fmin=%0d fmax=%0d pmin=%0d pmax=%0d lock=%0d sync=%0d gap<=20T=%0d",
             n_up, n_down, n_same, n_fmin, n_fmax, n_pmin, n_pmax, n_lock, n_sync, n_gap_in_range);
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
