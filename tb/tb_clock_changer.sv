// Testbench for clock_changer with four free-running "PLL" clocks of
// unrelated periods and phases.
//
// Each change request is issued on a system clock edge, and the testbench
// checks, against values it works out from the clock periods alone:
//  - the system clock is never glitched: every high pulse is exactly a half
//    period of the old or the new clock, every low phase at least the
//    shorter of the two half periods;
//  - the last pulse before the gap is the one on which the request was
//    sampled, and after the gap the system clock has the requested period;
//  - the gap lies between 1 old period + 4 requested periods and 3 old
//    periods + 9 requested periods (the synchroniser's two-stage transfer,
//    its arming half cycle, the switcher's release handshake and the
//    isolator's restart) and is reported in old periods;
//  - the synchroniser output pulses only on rising edges of the requested
//    clock, and at least once per change;
//  - changed pulses once, min_ck / max_ck and cur_idx match the request.
`timescale 1ps/1ps
module tb_clock_changer;
  import clkgen_pkg::*;

  localparam int N = 4;
  // half periods in ps, index 0 = lowest frequency
  localparam realtime HP [N] = '{10000.0, 7000.0, 5000.0, 3000.0};

  logic [N-1:0] pll_clk;
  logic rst_n, change, min_ck, max_ck, changed, sys_clk, clk_int, req_clk;
  logic step, sync_out, isolated;
  logic [1:0] new_val, cur_idx;
  logic [N-1:0] clk_en;
  changer_state_e state;

  int checks = 0, failures = 0;

  clock_changer #(.N_CLK(N), .RESET_IDX(0)) dut (
    .pll_clk(pll_clk), .rst_n(rst_n), .change(change), .new_clock_value(new_val),
    .min_ck(min_ck), .max_ck(max_ck), .changed(changed), .sys_clk(sys_clk),
    .clk_int(clk_int), .req_clk(req_clk), .step(step), .sync_out(sync_out),
    .cur_idx(cur_idx), .clk_en(clk_en), .isolated(isolated), .state(state));

  for (genvar i = 0; i < N; i++) begin : g_clk
    initial begin
      pll_clk[i] = 1'b0;
      #(1300.0 * i + 100.0);
      forever begin
        #(HP[i]) pll_clk[i] = ~pll_clk[i];
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ---------------- system clock monitor ----------------
  int old_i = 0, new_i = 0;     // clocks involved in the current change
  realtime t_rise = 0, t_fall = 0;
  bit mon_en = 0;
  always @(posedge sys_clk) begin
    if (mon_en && t_fall > 0) begin
      realtime lo, mn;
      lo = $realtime - t_fall;
      mn = (HP[old_i] < HP[new_i]) ? HP[old_i] : HP[new_i];
      check(lo >= mn - 1.0, $sformatf("low phase %0t shorter than %0t", lo, mn));
    end
    t_rise = $realtime;
  end
  always @(negedge sys_clk) begin
    if (mon_en) begin
      realtime hi;
      hi = $realtime - t_rise;
      check((hi > HP[old_i] - 1.0 && hi < HP[old_i] + 1.0) ||
            (hi > HP[new_i] - 1.0 && hi < HP[new_i] + 1.0),
            $sformatf("high pulse %0t is not a half period", hi));
    end
    t_fall = $realtime;
  end

  // synchroniser output aligned with requested clock
  realtime t_req_rise = 0;
  int sync_pulses = 0;
  always @(posedge req_clk) t_req_rise = $realtime;
  always @(posedge sync_out) begin
    #0;
    sync_pulses++;
    check(t_req_rise == $realtime && req_clk, "synchroniser pulse not on a requested-clock rising edge");
  end

  int changed_pulses = 0;
  always @(posedge clk_int) if (changed) changed_pulses++;

  task automatic do_change(input int v);
    realtime t0, t1;
    real gap_old;
    int exp_i;
    exp_i = v;
    old_i = int'(cur_idx);
    new_i = exp_i;
    sync_pulses = 0;
    changed_pulses = 0;
    @(posedge sys_clk);
    #1 change = 1'b1; new_val = 2'(v);
    @(posedge sys_clk);
    t0 = $realtime;
    #1 change = 1'b0;
    @(posedge sys_clk);
    t1 = $realtime;
    gap_old = (t1 - t0) / (2.0 * HP[old_i]);
    $display("change %0d -> %0d: system clock gap %0.2f old periods", old_i, exp_i, gap_old);
    check((t1 - t0) >= 2.0 * HP[old_i] + 8.0 * HP[exp_i] - 1.0 &&
          (t1 - t0) <= 6.0 * HP[old_i] + 18.0 * HP[exp_i] + 1.0,
          $sformatf("gap %0t outside expected window", t1 - t0));
    // period after the change
    begin
      realtime ta;
      ta = $realtime;
      @(posedge sys_clk);
      check(($realtime - ta) > 2.0 * HP[exp_i] - 1.0 && ($realtime - ta) < 2.0 * HP[exp_i] + 1.0,
            "new system clock period wrong");
    end
    wait (state == ST_IDLE && changed_pulses > 0);
    repeat (3) @(posedge sys_clk);
    check(changed_pulses == 1, $sformatf("changed pulsed %0d times", changed_pulses));
    check(sync_pulses >= 1, "no synchroniser output pulse");
    check(int'(cur_idx) == exp_i, "cur_idx wrong");
    check(clk_en == N'(1 << exp_i), "switcher enable not one-hot on new clock");
    check(min_ck == (exp_i == 0), "min_ck wrong");
    check(max_ck == (exp_i == N - 1), "max_ck wrong");
    check(!isolated, "system clock still isolated");
    old_i = exp_i;
  endtask

  initial begin
    rst_n = 1'b0; change = 1'b0; new_val = '0;
    #50000 rst_n = 1'b1;
    repeat (4) @(posedge sys_clk);
    check(min_ck && !max_ck, "reset: min_ck");
    mon_en = 1;
    do_change(2);
    do_change(3);
    do_change(0);
    do_change(1);
    do_change(1);   // same clock requested
    do_change(3);
    do_change(2);
    do_change(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
