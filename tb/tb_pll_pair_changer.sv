// Testbench for pll_pair_changer with two adjustable PLL models (200 ns
// lock time). For each request it checks, from the PLL formula alone:
// the idle PLL (not the one driving the system) is programmed with the new
// code; the system clock keeps running at the old period while that PLL
// locks; the system clock is never glitched, even though the unlocked PLL's
// output is erratic; the whole change takes at least the lock time; after
// changed the system clock has the new period; min_ck / max_ck follow the
// code (0 and 255).
`timescale 1ps/1ps
module tb_pll_pair_changer;
  localparam int W = 8;
  logic rst_n, change, min_ck, max_ck, changed, sys_clk, busy;
  logic [1:0] pll_clk, pll_lock, prog_load;
  logic [W-1:0] prog_data, nv;
  int checks = 0, failures = 0;

  pll_pair_changer #(.PROG_W(W)) dut (
    .rst_n(rst_n), .pll_clk(pll_clk), .pll_lock(pll_lock), .prog_data(prog_data),
    .prog_load(prog_load), .change(change), .new_clock_value(nv), .min_ck(min_ck),
    .max_ck(max_ck), .changed(changed), .sys_clk(sys_clk), .busy(busy));

  adj_pll_model #(.PROG_W(W)) pll0 (.prog_data(prog_data), .prog_load(prog_load[0]),
                                     .clk(pll_clk[0]), .lock(pll_lock[0]));
  adj_pll_model #(.PROG_W(W)) pll1 (.prog_data(prog_data), .prog_load(prog_load[1]),
                                     .clk(pll_clk[1]), .lock(pll_lock[1]));

  function automatic realtime hp_of(input int code);
    return 20000.0 - 60.0 * code;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  int cur_code = 0, new_code = 0, active = 0;
  realtime t_r = 0;
  always @(posedge sys_clk) t_r = $realtime;
  always @(negedge sys_clk) begin
    realtime hi;
    hi = $realtime - t_r;
    if (rst_n)
      check((hi > hp_of(cur_code) - 1.0 && hi < hp_of(cur_code) + 1.0) ||
            (hi > hp_of(new_code) - 1.0 && hi < hp_of(new_code) + 1.0),
            $sformatf("system clock pulse of %0t", hi));
  end

  int loads = 0, load_idx = -1;
  always @(posedge prog_load[0]) begin loads++; load_idx = 0; end
  always @(posedge prog_load[1]) begin loads++; load_idx = 1; end

  task automatic do_change(input int code);
    realtime t0, ta;
    int pulses_during_lock;
    new_code = code;
    loads = 0;
    @(posedge sys_clk); #1 change = 1'b1; nv = W'(code);
    @(posedge sys_clk); t0 = $realtime; #1 change = 1'b0;
    wait (loads == 1);
    #1 check(load_idx == 1 - active && int'(prog_data) == code, "idle PLL not programmed");
    // while the idle PLL locks the system keeps its clock
    pulses_during_lock = 0;
    ta = $realtime;
    while ($realtime - ta < 150000.0) begin
      @(posedge sys_clk);
      pulses_during_lock++;
    end
    check(pulses_during_lock >= int'(150000.0 / (2.0 * hp_of(cur_code))) - 1,
          "system clock stopped while the new PLL was locking");
    @(posedge changed);
    check($realtime - t0 >= 200000.0, "change faster than the lock time");
    repeat (2) @(posedge sys_clk);
    ta = $realtime;
    @(posedge sys_clk);
    check($realtime - ta > 2.0 * hp_of(code) - 1.0 && $realtime - ta < 2.0 * hp_of(code) + 1.0,
          "new system clock period wrong");
    check(min_ck == (code == 0) && max_ck == (code == 255), "min/max flags");
    check(!busy, "still busy after changed");
    active = 1 - active;
    cur_code = code;
  endtask

  initial begin
    rst_n = 1'b0; change = 1'b0; nv = '0;
    #100000 rst_n = 1'b1;
    repeat (3) @(posedge sys_clk);
    check(min_ck && !max_ck, "reset flags");
    do_change(200);
    do_change(255);
    do_change(40);
    do_change(0);
    do_change(130);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
