// Testbench for changer_fsm on a plain 10 ns clock. The clock is paused
// for a while in ST_STEP, as the switcher does during a hand-over, and
// sync_busy is held for a chosen number of cycles after it. Checks the
// exact cycle-by-cycle sequence: load only with change in ST_IDLE, stop
// from the load edge to the first edge after the pause, step_clr in
// ST_STEP, cur_idx taking req_idx there, the wait on sync_busy and a single
// one-cycle changed pulse, i.e. (busy cycles) + 1 cycles from the
// first edge after the pause to changed.
`timescale 1ps/1ps
module tb_changer_fsm;
  import clkgen_pkg::*;
  logic clk = 1'b0, run = 1'b1, rst_n, change, sync_busy, load, stop, step_clr, changed;
  logic [1:0] req_idx, cur_idx;
  changer_state_e state;
  int checks = 0, failures = 0;

  changer_fsm #(.N_CLK(4), .RESET_IDX(0)) dut (
    .clk_int(clk), .rst_n(rst_n), .change(change), .req_idx(req_idx), .sync_busy(sync_busy),
    .load(load), .stop(stop), .step_clr(step_clr), .cur_idx(cur_idx), .changed(changed),
    .state(state));

  always #5000 if (run) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  int changed_cnt = 0;
  always @(posedge clk) if (changed) changed_cnt++;

  task automatic one_change(input int r, input int busy_cycles);
    @(posedge clk); #1;
    check(state == ST_IDLE && !stop && !load, "not idle before request");
    change = 1'b1;
    #1 check(load, "load not given with change in idle");
    @(posedge clk); #1 change = 1'b0; req_idx = 2'(r);
    check(state == ST_ISOLATE && stop, "stop not raised on the load edge");
    @(posedge clk); #1;
    check(state == ST_STEP && stop && step_clr, "not in step state");
    // the switcher pauses the clock during the hand-over
    @(negedge clk); run = 1'b0;
    #40000 run = 1'b1; sync_busy = 1'b1;
    @(posedge clk); #1;
    check(state == ST_CLEAN && !stop && int'(cur_idx) == r, "restart edge wrong");
    for (int k = 0; k < busy_cycles; k++) begin
      @(posedge clk); #1;
      check(!changed && state == ST_CLEAN, "left clean-up while busy");
    end
    sync_busy = 1'b0;
    @(posedge clk); #1;
    check(changed && state == ST_DONE, "changed not pulsed after clean-up");
    @(posedge clk); #1;
    check(!changed && state == ST_IDLE, "changed longer than one cycle");
  endtask

  initial begin
    rst_n = 1'b0; change = 0; sync_busy = 0; req_idx = 0;
    #12000 rst_n = 1'b1;
    one_change(3, 3);
    one_change(1, 1);
    one_change(2, 5);
    one_change(0, 2);
    check(changed_cnt == 4, "number of changed pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
