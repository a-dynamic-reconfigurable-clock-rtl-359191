// Testbench for selector with three clocks (N_CLK=3, so that an
// out-of-range request can be tried). Checks that a load stores the
// requested index (values of 3 clamped to 2), that req_clk is the chosen
// clock, that step rises exactly one cycle after the load and falls on
// step_clr, and that min_ck / max_ck follow the index.
`timescale 1ps/1ps
module tb_selector;
  logic clk = 1'b0, rst_n, load, step_clr, req_clk, step, min_ck, max_ck;
  logic [2:0] pll = '0;
  logic [1:0] nv, req_idx;
  int checks = 0, failures = 0;

  selector #(.N_CLK(3), .RESET_IDX(0)) dut (
    .clk_int(clk), .rst_n(rst_n), .pll_clk(pll), .load(load), .new_value(nv),
    .step_clr(step_clr), .req_idx(req_idx), .req_clk(req_clk), .step(step),
    .min_ck(min_ck), .max_ck(max_ck));

  always #5000 clk = ~clk;
  always #3100 pll[0] = ~pll[0];
  always #2300 pll[1] = ~pll[1];
  always #1700 pll[2] = ~pll[2];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  initial begin
    int exp_idx;
    rst_n = 1'b0; load = 0; step_clr = 0; nv = '0;
    #12000 rst_n = 1'b1;
    @(posedge clk); #1;
    check(req_idx == 0 && min_ck && !max_ck && !step, "reset state");
    for (int k = 0; k < 12; k++) begin
      int v;
      v = (k * 7 + 1) % 4;
      exp_idx = (v > 2) ? 2 : v;
      load = 1'b1; nv = 2'(v);
      @(posedge clk); #1 load = 1'b0;
      check(int'(req_idx) == exp_idx, $sformatf("req_idx %0d for value %0d", req_idx, v));
      check(!step, "step rose together with load");
      for (int s = 0; s < 5; s++) begin
        #397 check(req_clk == pll[exp_idx], "req_clk is not the chosen clock");
      end
      @(posedge clk); #1;
      check(step, "step not high one cycle after load");
      check(min_ck == (exp_idx == 0) && max_ck == (exp_idx == 2), "min/max flags");
      repeat (2) @(posedge clk);
      #1 check(step, "step dropped without step_clr");
      step_clr = 1'b1;
      @(posedge clk); #1 step_clr = 1'b0;
      check(!step, "step not cleared");
    end
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
