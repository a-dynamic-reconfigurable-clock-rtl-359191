// Testbench for switcher with three clocks of unrelated periods. The
// testbench plays the selector, the synchroniser and the state machine:
// it selects a requested clock, raises step on an internal clock edge,
// arms the synchroniser gate on a falling edge of the requested clock two
// rising edges later, and on the first internal edge after the hand-over
// clears step and makes the requested clock current. Checks: no two enables
// ever set together; the current clock's enable drops at its first falling
// edge after step; the internal clock is low through the hand-over; every
// high pulse of the internal clock is a whole half period of one of the
// clocks; afterwards the internal clock is the requested clock.
`timescale 1ps/1ps
module tb_switcher;
  localparam int N = 3;
  localparam realtime HP [N] = '{9000.0, 6100.0, 3700.0};
  logic [N-1:0] pll, en;
  logic rst_n, step, armed, clk_int, req_clk;
  logic [1:0] cur_idx, req_idx;
  int checks = 0, failures = 0;

  switcher #(.N_CLK(N), .RESET_IDX(0)) dut (
    .pll_clk(pll), .rst_n(rst_n), .cur_idx(cur_idx), .req_idx(req_idx), .req_clk(req_clk),
    .step(step), .sync_armed(armed), .clk_int(clk_int), .en(en));

  assign req_clk = pll[req_idx];

  for (genvar i = 0; i < N; i++) begin : g_clk
    initial begin
      pll[i] = 1'b0;
      #(700.0 * i + 50.0);
      forever #(HP[i]) pll[i] = ~pll[i];
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  always @(en) if (rst_n) check($onehot0(en), "two clock enables set");

  realtime t_r = 0;
  always @(posedge clk_int) t_r = $realtime;
  always @(negedge clk_int) begin
    realtime hi;
    bit ok;
    hi = $realtime - t_r;
    ok = 0;
    for (int i = 0; i < N; i++) if (hi > HP[i] - 1.0 && hi < HP[i] + 1.0) ok = 1;
    if (rst_n) check(ok, $sformatf("internal clock pulse of %0t", hi));
  end

  int o;
  task automatic do_switch(input int r);
    o = int'(cur_idx);
    @(posedge clk_int); #1 req_idx = 2'(r);
    @(posedge clk_int); #1 step = 1'b1;
    fork
      begin
        repeat (2) @(posedge req_clk);
        @(negedge req_clk) armed = 1'b1;
      end
      begin
        wait (pll[o] == 1'b0); #1;
        check(!en[o] && !clk_int, "current clock not dropped at its next low phase");
      end
    join_none
    @(posedge clk_int);
    check(pll[r] == 1'b1 && en == N'(1 << r), "internal clock is not the requested clock");
    #1 step = 1'b0; cur_idx = 2'(r);
    repeat (2) @(posedge req_clk);
    @(negedge req_clk) armed = 1'b0;
    repeat (6) begin
      @(posedge pll[r]); #1 check(clk_int == 1'b1, "internal clock not following requested clock");
      @(negedge pll[r]); #1 check(clk_int == 1'b0, "internal clock high in requested low phase");
    end
  endtask

  initial begin
    rst_n = 1'b0; step = 0; armed = 0; cur_idx = 0; req_idx = 0;
    #30000 rst_n = 1'b1;
    check(en == 3'b001, "reset enable");
    do_switch(2); do_switch(1); do_switch(1); do_switch(0); do_switch(2); do_switch(0); do_switch(1);
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
