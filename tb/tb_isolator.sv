// Testbench for isolator: a 10 ns internal clock; stop is raised and
// lowered on rising edges, as the state machine does. Checks that the
// system clock follows the internal clock while enabled, that the pulse on
// which stop is sampled is the last one and is complete, that no pulse
// appears while stopped, and that the first pulse after release is the
// next whole pulse of the internal clock.
`timescale 1ps/1ps
module tb_isolator;
  logic clk = 1'b0, rst_n, stop, sys_clk, isolated;
  int checks = 0, failures = 0;

  isolator dut (.clk_int(clk), .rst_n(rst_n), .stop(stop), .sys_clk(sys_clk), .isolated(isolated));

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  int pulses = 0;
  realtime t_r;
  always @(posedge sys_clk) begin pulses++; t_r = $realtime; end
  always @(negedge sys_clk) check($realtime - t_r == 5000.0, "short system clock pulse");

  initial begin
    rst_n = 1'b0; stop = 1'b0;
    #12000 rst_n = 1'b1;
    repeat (3) begin
      repeat (4) begin
        @(posedge clk); #1;
        check(sys_clk == 1'b1 && !isolated, "system clock not following");
        @(negedge clk); #1;
        check(sys_clk == 1'b0, "system clock high in low phase");
      end
      @(posedge clk); #1 stop = 1'b1;     // stop sampled at this pulse
      check(sys_clk == 1'b1, "pulse of the stop request cut");
      pulses = 0;
      repeat (6) @(posedge clk);
      #1 check(pulses == 0 && isolated && sys_clk == 1'b0, "system clock not held low");
      stop = 1'b0;                        // released at a rising edge
      @(posedge clk); #1;
      check(pulses == 1 && sys_clk == 1'b1, "system clock not restarted at next pulse");
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
