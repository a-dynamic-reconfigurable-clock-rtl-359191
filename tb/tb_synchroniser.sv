// Testbench for synchroniser: requested clock of 8 ns, step raised and
// lowered at arbitrary times. Checks that the first output pulse comes on
// the third rising edge of the requested clock after step rises, that every
// output pulse is a whole high phase beginning on a rising edge of the
// requested clock, that the pulses then come at the requested clock's rate,
// and that after step falls the output stops within three edges and busy
// clears.
`timescale 1ps/1ps
module tb_synchroniser;
  logic clk = 1'b0, rst_n, step, sync_out, armed, busy;
  int checks = 0, failures = 0;

  synchroniser dut (.req_clk(clk), .rst_n(rst_n), .step(step), .sync_out(sync_out),
                    .armed(armed), .busy(busy));

  always #4000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, what); end
  endtask

  realtime t_clk_rise = 0, t_out_rise = 0, t_prev_out = 0;
  int out_pulses = 0, clk_edges = 0;
  always @(posedge clk) begin t_clk_rise = $realtime; clk_edges++; end
  always @(posedge sync_out) begin
    #0;
    check(t_clk_rise == $realtime, "output edge not on requested clock edge");
    if (out_pulses > 0)
      check($realtime - t_prev_out == 8000.0, "output pulses not at requested rate");
    t_prev_out = $realtime;
    t_out_rise = $realtime;
    out_pulses++;
  end
  always @(negedge sync_out) check($realtime - t_out_rise == 4000.0, "short output pulse");

  initial begin
    rst_n = 1'b0; step = 1'b0;
    #9000 rst_n = 1'b1;
    for (int k = 0; k < 6; k++) begin
      int first_edge;
      #(1000 + 1700 * k);
      step = 1'b1;
      clk_edges = 0; out_pulses = 0;
      @(posedge sync_out);
      #1 first_edge = clk_edges;
      check(first_edge == 3, $sformatf("first output on edge %0d, expected 3", first_edge));
      repeat (4) @(posedge clk);
      #1 check(out_pulses == 5, $sformatf("%0d output pulses, expected 5", out_pulses));
      #(900 * k) step = 1'b0;
      repeat (3) @(posedge clk);
      #4500 check(!sync_out && !armed && !busy, "synchroniser not cleared");
      out_pulses = 0;
      repeat (3) @(posedge clk);
      check(out_pulses == 0, "output pulse while step low");
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
