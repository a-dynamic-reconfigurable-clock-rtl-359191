// isolator: stops and restarts the system clock, always in its low phase.
//
// The clock changer's internal clock (clk_int, the output of the switcher)
// keeps running while the digital system is isolated from it. The enable of
// the system clock is a register clocked on the falling edge of clk_int, so it
// can only change while clk_int is low: the system clock is cut after a
// complete high pulse and resumes with a complete high pulse, never with a
// shortened one.
//
// Interface: stop (clk_int rising-edge domain) asks for the system clock to
// be stopped; it is obeyed at the next falling edge of clk_int. Clearing it
// re-enables the system clock at the next falling edge, so the first resumed
// rising edge is the next rising edge of clk_int.
// Stopping the clock at a zero state and restarting it from the zero state
// follow the described isolator; the falling-edge enable register is this
// design's own way of doing it.
module isolator (
  input  logic clk_int,   // internal (switcher) clock
  input  logic rst_n,     // asynchronous active-low reset
  input  logic stop,      // request to hold the system clock low
  output logic sys_clk,   // gated system clock for the digital system
  output logic isolated   // 1 while the system clock is held low
);

  logic en_q;

  always_ff @(negedge clk_int or negedge rst_n) begin
    if (!rst_n) en_q <= 1'b1;
    else        en_q <= !stop;
  end

  assign sys_clk  = clk_int & en_q;
  assign isolated = !en_q;

endmodule
