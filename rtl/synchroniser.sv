// synchroniser: turns the step signal into a glitch-free pulse train that
// runs at, and is aligned with, the requested clock.
//
// step comes from the current-clock domain. Two flip-flops on the rising
// edge of the requested clock bring it into that domain; a third one, on
// the falling edge, arms the output gate while the requested clock is low.
// The output is the requested clock ANDed with that arm bit, so every output
// pulse is a whole high phase of the requested clock and its rising edge is a
// rising edge of the requested clock. When step falls, the output stops in
// the same way, again at a low phase, and all registers return to zero.
//
// Departure: the described synchroniser produces a 25% duty-factor output
// by means of tuned combinational delays (tolerance up to a quarter of the
// current clock period). Such delays cannot be written as synthesizable
// logic, so this output has the requested clock's own duty factor (50% for a
// symmetric clock). Frequency, edge alignment and freedom from glitches are
// as described.
//
// Interface: armed is the output gate enable (falling-edge register);
// busy is high while any register of the synchroniser is still set, used by
// the state machine to know the hardware is back in its initial state.
module synchroniser (
  input  logic req_clk,   // requested clock from the selector
  input  logic rst_n,
  input  logic step,      // step signal, current-clock domain
  output logic sync_out,  // output signal
  output logic armed,
  output logic busy
);

  logic [1:0] step_sync;

  always_ff @(posedge req_clk or negedge rst_n) begin
    if (!rst_n) step_sync <= '0;
    else        step_sync <= {step_sync[0], step};
  end

  always_ff @(negedge req_clk or negedge rst_n) begin
    if (!rst_n) armed <= 1'b0;
    else        armed <= step_sync[1];
  end

  assign sync_out = req_clk & armed;
  assign busy     = (|step_sync) | armed;

endmodule
