// changer_fsm: the clock changer's sequencing state machine.
//
// It runs on the internal clock, which is the current clock before a change
// and the requested clock after it; during the hand-over the internal clock
// has no edges, so the machine simply waits in ST_STEP.
//
//   ST_IDLE    change seen: load the selector, ask the isolator to stop the
//              system clock.
//   ST_ISOLATE the selector raises step at this edge.
//   ST_STEP    the first edge seen here is a rising edge of the requested
//              clock: the switch is done. Clear step, record req_idx as the
//              current clock and let the isolator restart the system clock.
//   ST_CLEAN   wait until the synchroniser has returned to its initial
//              state, so that the next change starts from reset values.
//   ST_DONE    one-cycle "changed" pulse; the next change may be requested.
//
// Handshake: change is a one-cycle request on a rising edge of the system
// clock, given only while no change is in progress (after reset or after
// changed). Requests outside ST_IDLE are ignored and flagged by an
// assertion. Returning the registers to their initial state and re-enabling
// the system clock follow the described state machine; the states, their
// encoding and the one-cycle pulses are this design's own choices.
module changer_fsm
  import clkgen_pkg::*;
#(
  parameter  int unsigned N_CLK     = 4,
  parameter  int unsigned RESET_IDX = 0,
  localparam int unsigned IW        = (N_CLK > 1) ? $clog2(N_CLK) : 1
) (
  input  logic           clk_int,
  input  logic           rst_n,
  input  logic           change,      // request from the decision maker
  input  logic [IW-1:0]  req_idx,     // selector's requested clock
  input  logic           sync_busy,   // synchroniser not yet cleared
  output logic           load,        // selector: take the new clock value
  output logic           stop,        // isolator: hold the system clock low
  output logic           step_clr,    // selector: drop step
  output logic [IW-1:0]  cur_idx,     // clock now driving the switcher output
  output logic           changed,     // change complete
  output changer_state_e state
);

  changer_state_e state_d;

  assign load     = (state == ST_IDLE) && change;
  assign step_clr = (state == ST_STEP);

  always_comb begin
    state_d = state;
    unique case (state)
      ST_IDLE:    if (change) state_d = ST_ISOLATE;
      ST_ISOLATE: state_d = ST_STEP;
      ST_STEP:    state_d = ST_CLEAN;
      ST_CLEAN:   if (!sync_busy) state_d = ST_DONE;
      ST_DONE:    state_d = ST_IDLE;
      default:    state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk_int or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      stop    <= 1'b0;
      cur_idx <= IW'(RESET_IDX);
      changed <= 1'b0;
    end else begin
      state   <= state_d;
      changed <= (state_d == ST_DONE);
      if (load)              stop    <= 1'b1;
      if (state == ST_STEP)  stop    <= 1'b0;
      if (state == ST_STEP)  cur_idx <= req_idx;
    end
  end

  // A change may only be requested while the changer is idle.
  a_change_when_idle: assert property (@(posedge clk_int) disable iff (!rst_n)
    change |-> (state == ST_IDLE));

endmodule
