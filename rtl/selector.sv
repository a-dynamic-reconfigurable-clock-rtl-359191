// selector: picks the requested clock and raises the step signal.
//
// On a load (a change request accepted by the state machine) the selector
// stores the new clock value, clamped to the number of clocks, as req_idx.
// req_clk is the PLL output chosen by req_idx; it feeds only the
// synchroniser and the switcher's hand-over logic, never the system. One
// internal clock cycle after the load, when req_clk has settled, the step
// signal rises; it falls when the state machine clears it after the switch.
// min_ck and max_ck tell the decision maker that the selected clock is the
// lowest (index 0) or the highest (index N_CLK-1) available frequency.
//
// Timing: load and step_clr are sampled on rising edges of clk_int; step
// is a register in that domain. Selecting the requested clock by the new
// clock value bus and generating step on the current clock follow the
// described selector; the one-cycle settling delay, the clamping and the
// ordering of the clocks by increasing frequency are this design's choices.
module selector #(
  parameter  int unsigned N_CLK     = 4,
  parameter  int unsigned RESET_IDX = 0,
  localparam int unsigned IW        = (N_CLK > 1) ? $clog2(N_CLK) : 1
) (
  input  logic             clk_int,
  input  logic             rst_n,
  input  logic [N_CLK-1:0] pll_clk,    // all available clocks
  input  logic             load,       // accept new_value (one clk_int cycle)
  input  logic [IW-1:0]    new_value,  // requested clock index
  input  logic             step_clr,   // end of the change: drop step
  output logic [IW-1:0]    req_idx,
  output logic             req_clk,
  output logic             step,
  output logic             min_ck,
  output logic             max_ck
);

  logic pending;

  always_ff @(posedge clk_int or negedge rst_n) begin
    if (!rst_n) begin
      req_idx <= IW'(RESET_IDX);
      pending <= 1'b0;
      step    <= 1'b0;
    end else begin
      if (load) begin
        req_idx <= (int'(new_value) >= int'(N_CLK)) ? IW'(N_CLK - 1) : new_value;
      end
      pending <= load;
      if (pending)       step <= 1'b1;
      else if (step_clr) step <= 1'b0;
    end
  end

  assign req_clk = pll_clk[req_idx];
  assign min_ck  = (req_idx == '0);
  assign max_ck  = (req_idx == IW'(N_CLK - 1));

endmodule
