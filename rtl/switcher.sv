// switcher: glitch-free multiplexer that hands the internal clock over from
// the current clock to the requested clock.
//
// Every input clock i has its own enable register en[i], clocked on the
// falling edge of that clock, so an enable only changes while its clock is
// low. The internal clock is the OR of (pll_clk[i] AND en[i]); at most one
// enable is set at any time.
//
// Hand-over, as one change goes:
//  1. step rises (current-clock domain). At the next falling edge of the
//     current clock its enable drops: the internal clock stays low.
//  2. "released" (step high and every input other than the requested one
//     disabled) is brought into the requested-clock domain by two
//     flip-flops.
//  3. Once the synchroniser's output gate is armed and released has been
//     seen, the requested clock's enable is set on its falling edge. The
//     next rising edge of the internal clock is a full pulse of the
//     requested clock.
// If the requested clock is the current one, the enable drops and is set
// again in the same way. The state machine then clears step and makes
// req_idx the new cur_idx in the same cycle.
//
// Keeping the current clock active until step and selecting the requested
// clock with the synchroniser's output follow the described switcher; the
// per-input enables and the release handshake are this design's own.
// Timing: step and cur_idx change on rising edges of the internal clock,
// which is pll_clk[cur_idx] when they matter, so the drop is a half-cycle
// path. The enable path from en[] through the release synchroniser is
// asynchronous by design.
module switcher #(
  parameter  int unsigned N_CLK     = 4,
  parameter  int unsigned RESET_IDX = 0,
  localparam int unsigned IW        = (N_CLK > 1) ? $clog2(N_CLK) : 1
) (
  input  logic [N_CLK-1:0] pll_clk,
  input  logic             rst_n,
  input  logic [IW-1:0]    cur_idx,     // clock now driving clk_int
  input  logic [IW-1:0]    req_idx,     // clock to switch to
  input  logic             req_clk,     // pll_clk[req_idx], from the selector
  input  logic             step,        // change in progress
  input  logic             sync_armed,  // synchroniser output gate enabled
  output logic             clk_int,     // internal / ungated system clock
  output logic [N_CLK-1:0] en           // one-hot (or zero during hand-over)
);

  logic [N_CLK-1:0] req_onehot;
  logic             released;
  logic [1:0]       rel_sync;

  assign req_onehot = N_CLK'(1) << req_idx;
  assign released   = step && ((en & ~req_onehot) == '0);

  always_ff @(posedge req_clk or negedge rst_n) begin
    if (!rst_n) rel_sync <= '0;
    else        rel_sync <= {rel_sync[0], released};
  end

  for (genvar i = 0; i < N_CLK; i++) begin : g_in
    logic drop_i, take_i, en_q;
    assign drop_i = step && (cur_idx == IW'(i));
    assign take_i = sync_armed && rel_sync[1] && (req_idx == IW'(i));

    always_ff @(negedge pll_clk[i] or negedge rst_n) begin
      if (!rst_n) en_q <= (i == RESET_IDX);
      else        en_q <= take_i || (en_q && !drop_i);
    end
    assign en[i] = en_q;
  end

  assign clk_int = |(pll_clk & en);

endmodule
