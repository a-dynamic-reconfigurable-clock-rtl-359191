// clock_changer: changes the system clock from one PLL output to another
// without glitches and without shortened pulses.
//
// Blocks and their order of action on a change request:
//   isolator     stops the system clock low; the internal clock keeps going.
//   selector     selects the requested clock by the new clock value and
//                raises step one internal cycle later.
//   switcher     drops the current clock from the internal clock at its
//                next low phase.
//   synchroniser brings step into the requested clock's domain and arms
//                its output pulse train on a low phase of that clock.
//   switcher     then selects the requested clock on a falling edge.
//   changer_fsm  sees the first edge of the requested clock, clears step,
//                restarts the system clock (again from a low phase), waits for
//                the synchroniser to clear and pulses changed.
// The system clock is thus held low from the falling edge after the request
// until the requested clock's first full pulse after the hand-over.
//
// Ports follow the clock changer's signals named in the description (PLL
// outputs, change, new clock value, min ck, max ck, changed, system clock);
// reset, the state and the diagnostic outputs are this design's additions.
// Clocks are ordered by increasing frequency (index 0 is "min ck").
module clock_changer
  import clkgen_pkg::*;
#(
  parameter  int unsigned N_CLK     = 4,
  parameter  int unsigned RESET_IDX = 0,
  localparam int unsigned IW        = (N_CLK > 1) ? $clog2(N_CLK) : 1
) (
  input  logic [N_CLK-1:0] pll_clk,
  input  logic             rst_n,
  input  logic             change,
  input  logic [IW-1:0]    new_clock_value,
  output logic             min_ck,
  output logic             max_ck,
  output logic             changed,
  output logic             sys_clk,
  // observation of the internal operation
  output logic             clk_int,
  output logic             req_clk,
  output logic             step,
  output logic             sync_out,
  output logic [IW-1:0]    cur_idx,
  output logic [N_CLK-1:0] clk_en,
  output logic             isolated,
  output changer_state_e   state
);

  logic          load, stop, step_clr, sync_armed, sync_busy;
  logic [IW-1:0] req_idx;

  isolator u_isolator (
    .clk_int (clk_int),
    .rst_n   (rst_n),
    .stop    (stop),
    .sys_clk (sys_clk),
    .isolated(isolated)
  );

  selector #(.N_CLK(N_CLK), .RESET_IDX(RESET_IDX)) u_selector (
    .clk_int  (clk_int),
    .rst_n    (rst_n),
    .pll_clk  (pll_clk),
    .load     (load),
    .new_value(new_clock_value),
    .step_clr (step_clr),
    .req_idx  (req_idx),
    .req_clk  (req_clk),
    .step     (step),
    .min_ck   (min_ck),
    .max_ck   (max_ck)
  );

  synchroniser u_synchroniser (
    .req_clk (req_clk),
    .rst_n   (rst_n),
    .step    (step),
    .sync_out(sync_out),
    .armed   (sync_armed),
    .busy    (sync_busy)
  );

  switcher #(.N_CLK(N_CLK), .RESET_IDX(RESET_IDX)) u_switcher (
    .pll_clk   (pll_clk),
    .rst_n     (rst_n),
    .cur_idx   (cur_idx),
    .req_idx   (req_idx),
    .req_clk   (req_clk),
    .step      (step),
    .sync_armed(sync_armed),
    .clk_int   (clk_int),
    .en        (clk_en)
  );

  changer_fsm #(.N_CLK(N_CLK), .RESET_IDX(RESET_IDX)) u_fsm (
    .clk_int  (clk_int),
    .rst_n    (rst_n),
    .change   (change),
    .req_idx  (req_idx),
    .sync_busy(sync_busy),
    .load     (load),
    .stop     (stop),
    .step_clr (step_clr),
    .cur_idx  (cur_idx),
    .changed  (changed),
    .state    (state)
  );

endmodule
