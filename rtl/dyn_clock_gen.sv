// dyn_clock_gen: dynamically reconfigurable clock generator, both circuit
// versions side by side.
//
// fixed_* ports: the version with n fixed PLLs that all run and stay
// locked. The clock changer switches the system clock from one PLL output
// to another on request of the processor's decision maker; no lock time is
// involved, only the changer's own switching time. N_CLK is the number of
// fixed PLLs (n); their outputs come in on fixed_pll_clk, index 0 being the
// lowest frequency ("min ck") and N_CLK-1 the highest ("max ck").
//
// pair_* ports: the version with two adjustable PLLs. The idle PLL is
// programmed with the new clock value and, once locked, takes over the
// system clock through a two-input clock changer.
//
// The PLLs and the decision maker are outside this RTL; their signals are
// ports. Each version has its own reset. The number of fixed PLLs and the
// programming code width are not fixed by the description; their defaults
// (4 and 8) are this design's choices.
module dyn_clock_gen
  import clkgen_pkg::*;
#(
  parameter  int unsigned N_CLK   = 4,
  parameter  int unsigned PROG_W  = 8,
  localparam int unsigned IW      = (N_CLK > 1) ? $clog2(N_CLK) : 1
) (
  // fixed-PLL version
  input  logic [N_CLK-1:0]  fixed_pll_clk,
  input  logic              fixed_rst_n,
  input  logic              fixed_change,
  input  logic [IW-1:0]     fixed_new_clock_value,
  output logic              fixed_min_ck,
  output logic              fixed_max_ck,
  output logic              fixed_changed,
  output logic              fixed_sys_clk,
  output logic              fixed_isolated,
  output changer_state_e    fixed_state,
  // adjustable-PLL version
  input  logic [1:0]        pair_pll_clk,
  input  logic [1:0]        pair_pll_lock,
  output logic [PROG_W-1:0] pair_prog_data,
  output logic [1:0]        pair_prog_load,
  input  logic              pair_rst_n,
  input  logic              pair_change,
  input  logic [PROG_W-1:0] pair_new_clock_value,
  output logic              pair_min_ck,
  output logic              pair_max_ck,
  output logic              pair_changed,
  output logic              pair_sys_clk,
  output logic              pair_busy
);

  logic             f_clk_int, f_req_clk, f_step, f_sync_out;
  logic [IW-1:0]    f_cur_idx;
  logic [N_CLK-1:0] f_clk_en;

  clock_changer #(.N_CLK(N_CLK), .RESET_IDX(0)) u_fixed (
    .pll_clk        (fixed_pll_clk),
    .rst_n          (fixed_rst_n),
    .change         (fixed_change),
    .new_clock_value(fixed_new_clock_value),
    .min_ck         (fixed_min_ck),
    .max_ck         (fixed_max_ck),
    .changed        (fixed_changed),
    .sys_clk        (fixed_sys_clk),
    .clk_int        (f_clk_int),
    .req_clk        (f_req_clk),
    .step           (f_step),
    .sync_out       (f_sync_out),
    .cur_idx        (f_cur_idx),
    .clk_en         (f_clk_en),
    .isolated       (fixed_isolated),
    .state          (fixed_state)
  );

  pll_pair_changer #(.PROG_W(PROG_W)) u_pair (
    .rst_n          (pair_rst_n),
    .pll_clk        (pair_pll_clk),
    .pll_lock       (pair_pll_lock),
    .prog_data      (pair_prog_data),
    .prog_load      (pair_prog_load),
    .change         (pair_change),
    .new_clock_value(pair_new_clock_value),
    .min_ck         (pair_min_ck),
    .max_ck         (pair_max_ck),
    .changed        (pair_changed),
    .sys_clk        (pair_sys_clk),
    .busy           (pair_busy)
  );

endmodule
