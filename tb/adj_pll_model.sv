// adj_pll_model: behavioural model of an adjustable PLL, for testbenches
// only (not synthesizable). The output half period is
//   HP0_PS - HP_STEP_PS * code   (picoseconds),
// so a larger code gives a higher frequency. A strobe on prog_load (rising
// edge) takes prog_data as the new code: lock drops at once, the output runs
// at an erratic, unlocked frequency for LOCK_PS, then settles on the new
// frequency and lock rises again.
`timescale 1ps/1ps
module adj_pll_model #(
  parameter int      PROG_W     = 8,
  parameter int      RESET_CODE = 0,
  parameter realtime HP0_PS     = 20000.0,
  parameter realtime HP_STEP_PS = 60.0,
  parameter realtime LOCK_PS    = 200000.0
) (
  input  logic [PROG_W-1:0] prog_data,
  input  logic              prog_load,
  output logic              clk,
  output logic              lock
);
  realtime hp;
  realtime t_lock;
  int      code;

  initial begin
    code   = RESET_CODE;
    hp     = HP0_PS - HP_STEP_PS * code;
    lock   = 1'b1;
    clk    = 1'b0;
    t_lock = 0;
  end

  always @(posedge prog_load) begin
    code   = int'(prog_data);
    lock   = 1'b0;
    t_lock = $realtime + LOCK_PS;
    #(LOCK_PS);
    hp   = HP0_PS - HP_STEP_PS * code;
    lock = 1'b1;
  end

  always begin
    if (lock) #(hp);
    else      #(1000.0 + 3000.0 * ($urandom_range(0, 7)));
    clk = ~clk;
  end
endmodule
