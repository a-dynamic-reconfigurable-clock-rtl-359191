// pll_pair_changer: clock changer for a pair of adjustable PLLs.
//
// In this configuration there are only two clocks, each from a PLL whose
// frequency is programmable. One PLL drives the system while the other one
// is idle. On a change request the idle PLL is programmed with the new clock
// value; the system keeps running at the current frequency while that PLL
// locks. Once it reports lock, the two-input clock_changer switches the
// system clock over to it, glitch-free, exactly as for fixed PLLs. The PLL
// that was driving the system becomes the idle one for the next change.
// The change therefore takes the lock time plus the clock changer's own
// switching time.
//
// Interface: change / new_clock_value / min_ck / max_ck / changed as for the
// clock changer, except that new_clock_value is the PLL's programming code
// (PROG_W bits), and min_ck / max_ck report that the running code is
// MIN_CODE / MAX_CODE. prog_data / prog_load program a PLL (prog_load[i] is
// a one-cycle strobe in the internal clock domain); pll_lock[i] is that
// PLL's lock indication, asynchronous, brought in through two flip-flops.
// The PLL is expected to drop lock when it is programmed and raise it when
// locked; the controller waits for both.
// Two adjustable PLLs, programming by the clock changer and a switch only
// after lock follow the described two-PLL circuit; the lock handshake, the
// code width and the state machine are this design's own.
module pll_pair_changer
  import clkgen_pkg::*;
#(
  parameter int unsigned PROG_W     = 8,
  parameter int unsigned MIN_CODE   = 0,
  parameter int unsigned MAX_CODE   = (1 << PROG_W) - 1,
  parameter int unsigned RESET_CODE = 0
) (
  input  logic              rst_n,
  input  logic [1:0]        pll_clk,
  input  logic [1:0]        pll_lock,
  output logic [PROG_W-1:0] prog_data,
  output logic [1:0]        prog_load,
  input  logic              change,
  input  logic [PROG_W-1:0] new_clock_value,
  output logic              min_ck,
  output logic              max_ck,
  output logic              changed,
  output logic              sys_clk,
  output logic              busy
);

  typedef enum logic [2:0] {
    P_IDLE, P_PROG, P_UNLOCK, P_LOCK, P_SWITCH, P_WAIT
  } pair_state_e;

  pair_state_e       pstate;
  logic [PROG_W-1:0] cur_code, req_code;
  logic              cc_change, cc_changed;
  logic              cc_min, cc_max, clk_int, req_clk, step, sync_out, isolated;
  logic [0:0]        cc_cur_idx;
  logic [1:0]        cc_en;
  changer_state_e    cc_state;
  logic [1:0]        lock_s1, lock_s2;
  logic              idle_idx;
  logic              idle_lock;

  assign idle_idx  = ~cc_cur_idx[0];
  assign idle_lock = lock_s2[idle_idx];

  always_ff @(posedge clk_int or negedge rst_n) begin
    if (!rst_n) begin
      lock_s1 <= '0;
      lock_s2 <= '0;
    end else begin
      lock_s1 <= pll_lock;
      lock_s2 <= lock_s1;
    end
  end

  always_ff @(posedge clk_int or negedge rst_n) begin
    if (!rst_n) begin
      pstate    <= P_IDLE;
      cur_code  <= PROG_W'(RESET_CODE);
      req_code  <= PROG_W'(RESET_CODE);
      prog_data <= '0;
      prog_load <= '0;
      cc_change <= 1'b0;
      changed   <= 1'b0;
    end else begin
      prog_load <= '0;
      cc_change <= 1'b0;
      changed   <= 1'b0;
      unique case (pstate)
        P_IDLE: if (change) begin
          req_code  <= new_clock_value;
          prog_data <= new_clock_value;
          pstate    <= P_PROG;
        end
        P_PROG: begin
          prog_load[idle_idx] <= 1'b1;
          pstate              <= P_UNLOCK;
        end
        P_UNLOCK: if (!idle_lock) pstate <= P_LOCK;
        P_LOCK: if (idle_lock) begin
          cc_change <= 1'b1;
          pstate    <= P_SWITCH;
        end
        P_SWITCH: pstate <= P_WAIT;
        P_WAIT: if (cc_changed) begin
          cur_code <= req_code;
          changed  <= 1'b1;
          pstate   <= P_IDLE;
        end
        default: pstate <= P_IDLE;
      endcase
    end
  end

  clock_changer #(.N_CLK(2), .RESET_IDX(0)) u_changer (
    .pll_clk        (pll_clk),
    .rst_n          (rst_n),
    .change         (cc_change),
    .new_clock_value(idle_idx),
    .min_ck         (cc_min),
    .max_ck         (cc_max),
    .changed        (cc_changed),
    .sys_clk        (sys_clk),
    .clk_int        (clk_int),
    .req_clk        (req_clk),
    .step           (step),
    .sync_out       (sync_out),
    .cur_idx        (cc_cur_idx),
    .clk_en         (cc_en),
    .isolated       (isolated),
    .state          (cc_state)
  );

  assign min_ck = (cur_code == PROG_W'(MIN_CODE));
  assign max_ck = (cur_code == PROG_W'(MAX_CODE));
  assign busy   = (pstate != P_IDLE);

  // Requests only while idle.
  a_change_when_idle: assert property (@(posedge clk_int) disable iff (!rst_n)
    change |-> (pstate == P_IDLE));

endmodule
