// Shared types of the reconfigurable clock generator.
//
// changer_state_e is the state encoding of the clock changer's sequencing
// state machine (see changer_fsm.sv). The encoding is a design choice; only
// the order of the phases (isolate, step, restore, clean-up) follows the
// described operation of the clock changer.
package clkgen_pkg;

  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,  // running on the current clock, waiting for "change"
    ST_ISOLATE = 3'd1,  // system clock being stopped low, requested clock selected
    ST_STEP    = 3'd2,  // step signal high; the next edge is the requested clock's
    ST_CLEAN   = 3'd3,  // system clock re-enabled; waiting for the synchroniser to clear
    ST_DONE    = 3'd4   // "changed" pulse
  } changer_state_e;

endpackage
