// tap_tracker: local copy of the flash PROM's TAP controller state.
//
// The programmer never reads the PROM's TAP state back; it follows it by
// applying the IEEE 1149.1 next-state function to every TMS value it sends.
// From that state and a requested target (one of the four stable states or a
// shift state) it offers the TMS value that moves the TAP one step along the
// usual SVF route, so that the state machine can walk from any stable state to
// any other (4 x 4 = 16 stable-to-stable transitions) or into Shift-DR/IR.
//
// Interface: `step` is high for one clock when a TCK period with TMS = `tms`
// has been committed to the pins; `state` updates on the next clock edge.
// `tms_next` and `at_target` are combinational in `state` and `target`.
// Reset puts the copy in Test-Logic-Reset, this design's choice; a STATE
// RESET command (five TMS=1 clocks) brings the real TAP there from anywhere.
module tap_tracker
  import jtag_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step,
  input  logic       tms,
  input  tap_state_t target,
  output tap_state_t state,
  output logic       tms_next,
  output logic       at_target
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= TAP_RESET;
    else if (step) state <= tap_next(state, tms);
  end

  always_comb begin
    tms_next  = tms_toward(state, target);
    at_target = (state == target);
  end

endmodule
