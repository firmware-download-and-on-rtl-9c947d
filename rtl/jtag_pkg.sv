// jtag_pkg: types and constants shared by the on-board PROM programmer.
//
// It holds the sixteen states of an IEEE 1149.1 TAP controller, the TAP
// next-state function, the routing rule that picks the TMS value taking the
// TAP one step closer to a wanted state, and the opcodes of the compact
// command stream that the state machine executes.
//
// The opcode nibbles (SDR 0100, SDRMASK 0110, SDRMASK1 0010, SIR 0011,
// SIRMASK 0101, SIRMASK1 0001, STATE 1111, RUNTEST 1011) follow the protocol
// definition. The 4-bit numbers used for TAP states, and thus for the end-state
// nibble of each command, are this design's choice: the encoding commonly used
// for 1149.1 TAP controllers (RESET=F, IDLE=C, DRPAUSE=3, IRPAUSE=B, ...).
package jtag_pkg;

  typedef enum logic [3:0] {
    TAP_EXIT2_DR  = 4'h0,
    TAP_EXIT1_DR  = 4'h1,
    TAP_SHIFT_DR  = 4'h2,
    TAP_PAUSE_DR  = 4'h3,
    TAP_SELECT_IR = 4'h4,
    TAP_UPDATE_DR = 4'h5,
    TAP_CAPTURE_DR= 4'h6,
    TAP_SELECT_DR = 4'h7,
    TAP_EXIT2_IR  = 4'h8,
    TAP_EXIT1_IR  = 4'h9,
    TAP_SHIFT_IR  = 4'hA,
    TAP_PAUSE_IR  = 4'hB,
    TAP_IDLE      = 4'hC,
    TAP_UPDATE_IR = 4'hD,
    TAP_CAPTURE_IR= 4'hE,
    TAP_RESET     = 4'hF
  } tap_state_t;

  // Command opcodes: upper nibble of the first byte of every command.
  typedef enum logic [3:0] {
    OP_SIRMASK1 = 4'b0001,
    OP_SDRMASK1 = 4'b0010,
    OP_SIR      = 4'b0011,
    OP_SDR      = 4'b0100,
    OP_SIRMASK  = 4'b0101,
    OP_SDRMASK  = 4'b0110,
    OP_RUNTEST  = 4'b1011,
    OP_STATE    = 4'b1111
  } opcode_t;

  // One TCK period worth of work for the JTAG pin driver: the TMS and TDI
  // values to present, and whether the TDO bit sampled in that period is to
  // be returned for checking.
  typedef struct packed {
    logic tms;
    logic tdi;
    logic cap;
  } bit_op_t;

  // C-Link command byte that arms the programmer (this design's choice).
  localparam logic [7:0] CLINK_CMD_PROGRAM = 8'h50;

  // Status word bit positions. Bits 0 and 1 follow the protocol definition,
  // the others are this design's additions.
  localparam int ST_ERR_TYPE = 0;  // 1: TDO mismatch, 0: stream/command error
  localparam int ST_ERR      = 1;  // an error is latched
  localparam int ST_BUSY     = 2;  // state machine still working on the chunk
  localparam int ST_OVERFLOW = 3;  // a byte arrived while the buffer was full
  localparam int ST_ARMED    = 4;  // programmer accepts C-Link data

  // One of the four SVF stable states.
  function automatic logic is_stable(input logic [3:0] s);
    return s == TAP_RESET || s == TAP_IDLE || s == TAP_PAUSE_DR || s == TAP_PAUSE_IR;
  endfunction

  // IEEE 1149.1 TAP controller next state.
  function automatic tap_state_t tap_next(input tap_state_t s, input logic tms);
    unique case (s)
      TAP_RESET:      return tms ? TAP_RESET     : TAP_IDLE;
      TAP_IDLE:       return tms ? TAP_SELECT_DR : TAP_IDLE;
      TAP_SELECT_DR:  return tms ? TAP_SELECT_IR : TAP_CAPTURE_DR;
      TAP_CAPTURE_DR: return tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_SHIFT_DR:   return tms ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_EXIT1_DR:   return tms ? TAP_UPDATE_DR : TAP_PAUSE_DR;
      TAP_PAUSE_DR:   return tms ? TAP_EXIT2_DR  : TAP_PAUSE_DR;
      TAP_EXIT2_DR:   return tms ? TAP_UPDATE_DR : TAP_SHIFT_DR;
      TAP_UPDATE_DR:  return tms ? TAP_SELECT_DR : TAP_IDLE;
      TAP_SELECT_IR:  return tms ? TAP_RESET     : TAP_CAPTURE_IR;
      TAP_CAPTURE_IR: return tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_SHIFT_IR:   return tms ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_EXIT1_IR:   return tms ? TAP_UPDATE_IR : TAP_PAUSE_IR;
      TAP_PAUSE_IR:   return tms ? TAP_EXIT2_IR  : TAP_PAUSE_IR;
      TAP_EXIT2_IR:   return tms ? TAP_UPDATE_IR : TAP_SHIFT_IR;
      TAP_UPDATE_IR:  return tms ? TAP_SELECT_DR : TAP_IDLE;
      default:        return TAP_RESET;
    endcase
  endfunction

  // TMS value that moves the TAP one step toward target. Targets are the four
  // stable states and the two shift states; the routes are the usual SVF
  // ones (e.g. IDLE->Select-DR->Capture-DR->Shift-DR, Exit1->Update->IDLE,
  // Pause-DR->Exit2-DR->Shift-DR). When s == target the value keeps it there.
  function automatic logic tms_toward(input tap_state_t s, input tap_state_t target);
    logic dr_side, ir_side;
    dr_side = (target == TAP_SHIFT_DR) || (target == TAP_PAUSE_DR);
    ir_side = (target == TAP_SHIFT_IR) || (target == TAP_PAUSE_IR);
    if (target == TAP_RESET) return 1'b1;
    unique case (s)
      TAP_RESET:      return 1'b0;
      TAP_IDLE:       return target != TAP_IDLE;
      TAP_SELECT_DR:  return !dr_side;
      TAP_SELECT_IR:  return !ir_side;
      TAP_CAPTURE_DR,
      TAP_CAPTURE_IR: return !(target == TAP_SHIFT_DR || target == TAP_SHIFT_IR);
      TAP_SHIFT_DR:   return target != TAP_SHIFT_DR;
      TAP_SHIFT_IR:   return target != TAP_SHIFT_IR;
      TAP_EXIT1_DR:   return !dr_side;
      TAP_EXIT1_IR:   return !ir_side;
      TAP_PAUSE_DR:   return target != TAP_PAUSE_DR;
      TAP_PAUSE_IR:   return target != TAP_PAUSE_IR;
      TAP_EXIT2_DR:   return target != TAP_SHIFT_DR;
      TAP_EXIT2_IR:   return target != TAP_SHIFT_IR;
      TAP_UPDATE_DR,
      TAP_UPDATE_IR:  return target != TAP_IDLE;
      default:        return 1'b1;
    endcase
  endfunction

endpackage
