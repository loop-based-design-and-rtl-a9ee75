// tap_ctrl: test access port controller of one cell (IEEE 1149.1).
//
// The sixteen-state controller of the boundary-scan standard, advanced by
// TMS on every rising edge of the test clock; an asynchronous active-low
// reset (TRST) forces Test-Logic-Reset, as five clocks with TMS high also
// do. It decodes the strobes that the instruction and data registers of
// the cell use: capture, shift and update of either register, and the
// reset state. The state graph is the standard's; the use of one clock
// edge for everything (TDO is not retimed to the falling edge) is this
// design's own simplification.
module tap_ctrl
  import loop_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms_i,
  output tap_state_e state_o,
  output logic       reset_o,
  output logic       capture_dr_o,
  output logic       shift_dr_o,
  output logic       update_dr_o,
  output logic       capture_ir_o,
  output logic       shift_ir_o,
  output logic       update_ir_o
);

  tap_state_e nxt;

  always_comb begin
    unique case (state_o)
      TAP_RESET:      nxt = tms_i ? TAP_RESET     : TAP_IDLE;
      TAP_IDLE:       nxt = tms_i ? TAP_SEL_DR    : TAP_IDLE;
      TAP_SEL_DR:     nxt = tms_i ? TAP_SEL_IR    : TAP_CAPTURE_DR;
      TAP_CAPTURE_DR: nxt = tms_i ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_SHIFT_DR:   nxt = tms_i ? TAP_EXIT1_DR  : TAP_SHIFT_DR;
      TAP_EXIT1_DR:   nxt = tms_i ? TAP_UPDATE_DR : TAP_PAUSE_DR;
      TAP_PAUSE_DR:   nxt = tms_i ? TAP_EXIT2_DR  : TAP_PAUSE_DR;
      TAP_EXIT2_DR:   nxt = tms_i ? TAP_UPDATE_DR : TAP_SHIFT_DR;
      TAP_UPDATE_DR:  nxt = tms_i ? TAP_SEL_DR    : TAP_IDLE;
      TAP_SEL_IR:     nxt = tms_i ? TAP_RESET     : TAP_CAPTURE_IR;
      TAP_CAPTURE_IR: nxt = tms_i ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_SHIFT_IR:   nxt = tms_i ? TAP_EXIT1_IR  : TAP_SHIFT_IR;
      TAP_EXIT1_IR:   nxt = tms_i ? TAP_UPDATE_IR : TAP_PAUSE_IR;
      TAP_PAUSE_IR:   nxt = tms_i ? TAP_EXIT2_IR  : TAP_PAUSE_IR;
      TAP_EXIT2_IR:   nxt = tms_i ? TAP_UPDATE_IR : TAP_SHIFT_IR;
      TAP_UPDATE_IR:  nxt = tms_i ? TAP_SEL_DR    : TAP_IDLE;
      default:        nxt = TAP_RESET;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state_o <= TAP_RESET;
    else         state_o <= nxt;
  end

  assign reset_o      = state_o == TAP_RESET;
  assign capture_dr_o = state_o == TAP_CAPTURE_DR;
  assign shift_dr_o   = state_o == TAP_SHIFT_DR;
  assign update_dr_o  = state_o == TAP_UPDATE_DR;
  assign capture_ir_o = state_o == TAP_CAPTURE_IR;
  assign shift_ir_o   = state_o == TAP_SHIFT_IR;
  assign update_ir_o  = state_o == TAP_UPDATE_IR;

endmodule
