// diag_cell: boundary-scan test logic of one cell for parallel diagnosis.
//
// The cells are identical, so one sequence of test vectors serves all of
// them. Three pipelined chains run past every cell: TMS (through the
// cell's TAP), the test vectors (the cell's TDI), and the results chain
// that carries the expected test output. Each chain holds one register
// per cell, so cell k sees all three delayed by the same k clocks and
// runs the same test k clocks after cell 0. The comparator C checks the
// cell's TDO against the expected bit whenever the results chain marks it
// valid and latches a mismatch in fail_o, which marks the cell faulty.
//
// Test logic: a TAP controller, a 2-bit instruction register (SCAN = 01
// puts the cell's scan path between TDI and TDO, BYPASS = 11 and every
// other code a one-bit register), and a SCAN_LEN-bit scan path. In
// Capture-DR the scan path loads the cell's response resp_i, in Shift-DR
// it shifts towards TDO (bit 0 leaves first), in Update-DR it drives the
// cell's inputs stim_o. TDO is combinational from the register in use.
// The fail flag clears in Test-Logic-Reset.
//
// The three chains, the TAP per cell and the comparator per cell follow
// the text; instruction codes, scan length, one clock edge and carrying
// an enable beside the expected bit are this design's own choices.
module diag_cell
  import loop_pkg::*;
#(
  parameter int unsigned SCAN_LEN = 16
) (
  input  logic                tck,
  input  logic                trst_n,
  // pipelined chains
  input  logic                tms_i,
  output logic                tms_o,
  input  logic                tv_i,     // test vector bit (the cell's TDI)
  output logic                tv_o,
  input  logic                exp_en_i, // results chain: compare this clock
  input  logic                exp_i,    // results chain: expected TDO
  output logic                exp_en_o,
  output logic                exp_o,
  // cell under test
  output logic [SCAN_LEN-1:0] stim_o,
  input  logic [SCAN_LEN-1:0] resp_i,
  // diagnosis
  output logic                tdo_o,
  output logic                fail_o
);

  logic        rst_s, cap_dr, sh_dr, upd_dr, cap_ir, sh_ir, upd_ir;
  logic [IR_W-1:0]     ir_sr, ir_q;
  logic [SCAN_LEN-1:0] scan_sr;
  logic                byp;

  tap_ctrl u_tap (
    .tck, .trst_n, .tms_i,
    .state_o (), .reset_o (rst_s),
    .capture_dr_o (cap_dr), .shift_dr_o (sh_dr), .update_dr_o (upd_dr),
    .capture_ir_o (cap_ir), .shift_ir_o (sh_ir), .update_ir_o (upd_ir)
  );

  // pipeline registers of the three chains
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tms_o    <= 1'b1;
      tv_o     <= 1'b0;
      exp_en_o <= 1'b0;
      exp_o    <= 1'b0;
    end else begin
      tms_o    <= tms_i;
      tv_o     <= tv_i;
      exp_en_o <= exp_en_i;
      exp_o    <= exp_i;
    end
  end

  // instruction register
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      ir_sr <= IR_CAPTURE;
      ir_q  <= IR_BYPASS;
    end else begin
      if (rst_s)       ir_q  <= IR_BYPASS;
      else if (upd_ir) ir_q  <= ir_sr;
      if (cap_ir)      ir_sr <= IR_CAPTURE;
      else if (sh_ir)  ir_sr <= {tv_i, ir_sr[IR_W-1:1]};
    end
  end

  // data registers
  wire sel_scan = ir_q == IR_SCAN;
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      scan_sr <= '0;
      stim_o  <= '0;
      byp     <= 1'b0;
    end else begin
      if (sel_scan && cap_dr)      scan_sr <= resp_i;
      else if (sel_scan && sh_dr)  scan_sr <= {tv_i, scan_sr[SCAN_LEN-1:1]};
      if (sel_scan && upd_dr)      stim_o  <= scan_sr;
      if (cap_dr)                  byp     <= 1'b0;
      else if (sh_dr)              byp     <= tv_i;
    end
  end

  always_comb begin
    if (sh_ir)                 tdo_o = ir_sr[0];
    else if (sh_dr && sel_scan) tdo_o = scan_sr[0];
    else if (sh_dr)            tdo_o = byp;
    else                       tdo_o = 1'b0;
  end

  // comparator C
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                          fail_o <= 1'b0;
    else if (rst_s)                       fail_o <= 1'b0;
    else if (exp_en_i && tdo_o != exp_i)  fail_o <= 1'b1;
  end

endmodule
