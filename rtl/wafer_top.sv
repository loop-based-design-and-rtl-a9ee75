// wafer_top: a wafer of COLS x ROWS cells harvested into one linear array.
//
// Two parts share the cells. The loop array holds every cell's loop
// multiplexors and their controllers (loop_array for three-, four- and
// eight-neighbour loops with 2-to-1 multiplexors, hex_array for
// six-neighbour loops with 3-to-1 multiplexors, corner_array for
// eight-neighbour loops with 4-to-1 and 2-to-1 multiplexors, chosen by NBR
// and MUX4); activating pairs of multiplexors
// merges the per-cell loops into one loop, which is the linear array, and
// the external pads at cell (1,1) let data in and out of it. parallel_diag
// holds every cell's boundary-scan test logic, driven in pipelined
// fashion so that all cells are tested at once and each flags itself
// faulty. The cells' own logic is not part of this design: its loop
// ports (core_*) and its scan ports (stim/resp) are brought out.
//
// Use: after reset each cell is a closed loop. Diagnose the cells through
// the tms/tv/exp pins (tck = clk). Then either pipe in the multiplexor
// controls computed by the tester (cfg_* pins), or raise grow_i to let
// the cells build a spanning tree from the pad cell; with use_diag_i set,
// cells that failed diagnosis are left out of the tree, which links every
// good cell reachable through good cells. The coupling of the diagnosis
// flags to tree growth is this design's own; the paper's tester reads the
// flags and computes the controls itself.
module wafer_top #(
  parameter int unsigned COLS     = 16,
  parameter int unsigned ROWS     = 16,
  parameter int unsigned W        = 8,
  parameter int unsigned NBR      = 4,    // 3, 4, 6 or 8 neighbours
  parameter bit          MUX4     = 1'b0, // NBR = 8: 4-to-1 corner junctions
  parameter int unsigned SCAN_LEN = 16,
  localparam int unsigned N       = COLS * ROWS
) (
  input  logic                clk,
  input  logic                rst_n,
  // reconfiguration
  input  logic                loop_clr_i,
  input  logic                grow_i,
  input  logic                use_diag_i,
  input  logic                cfg_shift_i,
  input  logic                cfg_update_i,
  input  logic                cfg_si_i,
  output logic                cfg_so_o,
  output logic [N-1:0]        conn_o,
  output logic [NBR-1:0]      sel_o [N],   // NBR = 6, MUX4: 2 bits per multiplexor
  // linear array data path
  input  logic [W-1:0]        pad_in_i,
  output logic [W-1:0]        pad_out_o,
  input  logic [W-1:0]        core_out_i [N],
  output logic [W-1:0]        core_in_o  [N],
  // parallel diagnosis
  input  logic                trst_n,
  input  logic                tms_i,
  input  logic                tv_i,
  input  logic                exp_en_i,
  input  logic                exp_i,
  output logic                tms_o,
  output logic                tv_o,
  output logic                exp_en_o,
  output logic                exp_o,
  output logic [SCAN_LEN-1:0] stim_o [N],
  input  logic [SCAN_LEN-1:0] resp_i [N],
  output logic [N-1:0]        tdo_o,
  output logic [N-1:0]        fail_o
);

  logic [N-1:0] ok;
  assign ok = ~(fail_o & {N{use_diag_i}});

  if (NBR == 6) begin : g_hex
    hex_array #(.COLS(COLS), .ROWS(ROWS), .W(W)) u_array (
      .clk, .rst_n,
      .loop_clr_i, .grow_i,
      .ok_i (ok),
      .cfg_shift_i, .cfg_update_i, .cfg_si_i, .cfg_so_o,
      .core_out_i, .core_in_o,
      .pad_in_i, .pad_out_o,
      .conn_o, .sel_o
    );
  end else if (NBR == 8 && MUX4) begin : g_corner
    corner_array #(.COLS(COLS), .ROWS(ROWS), .W(W)) u_array (
      .clk, .rst_n,
      .loop_clr_i, .grow_i,
      .ok_i (ok),
      .cfg_shift_i, .cfg_update_i, .cfg_si_i, .cfg_so_o,
      .core_out_i, .core_in_o,
      .pad_in_i, .pad_out_o,
      .conn_o, .sel_o
    );
  end else begin : g_grid
    loop_array #(.COLS(COLS), .ROWS(ROWS), .W(W), .NBR(NBR)) u_array (
      .clk, .rst_n,
      .loop_clr_i, .grow_i,
      .ok_i (ok),
      .cfg_shift_i, .cfg_update_i, .cfg_si_i, .cfg_so_o,
      .core_out_i, .core_in_o,
      .pad_in_i, .pad_out_o,
      .conn_o, .sel_o
    );
  end

  parallel_diag #(.N(N), .SCAN_LEN(SCAN_LEN)) u_diag (
    .tck (clk), .trst_n,
    .tms_i, .tv_i, .exp_en_i, .exp_i,
    .tms_o, .tv_o, .exp_en_o, .exp_o,
    .stim_o, .resp_i, .tdo_o, .fail_o
  );

endmodule
