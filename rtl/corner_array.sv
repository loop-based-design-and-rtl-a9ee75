// corner_array: a COLS x ROWS wafer with eight-neighbour loops built from
// two 4-to-1 and two 2-to-1 multiplexors per cell.
//
// The multiplexors sit at the cell corners (loop_pkg gives the geometry).
// At every other corner point the four cells around it meet with a 4-to-1
// multiplexor each, which links a cell with its two orthogonal neighbours
// and one diagonal neighbour there. At the remaining points the two cells
// on each diagonal are linked by a pair of 2-to-1 multiplexors. All
// multiplexors at one point carry the same subscript, every cell has each
// subscript once, and between logically adjacent cells a word crosses
// exactly four multiplexors, m_4 to m_1. A cell uses loop_mux_chain with
// K = 4; at a 2-to-1 position only the diagonal input is connected, so
// the multiplexor reduces to two inputs.
//
// The cells' own logic is outside (core_out_i / core_in_o). The pads
// stand in for the missing cell in slot 0 of the corner junction north-west
// of cell (1,1); for tree growth they count as connected. Partners outside
// the wafer are absent and a multiplexor never selects one. The control
// chain runs through the cells in order c = (y-1)*COLS + (x-1), 2 bits per
// multiplexor (sel_o[c][2(i-1) +: 2] belongs to m_i, 0 = own ring, j = the
// member j slots further on clockwise). A lint tool that tracks whole
// arrays may report a circular path through the ring signals; every path
// runs from m_(i+1) to m_i, so none exists for any setting. Placing the
// multiplexors at corners, the subscripts and the pads follow this
// design's own reading of the alternative eight-neighbour loop layout.
module corner_array
  import loop_pkg::*;
#(
  parameter int unsigned COLS = 16,
  parameter int unsigned ROWS = 16,
  parameter int unsigned W    = 8,
  localparam int unsigned N   = COLS * ROWS,
  localparam int unsigned L   = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         loop_clr_i,
  input  logic         grow_i,
  input  logic [N-1:0] ok_i,
  input  logic         cfg_shift_i,
  input  logic         cfg_update_i,
  input  logic         cfg_si_i,
  output logic         cfg_so_o,
  input  logic [W-1:0] core_out_i [N],
  output logic [W-1:0] core_in_o  [N],
  input  logic [W-1:0] pad_in_i,
  output logic [W-1:0] pad_out_o,
  output logic [N-1:0] conn_o,
  output logic [2*L-1:0] sel_o [N]
);

  logic [N:0] cfg_chain;
  assign cfg_chain[0] = cfg_si_i;
  assign cfg_so_o     = cfg_chain[N];

  for (genvar c = 0; c < N; c++) begin : g_cell
    localparam int X = c % COLS + 1;
    localparam int Y = c / COLS + 1;

    logic [W-1:0] lp  [L];
    logic [W-1:0] nb  [L][3];
    logic         pres [L][3];
    logic         pcon [L][3];
    logic         pav  [L][3];
    logic [1:0]   psel [L][3];
    logic         pjn  [L][3];
    logic         jo   [L][3];
    logic [1:0]   slot [L];
    logic [1:0]   sel3 [L];   // controller settings, before masking
    logic [1:0]   msel [L];
    logic         ctl_conn, avail;

    for (genvar i = 0; i < L; i++) begin : g_lvl
      localparam int S  = cr_slot(X, Y, i + 1);
      localparam int PX = cr_px(X, S);
      localparam int PY = cr_py(Y, S);
      assign slot[i] = 2'(S);
      for (genvar j = 0; j < 3; j++) begin : g_p
        localparam int PS  = (S + j + 1) % 4;
        localparam int MX  = cr_mem_x(PX, PS);
        localparam int MY  = cr_mem_y(PY, PS);
        localparam bit HAS = MX >= 1 && MX <= int'(COLS) && MY >= 1 && MY <= int'(ROWS) &&
                             (cr_four(PX, PY) || j == 1);
        localparam bit PAD = X == 1 && Y == 1 && S == 2 && PS == 0;
        localparam int MC  = HAS ? (MY - 1) * int'(COLS) + (MX - 1) : 0;
        localparam int K   = (S - PS + 4) % 4 - 1;   // my partner index there
        if (PAD) begin : g_pad
          assign pres[i][j] = 1'b1;
          assign pcon[i][j] = 1'b1;
          assign pav[i][j]  = 1'b0;
          assign psel[i][j] = 2'd0;
          assign pjn[i][j]  = 1'b0;
          assign nb[i][j]   = pad_in_i;
          assign pad_out_o  = lp[i];
        end else if (HAS) begin : g_mem
          assign pres[i][j] = 1'b1;
          assign pcon[i][j] = g_cell[MC].ctl_conn;
          assign pav[i][j]  = g_cell[MC].avail;
          assign psel[i][j] = g_cell[MC].sel3[i];
          assign pjn[i][j]  = g_cell[MC].jo[i][K];
          assign nb[i][j]   = g_cell[MC].lp[i];
        end else begin : g_none
          assign pres[i][j] = 1'b0;
          assign pcon[i][j] = 1'b0;
          assign pav[i][j]  = 1'b0;
          assign psel[i][j] = 2'd0;
          assign pjn[i][j]  = 1'b0;
          assign nb[i][j]   = '0;
        end
      end
      // never select an absent partner
      assign msel[i] = (sel3[i] == 2'd1 && pres[i][0]) ? 2'd1 :
                       (sel3[i] == 2'd2 && pres[i][1]) ? 2'd2 :
                       (sel3[i] == 2'd3 && pres[i][2]) ? 2'd3 : 2'd0;
      assign sel_o[c][2*i +: 2] = msel[i];
    end

    mux_ctrl4 #(.L(L)) u_ctrl (
      .clk, .rst_n, .loop_clr_i, .grow_i,
      .ok_i        (ok_i[c]),
      .slot_i      (slot),
      .p_present_i (pres),
      .p_conn_i    (pcon),
      .p_avail_i   (pav),
      .p_sel_i     (psel),
      .p_join_i    (pjn),
      .conn_o      (ctl_conn),
      .avail_o     (avail),
      .join_o      (jo),
      .cfg_shift_i, .cfg_update_i,
      .cfg_si_i    (cfg_chain[c]),
      .cfg_so_o    (cfg_chain[c+1]),
      .sel_o       (sel3)
    );

    loop_mux_chain #(.W(W), .L(L), .K(4)) u_mux (
      .core_out_i (core_out_i[c]),
      .core_in_o  (core_in_o[c]),
      .loop_o     (lp),
      .nbr_i      (nb),
      .sel_i      (msel)
    );

    assign conn_o[c] = ctl_conn;
  end

endmodule
