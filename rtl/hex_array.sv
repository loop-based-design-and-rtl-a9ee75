// hex_array: a COLS x ROWS wafer with six-neighbour loops.
//
// Even rows are shifted east by half a cell, so every cell has six
// neighbours. Each cell has three 3-to-1 multiplexors (loop_mux_chain with
// K = 3) and a controller (mux_ctrl3). Three cells meet at every
// multiplexor position and their three multiplexors there carry the same
// subscript (loop_pkg gives the junctions and subscripts); each
// multiplexor links its cell with two neighbours. Between logically
// adjacent cells a word crosses exactly three multiplexors, m_3, m_2, m_1.
//
// The cells' own logic is outside (core_out_i / core_in_o). The pads
// stand in for the missing top cell of the junction in which cell (1,1)
// takes slot 2; for tree growth they count as connected. Partners outside
// the wafer are absent and a multiplexor never selects one. The control
// chain runs through the cells in order c = (y-1)*COLS + (x-1), 2 bits per
// multiplexor (sel_o[c][2(i-1) +: 2] belongs to m_i, 0 = own ring,
// 1 / 2 = the partner one / two slots further on). A lint tool that
// tracks whole arrays may report a circular path through the ring
// signals; every path runs from m_(i+1) to m_i, so none exists for any
// setting.
module hex_array
  import loop_pkg::*;
#(
  parameter int unsigned COLS = 16,
  parameter int unsigned ROWS = 16,
  parameter int unsigned W    = 8,
  localparam int unsigned N   = COLS * ROWS,
  localparam int unsigned L   = 3
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
    logic [W-1:0] nb  [L][2];
    logic         pres [L][2];
    logic         pcon [L][2];
    logic         pav  [L][2];
    logic [1:0]   psel [L][2];
    logic         pjn  [L][2];
    logic         jo   [L][2];
    logic [1:0]   slot [L];
    logic [1:0]   sel3 [L];
    logic [1:0]   msel [L];
    logic         ctl_conn, avail;

    for (genvar i = 0; i < L; i++) begin : g_lvl
      localparam int S  = hex_slot(X, Y, i + 1);
      localparam int TX = hex_top_x(X, Y, S);
      localparam int TY = hex_top_y(Y, S);
      assign slot[i] = 2'(S);
      for (genvar j = 0; j < 2; j++) begin : g_p
        localparam int PS  = (S + j + 1) % 3;
        localparam int MX  = hex_mem_x(TX, TY, PS);
        localparam int MY  = hex_mem_y(TY, PS);
        localparam bit HAS = MX >= 1 && MX <= int'(COLS) && MY >= 1 && MY <= int'(ROWS);
        localparam bit PAD = X == 1 && Y == 1 && S == 2 && PS == 0;
        localparam int MC  = HAS ? (MY - 1) * int'(COLS) + (MX - 1) : 0;
        localparam int K   = (S - PS + 3) % 3 - 1;   // my partner index there
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
                       (sel3[i] == 2'd2 && pres[i][1]) ? 2'd2 : 2'd0;
      assign sel_o[c][2*i +: 2] = msel[i];
    end

    mux_ctrl3 #(.L(L)) u_ctrl (
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

    loop_mux_chain #(.W(W), .L(L), .K(3)) u_mux (
      .core_out_i (core_out_i[c]),
      .core_in_o  (core_in_o[c]),
      .loop_o     (lp),
      .nbr_i      (nb),
      .sel_i      (msel)
    );

    assign conn_o[c] = ctl_conn;
  end

endmodule
