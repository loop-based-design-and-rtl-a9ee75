// loop_array: a COLS x ROWS wafer of cells with loop interconnections.
//
// Every cell has L = NBR two-input multiplexors (loop_mux_chain) and its
// own controller (mux_ctrl). The multiplexor m_i on one side of a cell
// pairs with the m_i of the neighbour on that side (loop_pkg gives the
// side of each subscript); with NBR = 3 the m_4 multiplexors and their
// interconnections are left out, with NBR = 8 multiplexors m_5 .. m_8 link
// the four diagonal neighbours as well (eight 2-to-1 multiplexors, two
// four-neighbour patterns in one ring). Activating a pair (both cells select the
// neighbour) merges the two cells' loops. The cells' own logic (memory or
// processor) is outside: core_out_i[c] is what cell c puts on its loop and
// core_in_o[c] what it receives, so the active loop is the linear array.
// Cell c = (y-1)*COLS + (x-1).
//
// The external pads sit on the north side of cell (1,1), in place of the
// interconnection of its m_1: pad_in_i enters that multiplexor's neighbour
// input and pad_out_o is the signal arriving at it from the cell's own
// loop. For tree growth the pads count as a connected neighbour, so cell
// (1,1) is always the root. Sides on the wafer edge have no neighbour and
// their multiplexors are held on their own loop.
//
// The piped-in control chain runs through the cells in order c = 0..N-1,
// each contributing L bits (first bit in ends in m_L's control of the
// last cell). The data path is combinational: between logically adjacent
// cells a word crosses exactly L multiplexors. A lint tool that tracks
// whole arrays may report a circular path through the loop signals; the
// path only runs from m_(i+1) to m_i, so no real combinational loop
// exists for any setting.
module loop_array
  import loop_pkg::*;
#(
  parameter int unsigned COLS = 16,
  parameter int unsigned ROWS = 16,
  parameter int unsigned W    = 8,
  parameter int unsigned NBR  = 4,        // 3, 4 or 8 neighbours
  localparam int unsigned N   = COLS * ROWS,
  localparam int unsigned L   = NBR
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
  output logic [L-1:0] sel_o [N]
);

  localparam int unsigned PAD_LVL = side_level(1, 1, DIR_N);

  logic [N:0] cfg_chain;
  assign cfg_chain[0] = cfg_si_i;
  assign cfg_so_o     = cfg_chain[N];

  for (genvar c = 0; c < N; c++) begin : g_cell
    localparam int X = c % COLS + 1;
    localparam int Y = c / COLS + 1;

    logic [W-1:0] lp  [L];
    logic [W-1:0] nb  [L][1];
    logic [L-1:0] present, nconn, jin, jout, sel;

    for (genvar i = 0; i < L; i++) begin : g_lvl
      localparam dir_e D  = level_side(X, Y, i + 1);
      localparam int   NX = nbr_x(X, D);
      localparam int   NY = nbr_y(Y, D);
      localparam bit   IS_PAD = (X == 1 && Y == 1 && i + 1 == PAD_LVL);
      localparam bit   HAS = NX >= 1 && NX <= int'(COLS) && NY >= 1 && NY <= int'(ROWS);
      localparam int   NC  = HAS ? (NY - 1) * int'(COLS) + (NX - 1) : 0;
      if (IS_PAD) begin : g_pad
        assign present[i] = 1'b1;
        assign nconn[i]   = 1'b1;
        assign jin[i]     = 1'b0;
        assign nb[i][0]   = pad_in_i;
        assign pad_out_o  = lp[i];
      end else if (HAS) begin : g_nbr
        assign present[i] = 1'b1;
        assign nconn[i]   = g_cell[NC].ctl_conn;
        assign jin[i]     = g_cell[NC].jout[i];
        assign nb[i][0]   = g_cell[NC].lp[i];
      end else begin : g_edge
        assign present[i] = 1'b0;
        assign nconn[i]   = 1'b0;
        assign jin[i]     = 1'b0;
        assign nb[i][0]   = '0;
      end
    end

    logic ctl_conn;
    logic [0:0] sel1 [L];

    mux_ctrl #(.L(L)) u_ctrl (
      .clk, .rst_n,
      .loop_clr_i,
      .grow_i,
      .ok_i          (ok_i[c]),
      .nbr_present_i (present),
      .nbr_conn_i    (nconn),
      .join_i        (jin),
      .conn_o        (ctl_conn),
      .join_o        (jout),
      .cfg_shift_i,
      .cfg_update_i,
      .cfg_si_i      (cfg_chain[c]),
      .cfg_so_o      (cfg_chain[c+1]),
      .sel_o         (sel)
    );

    // Edge multiplexors stay on their own loop whatever the control says.
    for (genvar i = 0; i < L; i++) begin : g_sel
      assign sel1[i] = sel[i] & present[i];
    end

    loop_mux_chain #(.W(W), .L(L), .K(2)) u_mux (
      .core_out_i (core_out_i[c]),
      .core_in_o  (core_in_o[c]),
      .loop_o     (lp),
      .nbr_i      (nb),
      .sel_i      (sel1)
    );

    assign conn_o[c] = ctl_conn;
    assign sel_o[c]  = sel & present;
  end

endmodule
