// loop_pkg: shared types and geometry of the loop-based defect-tolerant array.
//
// Cells sit on a rectilinear grid, column x = 1..COLS (west to east) and
// row y = 1..ROWS (north to south). Every cell owns multiplexors m_1..m_L
// placed around its border; an interconnection between two neighbouring
// cells always pairs the two multiplexors with the same subscript.
// Which subscript serves which side of a cell follows the labels of the
// grid-graph model of the four-neighbour design: horizontal edges
// alternate m_2 / m_4 along a row and vertical edges alternate m_1 / m_3
// in a checkerboard, so every cell has exactly one multiplexor per side.
// The three-neighbour variant is the same grid with every m_4 removed.
// The eight-neighbour variant with eight 2-to-1 multiplexors adds a second
// four-neighbour pattern on the diagonals: north-east / south-west links
// alternate m_6 / m_8 and south-east / north-west links alternate m_5 / m_7
// along the columns.
package loop_pkg;

  typedef enum logic [2:0] {
    DIR_N  = 3'd0, DIR_E  = 3'd1, DIR_S  = 3'd2, DIR_W  = 3'd3,
    DIR_NE = 3'd4, DIR_SE = 3'd5, DIR_SW = 3'd6, DIR_NW = 3'd7
  } dir_e;

  // Subscript (1..8) of the multiplexor on side d of cell (x, y).
  function automatic int unsigned side_level(int x, int y, dir_e d);
    case (d)
      DIR_NE:  return (x % 2 == 1) ? 6 : 8;
      DIR_SW:  return ((x - 1) % 2 == 1) ? 6 : 8;
      DIR_SE:  return (x % 2 == 1) ? 5 : 7;
      DIR_NW:  return ((x - 1) % 2 == 1) ? 5 : 7;
      DIR_E:   return (x % 2 == 1) ? 2 : 4;
      DIR_W:   return ((x - 1) % 2 == 1) ? 2 : 4;
      DIR_S:   return ((x + y) % 2 == 1) ? 1 : 3;
      default: return ((x + y - 1) % 2 == 1) ? 1 : 3;  // DIR_N
    endcase
  endfunction

  // Side of cell (x, y) served by multiplexor m_lvl.
  function automatic dir_e level_side(int x, int y, int unsigned lvl);
    dir_e r;
    r = DIR_N;
    for (int d = 0; d < 8; d++)
      if (side_level(x, y, dir_e'(d)) == lvl) r = dir_e'(d);
    return r;
  endfunction

  // Neighbour coordinates in direction d.
  function automatic int nbr_x(int x, dir_e d);
    case (d)
      DIR_E, DIR_NE, DIR_SE: return x + 1;
      DIR_W, DIR_NW, DIR_SW: return x - 1;
      default:               return x;
    endcase
  endfunction
  function automatic int nbr_y(int y, dir_e d);
    case (d)
      DIR_S, DIR_SE, DIR_SW: return y + 1;
      DIR_N, DIR_NE, DIR_NW: return y - 1;
      default:               return y;
    endcase
  endfunction

  // ---- six-neighbour wafer -------------------------------------------
  // Even rows are shifted east by half a cell, so cell (x, y) touches
  // E, W and two cells in each neighbouring row. Three cells meet at each
  // multiplexor position (a junction): a cell T on top and its south-west
  // and south-east neighbours below (slots 0, 1, 2). Every cell belongs to
  // three junctions: the one it tops (slot 0), the one topped by its
  // north-east neighbour (slot 1) and the one topped by its north-west
  // neighbour (slot 2); together they reach all six neighbours. The
  // junction topped by cell (x, y) uses subscript (p mod 3) + 1 with
  // p = 2x + (1 if y is even), which gives each cell three different
  // subscripts and all three cells of a junction the same one.

  function automatic int hex_p(int x, int y);
    return 2 * x + ((y % 2 == 0) ? 1 : 0);
  endfunction
  function automatic int hex_sw_x(int x, int y);   // south-west neighbour
    return (y % 2 == 0) ? x : x - 1;
  endfunction
  function automatic int hex_se_x(int x, int y);   // south-east neighbour
    return (y % 2 == 0) ? x + 1 : x;
  endfunction
  function automatic int hex_ne_x(int x, int y);   // north-east neighbour
    return (y % 2 == 0) ? x + 1 : x;
  endfunction
  function automatic int hex_nw_x(int x, int y);   // north-west neighbour
    return (y % 2 == 0) ? x : x - 1;
  endfunction

  // Slot (0..2) that cell (x, y) takes in its junction of subscript lvl.
  function automatic int hex_slot(int x, int y, int lvl);
    return ((lvl - 1) - (hex_p(x, y) % 3) + 3) % 3;
  endfunction
  // Top cell of the junction in which cell (x, y) takes slot s.
  function automatic int hex_top_x(int x, int y, int s);
    return (s == 0) ? x : (s == 1) ? hex_ne_x(x, y) : hex_nw_x(x, y);
  endfunction
  function automatic int hex_top_y(int y, int s);
    return (s == 0) ? y : y - 1;
  endfunction
  // Member in slot s of the junction topped by (tx, ty).
  function automatic int hex_mem_x(int tx, int ty, int s);
    return (s == 0) ? tx : (s == 1) ? hex_sw_x(tx, ty) : hex_se_x(tx, ty);
  endfunction
  function automatic int hex_mem_y(int ty, int s);
    return (s == 0) ? ty : ty + 1;
  endfunction

  // ---- eight-neighbour wafer with corner junctions -------------------
  // Multiplexors sit at cell corners. A corner point (px, py), px = 0..COLS,
  // py = 0..ROWS, is shared by up to four cells; the cell whose corner k it
  // is takes slot k there (k: 0 = its south-east corner, 1 = south-west,
  // 2 = north-west, 3 = north-east; slots run clockwise from the north-west
  // cell of the point). Points with px + py even are four-way junctions of
  // 4-to-1 multiplexors (subscript 2 if px is even, else 4); the others hold
  // two diagonal pairs of 2-to-1 multiplexors, slots 0/2 and 1/3
  // (subscript 1 if px is even, else 3). Every cell gets each of the four
  // subscripts at exactly one of its corners.

  function automatic int cr_px(int x, int k);
    return (k == 0 || k == 3) ? x : x - 1;
  endfunction
  function automatic int cr_py(int y, int k);
    return (k == 0 || k == 1) ? y : y - 1;
  endfunction
  function automatic bit cr_four(int px, int py);
    return (px + py) % 2 == 0;
  endfunction
  function automatic int cr_lvl(int px, int py);
    if (cr_four(px, py)) return (px % 2 == 0) ? 2 : 4;
    return (px % 2 == 0) ? 1 : 3;
  endfunction
  // Slot (= corner) of cell (x, y) at its multiplexor of subscript lvl.
  function automatic int cr_slot(int x, int y, int lvl);
    for (int k = 0; k < 4; k++)
      if (cr_lvl(cr_px(x, k), cr_py(y, k)) == lvl) return k;
    return 0;
  endfunction
  // Cell in slot s of point (px, py).
  function automatic int cr_mem_x(int px, int s);
    return (s == 1 || s == 2) ? px + 1 : px;
  endfunction
  function automatic int cr_mem_y(int py, int s);
    return (s == 2 || s == 3) ? py + 1 : py;
  endfunction

  // JTAG TAP controller states (IEEE 1149.1).
  typedef enum logic [3:0] {
    TAP_RESET      = 4'h0, TAP_IDLE       = 4'h1,
    TAP_SEL_DR     = 4'h2, TAP_CAPTURE_DR = 4'h3, TAP_SHIFT_DR = 4'h4,
    TAP_EXIT1_DR   = 4'h5, TAP_PAUSE_DR   = 4'h6, TAP_EXIT2_DR = 4'h7,
    TAP_UPDATE_DR  = 4'h8,
    TAP_SEL_IR     = 4'h9, TAP_CAPTURE_IR = 4'hA, TAP_SHIFT_IR = 4'hB,
    TAP_EXIT1_IR   = 4'hC, TAP_PAUSE_IR   = 4'hD, TAP_EXIT2_IR = 4'hE,
    TAP_UPDATE_IR  = 4'hF
  } tap_state_e;

  // Instructions of the per-cell test logic (2-bit instruction register).
  localparam int IR_W = 2;
  typedef enum logic [IR_W-1:0] {
    IR_SCAN   = 2'b01,   // cell scan path between TDI and TDO
    IR_BYPASS = 2'b11    // one-bit bypass register
  } instr_e;
  localparam logic [IR_W-1:0] IR_CAPTURE = 2'b01;

endpackage
