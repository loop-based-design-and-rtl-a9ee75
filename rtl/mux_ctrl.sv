// mux_ctrl: the control of one cell's L two-input loop multiplexors.
//
// Each cell controls its own multiplexors (sel_o[i-1] = 1 makes m_i take
// the neighbour's signal, i.e. makes that side's interconnection active
// when the neighbour does the same). Three ways of setting them:
//
//  * Power-up / loop_clr_i: every multiplexor selects its own loop, so
//    the cell alone forms a closed loop and no cell is connected.
//  * Tree growth (grow_i high): starting from the cell whose pads stand in
//    for one neighbour (that neighbour reports itself connected), an
//    unconnected cell that is allowed to join (ok_i) and sees at least one
//    connected neighbour activates the interconnection to exactly one of
//    them (the lowest subscript wins) and becomes connected; it raises
//    join_o on that side and the connected neighbour activates its own
//    multiplexor of the same subscript in the same clock. A cell only
//    ever links to a neighbour already in the tree, so no cycle forms and
//    the active interconnections make one loop through all reached cells.
//  * Piped-in controls: cfg_shift_i moves the L-bit shadow register one
//    bit along the chain (cfg_si_i -> shadow[0] .. shadow[L-1] -> cfg_so_o)
//    and cfg_update_i copies the shadow into the multiplexor controls.
//
// Power-up loop, growth from the pad cell to unconnected neighbours only,
// and the tester piping in the final controls follow the text; the join
// handshake, the priority and the shift-register format are this
// design's own. Everything is synchronous to clk, active-low async reset.
module mux_ctrl #(
  parameter int unsigned L = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         loop_clr_i,   // return to the power-up closed loop
  // tree growth
  input  logic         grow_i,
  input  logic         ok_i,         // this cell may be linked
  input  logic [L-1:0] nbr_present_i, // a neighbour (or pad) on side m_i
  input  logic [L-1:0] nbr_conn_i,   // that neighbour is connected
  input  logic [L-1:0] join_i,       // that neighbour joins through m_i
  output logic         conn_o,
  output logic [L-1:0] join_o,
  // piped-in controls
  input  logic         cfg_shift_i,
  input  logic         cfg_update_i,
  input  logic         cfg_si_i,
  output logic         cfg_so_o,
  // multiplexor controls
  output logic [L-1:0] sel_o
);

  logic [L-1:0] shadow_q;
  logic [L-1:0] cand;

  // Side chosen when joining: lowest-subscript connected neighbour.
  assign cand = nbr_present_i & nbr_conn_i;
  always_comb begin
    join_o = '0;
    if (grow_i && ok_i && !conn_o)
      for (int i = L - 1; i >= 0; i--)
        if (cand[i]) join_o = L'(1) << i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_o  <= '0;
      conn_o <= 1'b0;
    end else if (loop_clr_i) begin
      sel_o  <= '0;
      conn_o <= 1'b0;
    end else if (cfg_update_i) begin
      sel_o  <= shadow_q;
    end else if (grow_i) begin
      if (|join_o) begin
        sel_o  <= sel_o | join_o;
        conn_o <= 1'b1;
      end
      if (conn_o)
        sel_o <= sel_o | (join_i & nbr_present_i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           shadow_q <= '0;
    else if (cfg_shift_i) shadow_q <= {shadow_q[L-2:0], cfg_si_i};
  end
  assign cfg_so_o = shadow_q[L-1];

  // A joining cell picks exactly one side.
  a_one_join: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(join_o));

endmodule
