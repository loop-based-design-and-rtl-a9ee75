// mux_ctrl3: control of one cell's three 3-to-1 multiplexors (six-neighbour
// loops).
//
// At each multiplexor position three cells meet, each with its m_i there.
// Every cell's m_i picks one of the three signals arriving at the junction
// (its own ring or one of the two partners'), and a valid setting gives
// every arriving signal to exactly one cell: a permutation. The identity
// keeps three separate rings, exchanging two merges two rings, and a
// rotation of all three merges three. sel_o[i] is relative to the cell:
// 0 = own ring, j = the partner j slots further on (j = 1, 2).
//
//  * Power-up / loop_clr_i: all own ring, not connected.
//  * Tree growth (grow_i): an unconnected cell that may join looks for a
//    connected partner (lowest subscript, then partner 1 before 2). It
//    takes over the signal that partner was selecting and the partner
//    switches to this cell's signal, which inserts the cell into the
//    junction's permutation cycle and so into the partner's ring. Only one
//    cell may join through a junction per clock: a cell waits while the
//    third member of that junction is also unconnected, allowed to join
//    and sits in a lower slot.
//  * Piped-in controls: 2L-bit shadow shift register (bit 0 nearest
//    cfg_si_i; m_i uses bits 2(i-1) and 2(i-1)+1) and an update strobe.
//
// Partner ports are indexed [level][partner-1]. slot_i gives the cell's
// slot (0..2) at each junction. The three-input multiplexors, three cells
// per junction and growth towards unconnected cells only follow the
// six-neighbour loop design; the permutation rule, the handshake and the
// priorities are this design's own.
module mux_ctrl3 #(
  parameter int unsigned L = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         loop_clr_i,
  input  logic         grow_i,
  input  logic         ok_i,
  input  logic [1:0]   slot_i     [L],
  input  logic         p_present_i[L][2],   // partner exists (or is the pad)
  input  logic         p_conn_i   [L][2],   // partner is connected
  input  logic         p_avail_i  [L][2],   // partner unconnected and may join
  input  logic [1:0]   p_sel_i    [L][2],   // partner's own relative sel
  input  logic         p_join_i   [L][2],   // partner joins through me
  output logic         conn_o,
  output logic         avail_o,
  output logic         join_o     [L][2],   // I join through partner j
  input  logic         cfg_shift_i,
  input  logic         cfg_update_i,
  input  logic         cfg_si_i,
  output logic         cfg_so_o,
  output logic [1:0]   sel_o      [L]
);

  logic [2*L-1:0] shadow_q;

  assign avail_o = ok_i && !conn_o;

  // (a + b) mod 3 for a in 0..2, b in 0..3, written as a table so that
  // no divider is built
  function automatic logic [1:0] add3(input logic [1:0] a, input logic [1:0] b);
    logic [2:0] s;
    s = {1'b0, a} + {1'b0, b};
    case (s)
      3'd3:    add3 = 2'd0;
      3'd4:    add3 = 2'd1;
      3'd5:    add3 = 2'd2;
      default: add3 = s[1:0];
    endcase
  endfunction

  // join decision: the candidate on the lowest level, then the lowest
  // partner index, wins; join_o is one-hot or zero
  logic found;
  logic other_first;
  always_comb begin
    found = 1'b0; other_first = 1'b0;
    for (int i = 0; i < L; i++) join_o[i] = '{1'b0, 1'b0};
    if (grow_i && ok_i && !conn_o)
      for (int i = 0; i < L; i++)
        for (int j = 0; j < 2; j++) begin
          // the other partner (index 1-j) of this junction goes first if
          // it is also waiting and sits in a lower slot
          other_first = p_present_i[i][1-j] && p_avail_i[i][1-j] &&
                        (add3(slot_i[i], 2'(2 - j)) < slot_i[i]);
          if (!found && p_present_i[i][j] && p_conn_i[i][j] && !other_first) begin
            join_o[i][j] = 1'b1;
            found = 1'b1;
          end
        end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) sel_o[i] <= '0;
      conn_o <= 1'b0;
    end else if (loop_clr_i) begin
      for (int i = 0; i < L; i++) sel_o[i] <= '0;
      conn_o <= 1'b0;
    end else if (cfg_update_i) begin
      for (int i = 0; i < L; i++) sel_o[i] <= shadow_q[2*i +: 2];
    end else if (grow_i) begin
      if (found) conn_o <= 1'b1;
      for (int i = 0; i < L; i++)
        for (int j = 0; j < 2; j++) begin
          // joining: take over the partner's current source, seen from here
          if (join_o[i][j])
            sel_o[i] <= add3(p_sel_i[i][j], 2'(j + 1));
          // answering: take the joining partner's signal
          if (conn_o && p_join_i[i][j] && p_present_i[i][j])
            sel_o[i] <= 2'(j + 1);
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)           shadow_q <= '0;
    else if (cfg_shift_i) shadow_q <= {shadow_q[2*L-2:0], cfg_si_i};
  end
  assign cfg_so_o = shadow_q[2*L-1];

endmodule
