// mux_ctrl4: control of one cell's multiplexors in the eight-neighbour
// wafer with corner junctions (corner_array): two 4-to-1 multiplexors at
// four-way junctions and two 2-to-1 multiplexors in diagonal pairs.
//
// The rules are those of mux_ctrl3 with up to four members per junction:
// a junction's settings form a permutation of the signals arriving there.
// sel_o[i] is relative to the cell: 0 = own ring, j = the member j slots
// further on clockwise (j = 1, 2, 3). A 2-to-1 position is a junction with
// only the member two slots on, so it only uses the values 0 and 2.
//
//  * Power-up / loop_clr_i: all own ring, not connected.
//  * Tree growth (grow_i): an unconnected cell that may join looks for a
//    connected partner (lowest subscript, then lowest partner index),
//    takes over the signal that partner was selecting, and the partner
//    switches to this cell's signal. One join per junction per clock: a
//    cell waits while another member of that junction is also unconnected,
//    allowed to join and sits in a lower slot.
//  * Piped-in controls: 2L-bit shadow shift register (bit 0 nearest
//    cfg_si_i; m_i uses bits 2(i-1) and 2(i-1)+1) and an update strobe.
//
// Partner ports are indexed [level][partner-1]. slot_i gives the cell's
// slot (0..3) at each junction. Two 4-to-1 and two 2-to-1 multiplexors
// per cell follow the alternative eight-neighbour loop design; the
// permutation rule, the handshake, the priorities and the 2-bit control
// field also kept for the 2-to-1 positions (8 bits per cell where the
// 2-to-1 positions need only one each) are this design's own.
module mux_ctrl4 #(
  parameter int unsigned L = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         loop_clr_i,
  input  logic         grow_i,
  input  logic         ok_i,
  input  logic [1:0]   slot_i     [L],
  input  logic         p_present_i[L][3],   // partner exists (or is the pad)
  input  logic         p_conn_i   [L][3],   // partner is connected
  input  logic         p_avail_i  [L][3],   // partner unconnected and may join
  input  logic [1:0]   p_sel_i    [L][3],   // partner's own relative sel
  input  logic         p_join_i   [L][3],   // partner joins through me
  output logic         conn_o,
  output logic         avail_o,
  output logic         join_o     [L][3],   // I join through partner j
  input  logic         cfg_shift_i,
  input  logic         cfg_update_i,
  input  logic         cfg_si_i,
  output logic         cfg_so_o,
  output logic [1:0]   sel_o      [L]
);

  logic [2*L-1:0] shadow_q;

  assign avail_o = ok_i && !conn_o;

  // join decision: the candidate on the lowest level, then the lowest
  // partner index, wins; join_o is one-hot or zero
  logic found;
  logic other_first;
  always_comb begin
    found = 1'b0; other_first = 1'b0;
    for (int i = 0; i < L; i++) join_o[i] = '{1'b0, 1'b0, 1'b0};
    if (grow_i && ok_i && !conn_o)
      for (int i = 0; i < L; i++)
        for (int j = 0; j < 3; j++) begin
          // another waiting member of this junction in a lower slot goes first
          other_first = 1'b0;
          for (int k = 0; k < 3; k++)
            if (k != j && p_present_i[i][k] && p_avail_i[i][k] &&
                2'(slot_i[i] + 2'(k + 1)) < slot_i[i])
              other_first = 1'b1;
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
        for (int j = 0; j < 3; j++) begin
          // joining: take over the partner's current source, seen from here
          if (join_o[i][j])
            sel_o[i] <= p_sel_i[i][j] + 2'(j + 1);   // modulo 4
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
