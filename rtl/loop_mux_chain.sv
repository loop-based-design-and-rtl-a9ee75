// loop_mux_chain: the multiplexors m_L .. m_1 of one cell.
//
// A cell and its L multiplexors form a closed loop: the cell's output
// enters m_L, each m_(i+1) feeds m_i, and m_1 feeds the cell's input.
// Each multiplexor m_i has K inputs: input 0 is the cell's own loop (the
// signal arriving from m_(i+1), or the cell output for m_L), inputs
// 1..K-1 are the signals that arrive at the m_i of the neighbouring
// cell(s) sharing this interconnection. Selecting a neighbour on both
// sides of an interconnection swaps the two loops' signals there and
// merges the two loops into one; whatever the settings, a signal always
// passes exactly L multiplexors, in the order m_L .. m_1, between one
// cell and the next, so the delay between logically adjacent cells does
// not depend on where the faults are.
//
// K = 2 (2-to-1 multiplexors) gives the three-, four- and eight-neighbour
// loops; K = 3 gives the six-neighbour loop with 3-to-1 multiplexors,
// K = 4 the 4-to-1 corner junctions of the other eight-neighbour layout.
// Purely combinational. Index i-1 of every array belongs to m_i.
//   core_out_i : cell output, enters m_L
//   core_in_o  : output of m_1, the cell input
//   loop_o[i-1]: signal arriving at m_i from the cell's own loop; it is
//                offered to the neighbours that pair with m_i
//   nbr_i[i-1][j]: neighbour signal on input j+1 of m_i
//   sel_i[i-1] : input selected by m_i (0 = own loop)
module loop_mux_chain #(
  parameter int unsigned W = 8,   // width of the intercell bus
  parameter int unsigned L = 4,   // multiplexors per cell
  parameter int unsigned K = 2,   // inputs per multiplexor
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1
) (
  input  logic [W-1:0]  core_out_i,
  output logic [W-1:0]  core_in_o,
  output logic [W-1:0]  loop_o [L],
  input  logic [W-1:0]  nbr_i  [L][K-1],
  input  logic [SW-1:0] sel_i  [L]
);

  for (genvar i = 0; i < L; i++) begin : g_mux
    logic [W-1:0] m_in, m_out;
    if (i == L - 1) begin : g_first
      assign m_in = core_out_i;
    end else begin : g_next
      assign m_in = g_mux[i+1].m_out;
    end
    assign loop_o[i] = m_in;
    always_comb begin
      m_out = m_in;
      for (int j = 1; j < K; j++)
        if (sel_i[i] == SW'(j)) m_out = nbr_i[i][j-1];
    end
  end

  assign core_in_o = g_mux[0].m_out;

endmodule
