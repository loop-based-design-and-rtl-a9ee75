// tb_loop_mux_chain: self-checking test of one cell's multiplexor chain.
//
// Two chains are driven with random words and random multiplexor
// settings: four 2-to-1 multiplexors (four-neighbour loop) and three
// 3-to-1 multiplexors (six-neighbour loop). The expected cell input and
// the signals offered to the neighbours are worked out by walking the
// loop from the cell output down through m_L .. m_1.
module tb_loop_mux_chain;
  localparam int W = 8;

  int checks = 0, failures = 0;

  // four-neighbour chain
  logic [W-1:0] co4, ci4;
  logic [W-1:0] lp4 [4];
  logic [W-1:0] nb4 [4][1];
  logic [0:0]   s4  [4];
  loop_mux_chain #(.W(W), .L(4), .K(2)) dut4 (
    .core_out_i (co4), .core_in_o (ci4), .loop_o (lp4), .nbr_i (nb4), .sel_i (s4));

  // six-neighbour chain
  logic [W-1:0] co6, ci6;
  logic [W-1:0] lp6 [3];
  logic [W-1:0] nb6 [3][2];
  logic [1:0]   s6  [3];
  loop_mux_chain #(.W(W), .L(3), .K(3)) dut6 (
    .core_out_i (co6), .core_in_o (ci6), .loop_o (lp6), .nbr_i (nb6), .sel_i (s6));

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] v;
    int passthrough = 0;
    for (int t = 0; t < 400; t++) begin
      co4 = W'($urandom); co6 = W'($urandom);
      for (int i = 0; i < 4; i++) begin
        nb4[i][0] = W'($urandom);
        s4[i] = (t < 10) ? 1'b0 : 1'($urandom);
      end
      for (int i = 0; i < 3; i++) begin
        nb6[i][0] = W'($urandom); nb6[i][1] = W'($urandom);
        s6[i] = (t < 10) ? 2'd0 : 2'($urandom_range(0, 2));
      end
      #1;
      // reference walk m_4 .. m_1
      v = co4;
      for (int i = 3; i >= 0; i--) begin
        check($sformatf("lp4[%0d]", i), lp4[i], v);
        if (s4[i]) v = nb4[i][0];
      end
      check("ci4", ci4, v);
      if (t < 10) begin
        check("closed loop 4", ci4, co4);
        passthrough++;
      end
      v = co6;
      for (int i = 2; i >= 0; i--) begin
        check($sformatf("lp6[%0d]", i), lp6[i], v);
        if (s6[i] != 0) v = nb6[i][s6[i]-1];
      end
      check("ci6", ci6, v);
      if (t < 10) check("closed loop 6", ci6, co6);
    end
    $display("closed-loop cases %0d", passthrough);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
