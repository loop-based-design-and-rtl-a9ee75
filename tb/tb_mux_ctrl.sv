// tb_mux_ctrl: self-checking test of one cell's multiplexor controller.
//
// Covers the power-up closed loop, joining the tree through the
// lowest-subscript connected neighbour, a connected cell answering a
// neighbour's join, a cell that may not join, edge sides, the loop clear
// and the piped-in control register (L clocks of shifting, then update).
module tb_mux_ctrl;
  localparam int L = 4;

  logic clk = 0, rst_n = 0;
  logic loop_clr = 0, grow = 0, ok = 1;
  logic [L-1:0] present = '1, nconn = '0, jin = '0;
  logic conn;
  logic [L-1:0] jout, sel;
  logic shift = 0, update = 0, si = 0, so;

  int checks = 0, failures = 0;

  mux_ctrl #(.L(L)) dut (
    .clk, .rst_n, .loop_clr_i (loop_clr), .grow_i (grow), .ok_i (ok),
    .nbr_present_i (present), .nbr_conn_i (nconn), .join_i (jin),
    .conn_o (conn), .join_o (jout),
    .cfg_shift_i (shift), .cfg_update_i (update), .cfg_si_i (si), .cfg_so_o (so),
    .sel_o (sel));

  always #5 clk = ~clk;

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] pat, prev;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset sel", sel, 0);
    check("reset conn", conn, 0);

    // join: neighbours on m_2 and m_3 connected, m_2 must win
    grow = 1; nconn = 4'b0110;
    #1 check("join choice", jout, 4'b0010);
    @(negedge clk);
    check("sel after join", sel, 4'b0010);
    check("conn after join", conn, 1);
    check("no join once connected", jout, 0);
    // neighbour on m_4 joins through us
    jin = 4'b1000;
    @(negedge clk);
    jin = 0;
    check("answer join", sel, 4'b1010);
    // edge side m_1 never activates even if asked
    present = 4'b1110; jin = 4'b0001;
    @(negedge clk);
    jin = 0; present = '1;
    check("edge side", sel, 4'b1010);

    // clear back to the closed loop
    loop_clr = 1;
    @(negedge clk);
    loop_clr = 0;
    check("clear sel", sel, 0);
    check("clear conn", conn, 0);

    // a cell that may not join stays out
    ok = 0; nconn = 4'b1111;
    repeat (3) @(negedge clk);
    check("not ok join", jout, 0);
    check("not ok conn", conn, 0);
    ok = 1; nconn = 4'b1000;
    #1 check("only m_4 candidate", jout, 4'b1000);
    @(negedge clk);
    check("joined m_4", sel, 4'b1000);
    grow = 0; nconn = 0;

    // piped-in controls: bit for m_L first
    prev = 4'b1000;
    for (int r = 0; r < 8; r++) begin
      pat = L'($urandom);
      shift = 1;
      for (int i = L - 1; i >= 0; i--) begin
        si = pat[i];
        @(negedge clk);
      end
      shift = 0;
      check("sel before update", sel, prev);
      update = 1;
      @(negedge clk);
      update = 0;
      check("sel after update", sel, pat);
      check("chain out", so, pat[L-1]);
      prev = pat;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
