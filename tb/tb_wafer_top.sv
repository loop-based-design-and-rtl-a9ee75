// tb_wafer_top: end-to-end test of the wafer at its default size.
//
// A 16 x 16 four-neighbour wafer with random faulty cells (about 30 %,
// the pad cell kept good) goes through the whole flow:
//   1. parallel diagnosis through the boundary-scan chains; the fail
//      flags must mark exactly the faulty cells;
//   2. tree growth from the pad cell using the diagnosis, which must link
//      every good cell reachable through good cells (found here by a
//      breadth-first search) into one loop that starts and ends at the
//      pads, while all other cells keep their own closed loop;
//   3. clear back to closed loops;
//   4. the tester's own spanning tree (a different one, searched
//      column-first) piped in through the control chain; the settings and
//      the resulting loop are checked the same way.
// The cells' logic is modelled here. At this cell yield some good cells
// are cut off from the pad cell by faulty ones and must stay out. Every mechanism (diagnosis pass and
// fault, growth, exclusion, clear, piped controls, pad path) is counted
// and one that never happened is a failure.
module tb_wafer_top;
  import loop_pkg::*;
  import diag_seq_pkg::*;

  localparam int COLS = 16, ROWS = 16, W = 8, NBR = 4, N = COLS * ROWS;

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n = 0, trst_n = 0;
  logic loop_clr = 0, grow = 0, use_diag = 0;
  logic shift = 0, update = 0, si = 0, so;
  logic [N-1:0] conn, tdo, fail;
  logic [NBR-1:0] sel [N];
  logic [W-1:0] pin = '0, pout;
  logic [W-1:0] co [N];
  logic [W-1:0] ci [N];
  logic tms = 1, tdi = 0, en = 0, ex = 0;
  logic tms_o, tv_o, en_o, ex_o;
  logic [SL-1:0] stim [N];
  logic [SL-1:0] resp [N];
  logic [N-1:0] faulty = '0;

  wafer_top dut (
    .clk, .rst_n,
    .loop_clr_i (loop_clr), .grow_i (grow), .use_diag_i (use_diag),
    .cfg_shift_i (shift), .cfg_update_i (update), .cfg_si_i (si), .cfg_so_o (so),
    .conn_o (conn), .sel_o (sel),
    .pad_in_i (pin), .pad_out_o (pout), .core_out_i (co), .core_in_o (ci),
    .trst_n, .tms_i (tms), .tv_i (tdi), .exp_en_i (en), .exp_i (ex),
    .tms_o, .tv_o, .exp_en_o (en_o), .exp_o (ex_o),
    .stim_o (stim), .resp_i (resp), .tdo_o (tdo), .fail_o (fail));

  always_comb
    for (int k = 0; k < N; k++)
      resp[k] = good_resp(stim[k]) ^ (faulty[k] ? SL'(1 << (k % SL)) : '0);

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int cidx(int x, int y);
    return (y - 1) * COLS + (x - 1);
  endfunction
  function automatic bit inside_wafer(int x, int y);
    return x >= 1 && x <= COLS && y >= 1 && y <= ROWS;
  endfunction

  // spanning tree over good cells from cell 0; parent side per cell
  // (-1: root, -2: not reached). col_first changes the search order.
  function automatic void tree(logic [N-1:0] good, bit col_first, output int par [N]);
    int q[$];
    for (int c = 0; c < N; c++) par[c] = -2;
    if (!good[0]) return;
    par[0] = -1; q.push_back(0);
    while (q.size() > 0) begin
      int c, x, y;
      c = q.pop_front(); x = c % COLS + 1; y = c / COLS + 1;
      for (int k = 0; k < 4; k++) begin
        int d, nx, ny;
        d = col_first ? (3 - k) : k;
        nx = nbr_x(x, dir_e'(d)); ny = nbr_y(y, dir_e'(d));
        if (inside_wafer(nx, ny) && good[cidx(nx, ny)] && par[cidx(nx, ny)] == -2) begin
          par[cidx(nx, ny)] = (d + 2) % 4;   // side of the child facing the parent
          q.push_back(cidx(nx, ny));
        end
      end
    end
  endfunction

  // predecessor of each cell on the data path; N stands for the pad
  task automatic trace(output int pred [N], output int last);
    logic [W-1:0] v1 [N];
    logic [W-1:0] p1;
    pin = '0;
    for (int c = 0; c < N; c++) co[c] = W'(c);
    #1;
    for (int c = 0; c < N; c++) v1[c] = ci[c];
    p1 = pout;
    for (int c = 0; c < N; c++) co[c] = W'(c + 1);
    #1;
    for (int c = 0; c < N; c++) pred[c] = (ci[c] == W'(v1[c] + 1)) ? int'(v1[c]) : N;
    last = (pout == W'(p1 + 1)) ? int'(p1) : N;
  endtask

  int n_pad_path = 0, n_closed = 0;
  task automatic check_loop(logic [N-1:0] r, string tag);
    int pred [N];
    int last, cur, steps;
    logic [N-1:0] seen;
    trace(pred, last);
    for (int c = 0; c < N; c++) if (!r[c]) begin
      check({tag, " closed loop"}, pred[c], c);
      n_closed++;
    end
    if (r == 0) return;
    seen = '0; cur = last; steps = 0;
    while (cur != N && steps <= N) begin
      check({tag, " cell on path"}, r[cur], 1);
      check({tag, " visited once"}, seen[cur], 0);
      seen[cur] = 1'b1; cur = pred[cur]; steps++;
    end
    check({tag, " path covers tree"}, seen, r);
    if (seen == r) n_pad_path++;
  endtask

  task automatic play(pin_t q[$]);
    foreach (q[i]) begin
      @(negedge clk);
      tms = q[i].tms; tdi = q[i].tdi; en = q[i].en; ex = q[i].exp;
    end
    @(negedge clk);
    tms = 1'b0; en = 1'b0;
  endtask

  initial begin
    pin_t q[$];
    int par [N];
    logic [N-1:0] good, r;
    logic [NBR-1:0] cfg [N];
    int n_diag_pass = 0, n_fault = 0, n_grow = 0, n_excl = 0, n_clear = 0, n_pipe = 0;
    int t0;

    for (int c = 0; c < N; c++) co[c] = '0;
    for (int c = 1; c < N; c++) faulty[c] = ($urandom_range(0, 99) < 30);
    good = ~faulty;
    repeat (2) @(negedge clk);
    rst_n = 1; trst_n = 1;
    @(negedge clk);
    check_loop('0, "power-up");

    // 1. parallel diagnosis
    q = {}; diagnosis(q, 3);
    t0 = $time;
    play(q);
    repeat (N + 1) @(negedge clk);
    $display("diagnosis of %0d cells: %0d clocks", N, ($time - t0) / 10);
    check("diagnosis flags", fail, faulty);
    for (int c = 0; c < N; c++) if (fail[c] == faulty[c]) begin
      if (faulty[c]) n_fault++; else n_diag_pass++;
    end

    // 2. tree growth over the good cells
    tree(good, 0, par);
    for (int c = 0; c < N; c++) r[c] = par[c] != -2;
    n_excl = N - $countones(r);
    use_diag = 1; grow = 1;
    repeat (N + 2) @(negedge clk);
    grow = 0;
    n_grow++;
    check("grown set", conn, r);
    check_loop(r, "grown");

    // 3. clear
    loop_clr = 1;
    @(negedge clk);
    loop_clr = 0;
    check("cleared", conn, 0);
    check_loop('0, "cleared");
    n_clear++;

    // 4. tester-computed controls, column-first tree
    tree(good, 1, par);
    for (int c = 0; c < N; c++) cfg[c] = '0;
    cfg[0][side_level(1, 1, DIR_N) - 1] = 1'b1;   // the pads
    for (int c = 0; c < N; c++) if (par[c] >= 0) begin
      int x, y, lv, p;
      x = c % COLS + 1; y = c / COLS + 1;
      lv = side_level(x, y, dir_e'(par[c]));
      p = cidx(nbr_x(x, dir_e'(par[c])), nbr_y(y, dir_e'(par[c])));
      cfg[c][lv - 1] = 1'b1;
      cfg[p][lv - 1] = 1'b1;
    end
    shift = 1;
    for (int c = N - 1; c >= 0; c--)
      for (int i = NBR - 1; i >= 0; i--) begin
        si = cfg[c][i];
        @(negedge clk);
      end
    shift = 0; update = 1;
    @(negedge clk);
    update = 0;
    n_pipe++;
    for (int c = 0; c < N; c++) check("piped controls", sel[c], cfg[c]);
    check_loop(r, "piped");

    $display("good %0d faulty %0d harvested %0d (excluded good %0d)",
             $countones(good), $countones(faulty), $countones(r), n_excl - $countones(faulty));
    $display("mechanisms: diag pass %0d, fault flagged %0d, grow %0d, excluded %0d, clear %0d, piped %0d, pad path %0d, closed loops %0d",
             n_diag_pass, n_fault, n_grow, n_excl, n_clear, n_pipe, n_pad_path, n_closed);
    checks++; if (n_diag_pass == 0) failures++;
    checks++; if (n_fault == 0) failures++;
    checks++; if (n_grow == 0) failures++;
    checks++; if (n_excl == 0) failures++;
    checks++; if (n_excl == $countones(faulty)) failures++;  // an isolated good cell
    checks++; if (n_clear == 0) failures++;
    checks++; if (n_pipe == 0) failures++;
    checks++; if (n_pad_path < 2) failures++;
    checks++; if (n_closed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
