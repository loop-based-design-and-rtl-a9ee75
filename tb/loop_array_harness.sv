// loop_array_harness: drives and checks one loop_array of a given size.
//
// Stands in for the cells' own logic and for the tester. Each round it
// returns the wafer to the closed per-cell loops, draws a random set of
// cells allowed to join (probability OK_PCT %), lets the tree grow from
// the pad cell and then checks, against a breadth-first search of its
// own over the allowed cells:
//   * exactly the reachable cells are connected and joined by N_reached-1
//     paired interconnections plus the pad;
//   * every active multiplexor is paired with the neighbour's multiplexor
//     of the same subscript;
//   * tracing the data path from the pad visits every reached cell once
//     and returns to the pad; unreached cells still form their own loops.
// The trace identifies a cell's predecessor from two passes: cells send
// their index, then their index plus one (the pad sends 0 both times).
// It then pipes the grown controls back in through the control chain
// after a clear and checks that the same settings return. Last, it pipes
// in random sets of paired interconnections, which may contain cycles as
// a tester's setting may, and compares every cell's predecessor on the
// rings with a model of its own that follows each cell's output through
// the multiplexor levels (an active pair at level i hands the signal to
// the neighbour's level i-1).
module loop_array_harness
  import loop_pkg::*;
#(
  parameter int COLS   = 4,
  parameter int ROWS   = 4,
  parameter int W      = 8,
  parameter int NBR    = 4,
  parameter int ROUNDS = 4,
  parameter int OK_PCT = 75
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_grow,
  output int   n_pipe,
  output int   n_excluded
);
  localparam int N = COLS * ROWS;

  logic rst_n = 0, loop_clr = 0, grow = 0;
  logic [N-1:0] ok = '1;
  logic shift = 0, update = 0, si = 0, so;
  logic [W-1:0] co [N];
  logic [W-1:0] ci [N];
  logic [W-1:0] pin = '0, pout;
  logic [N-1:0] conn;
  logic [NBR-1:0] sel [N];
  logic [NBR-1:0] saved [N];

  loop_array #(.COLS(COLS), .ROWS(ROWS), .W(W), .NBR(NBR)) dut (
    .clk, .rst_n, .loop_clr_i (loop_clr), .grow_i (grow), .ok_i (ok),
    .cfg_shift_i (shift), .cfg_update_i (update), .cfg_si_i (si), .cfg_so_o (so),
    .core_out_i (co), .core_in_o (ci), .pad_in_i (pin), .pad_out_o (pout),
    .conn_o (conn), .sel_o (sel));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int cidx(int x, int y);
    return (y - 1) * COLS + (x - 1);
  endfunction

  // reachable set from the pad cell over allowed cells, NBR-neighbour grid
  function automatic logic [N-1:0] reach(logic [N-1:0] okm);
    logic [N-1:0] r;
    bit changed;
    r = '0;
    if (okm[0]) r[0] = 1'b1;
    do begin
      changed = 0;
      for (int c = 0; c < N; c++) if (r[c]) begin
        for (int d = 0; d < 8; d++) begin
          int x, y, nx, ny;
          x = c % COLS + 1; y = c / COLS + 1;
          if (side_level(x, y, dir_e'(d)) > NBR) continue;
          nx = nbr_x(x, dir_e'(d)); ny = nbr_y(y, dir_e'(d));
          if (nx < 1 || nx > COLS || ny < 1 || ny > ROWS) continue;
          if (okm[cidx(nx, ny)] && !r[cidx(nx, ny)]) begin
            r[cidx(nx, ny)] = 1'b1; changed = 1;
          end
        end
      end
    end while (changed);
    return r;
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
    for (int c = 0; c < N; c++)
      pred[c] = (ci[c] == W'(v1[c] + 1)) ? int'(v1[c]) : N;
    last = (pout == W'(p1 + 1)) ? int'(p1) : N;
  endtask

  task automatic check_loop(logic [N-1:0] r, string tag);
    int pred [N];
    int last, cur, steps, cnt, nsel;
    logic [N-1:0] seen;
    trace(pred, last);
    cnt = $countones(r);
    // cells outside the tree keep their own closed loop
    for (int c = 0; c < N; c++)
      if (!r[c]) check({tag, " closed loop"}, pred[c], c);
    if (cnt == 0) return;
    // walk backwards from the pad
    seen = '0; cur = last; steps = 0;
    while (cur != N && steps <= N) begin
      check({tag, " reached cell on path"}, r[cur], 1);
      check({tag, " visited once"}, seen[cur], 0);
      seen[cur] = 1'b1;
      cur = pred[cur];
      steps++;
    end
    check({tag, " path length"}, steps, cnt);
    check({tag, " path covers tree"}, seen, r);
    // multiplexor pairing and edge count
    nsel = 0;
    for (int c = 0; c < N; c++)
      for (int i = 0; i < NBR; i++) if (sel[c][i]) begin
        int x, y, nx, ny;
        dir_e d;
        nsel++;
        x = c % COLS + 1; y = c / COLS + 1;
        d = level_side(x, y, i + 1);
        nx = nbr_x(x, d); ny = nbr_y(y, d);
        if (nx >= 1 && nx <= COLS && ny >= 1 && ny <= ROWS)
          check({tag, " paired multiplexor"}, sel[cidx(nx, ny)][i], 1);
        else
          check({tag, " only the pad side on the edge"}, c == 0 && ny == 0, 1);
      end
    check({tag, " active multiplexors"}, nsel, 2 * (cnt - 1) + 1);
  endtask

  // independent model of the crossing rule: the cell whose input receives
  // cell c's output under the settings s
  function automatic int model_succ(int c, logic [NBR-1:0] s [N]);
    int d;
    d = c;
    for (int i = NBR; i >= 1; i--)
      if (s[d][i-1]) begin
        int x, y;
        dir_e dd;
        x = d % COLS + 1; y = d / COLS + 1;
        dd = level_side(x, y, i);
        d = cidx(nbr_x(x, dd), nbr_y(y, dd));
      end
    return d;
  endfunction

  function automatic int find(int p [N], int a);
    while (p[a] != a) a = p[a];
    return a;
  endfunction

  // random interconnection sets piped in; returns 1 if the set had a cycle
  task automatic random_links(output bit cyc);
    logic [NBR-1:0] s [N];
    int par [N];
    int pred [N];
    int last;
    for (int c = 0; c < N; c++) begin s[c] = '0; par[c] = c; end
    cyc = 0;
    for (int c = 0; c < N; c++)
      for (int i = 1; i <= NBR; i++) begin
        int x, y, nx, ny, n;
        dir_e dd;
        x = c % COLS + 1; y = c / COLS + 1;
        dd = level_side(x, y, i);
        nx = nbr_x(x, dd); ny = nbr_y(y, dd);
        if (nx >= 1 && nx <= COLS && ny >= 1 && ny <= ROWS) begin
          n = cidx(nx, ny);
          if (n > c && $urandom_range(0, 99) < 65) begin
            s[c][i-1] = 1'b1; s[n][i-1] = 1'b1;
            if (find(par, c) == find(par, n)) cyc = 1;
            else par[find(par, c)] = find(par, n);
          end
        end
      end
    shift = 1;
    for (int c = N - 1; c >= 0; c--)
      for (int i = NBR - 1; i >= 0; i--) begin
        si = s[c][i];
        @(negedge clk);
      end
    shift = 0;
    update = 1;
    @(negedge clk);
    update = 0;
    for (int c = 0; c < N; c++) check("random links piped", sel[c], s[c]);
    trace(pred, last);
    for (int c = 0; c < N; c++) check("random links ring order", pred[model_succ(c, s)], c);
  endtask

  initial begin
    logic [N-1:0] r;
    bit cyc;
    int ncyc;
    done = 0; checks = 0; failures = 0; n_grow = 0; n_pipe = 0; n_excluded = 0;
    for (int c = 0; c < N; c++) co[c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_loop('0, "power-up");
    check("power-up conn", conn, 0);

    for (int rd = 0; rd < ROUNDS; rd++) begin
      loop_clr = 1;
      @(negedge clk);
      loop_clr = 0;
      check("cleared conn", conn, 0);
      for (int c = 0; c < N; c++) ok[c] = ($urandom_range(0, 99) < OK_PCT);
      if (rd == 0) ok = '1;
      if (rd == ROUNDS - 1) ok[0] = 1'b0;  // root not allowed: nothing grows
      else ok[0] = 1'b1;
      r = reach(ok);
      n_excluded += N - $countones(r);
      grow = 1;
      repeat (N + 2) @(negedge clk);
      grow = 0;
      n_grow++;
      check("connected set", conn, r);
      check_loop(r, $sformatf("grow %0d", rd));

      if (rd < ROUNDS - 1) begin
        // pipe the same controls back in
        for (int c = 0; c < N; c++) saved[c] = sel[c];
        loop_clr = 1;
        @(negedge clk);
        loop_clr = 0;
        check_loop('0, "after clear");
        shift = 1;
        for (int c = N - 1; c >= 0; c--)
          for (int i = NBR - 1; i >= 0; i--) begin
            si = saved[c][i];
            @(negedge clk);
          end
        shift = 0;
        update = 1;
        @(negedge clk);
        update = 0;
        n_pipe++;
        for (int c = 0; c < N; c++) check("piped controls", sel[c], saved[c]);
        check_loop(r, "piped");
      end
    end
    ncyc = 0;
    for (int k = 0; k < 6; k++) begin
      random_links(cyc);
      ncyc += int'(cyc);
    end
    check("random sets with a cycle", ncyc > 0, 1);
    done = 1;
  end
endmodule
