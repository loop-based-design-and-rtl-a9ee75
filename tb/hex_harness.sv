// hex_harness: drives one hex_array and checks it (see tb_hex_array for
// what is checked); reports its check and mechanism counts on its ports.
module hex_harness
  import loop_pkg::*;
#(
  parameter int COLS = 6,
  parameter int ROWS = 5,
  parameter int W    = 8,
  parameter int ROUNDS = 8
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_grow,
  output int   n_pipe,
  output int   n_rot,
  output int   n_excl
);
  localparam int N = COLS * ROWS;

  logic rst_n = 0, loop_clr = 0, grow = 0;
  logic [N-1:0] ok = '1;
  logic shift = 0, update = 0, si = 0, so;
  logic [W-1:0] co [N];
  logic [W-1:0] ci [N];
  logic [W-1:0] pin = '0, pout;
  logic [N-1:0] conn;
  logic [5:0] sel [N];
  logic [5:0] saved [N];

  hex_array #(.COLS(COLS), .ROWS(ROWS), .W(W)) dut (
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

  function automatic bit inw(int x, int y);
    return x >= 1 && x <= COLS && y >= 1 && y <= ROWS;
  endfunction
  function automatic int cidx(int x, int y);
    return (y - 1) * COLS + (x - 1);
  endfunction

  // six neighbours: odd rows reach x-1 and x above and below, even rows x and x+1
  function automatic logic [N-1:0] reach(logic [N-1:0] okm);
    logic [N-1:0] r;
    bit changed;
    int dx [6], dy [6];
    r = '0;
    if (okm[0]) r[0] = 1'b1;
    do begin
      changed = 0;
      for (int c = 0; c < N; c++) if (r[c]) begin
        int x, y, o;
        x = c % COLS + 1; y = c / COLS + 1;
        o = (y % 2 == 0) ? 1 : 0;
        dx = '{1, -1, o - 1, o, o - 1, o};
        dy = '{0, 0, -1, -1, 1, 1};
        for (int k = 0; k < 6; k++) begin
          int nx, ny;
          nx = x + dx[k]; ny = y + dy[k];
          if (inw(nx, ny) && okm[cidx(nx, ny)] && !r[cidx(nx, ny)]) begin
            r[cidx(nx, ny)] = 1'b1; changed = 1;
          end
        end
      end
    end while (changed);
    return r;
  endfunction

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

  // junction settings must be permutations; returns the number of rotations
  task automatic junctions(string tag, output int rot);
    int src [string];
    int cnt [string];
    rot = 0;
    for (int c = 0; c < N; c++)
      for (int i = 0; i < 3; i++) begin
        int x, y, s, tx, ty, a;
        string key;
        x = c % COLS + 1; y = c / COLS + 1;
        s = hex_slot(x, y, i + 1);
        tx = hex_top_x(x, y, s); ty = hex_top_y(y, s);
        key = $sformatf("%0d_%0d", tx, ty);
        a = (s + int'(sel[c][2*i +: 2])) % 3;
        if (src.exists(key) && (src[key] & (1 << a)) != 0) begin
          check({tag, " permutation"}, 1, 0);
        end
        src[key] = (src.exists(key) ? src[key] : 0) | (1 << a);
        if (sel[c][2*i +: 2] != 0) cnt[key] = (cnt.exists(key) ? cnt[key] : 0) + 1;
      end
    foreach (cnt[k]) if (cnt[k] == 3) rot++;
    check({tag, " junctions checked"}, src.num() > 0, 1);
  endtask

  task automatic check_loop(logic [N-1:0] r, string tag);
    int pred [N];
    int last, cur, steps;
    logic [N-1:0] seen;
    trace(pred, last);
    for (int c = 0; c < N; c++)
      if (!r[c]) check({tag, " closed ring"}, pred[c], c);
    if (r == 0) return;
    seen = '0; cur = last; steps = 0;
    while (cur != N && steps <= N) begin
      check({tag, " cell on path"}, r[cur], 1);
      check({tag, " visited once"}, seen[cur], 0);
      seen[cur] = 1'b1; cur = pred[cur]; steps++;
    end
    check({tag, " path covers tree"}, seen, r);
  endtask

  initial begin
    logic [N-1:0] r;
    int rot;
    done = 0; checks = 0; failures = 0;
    n_grow = 0; n_pipe = 0; n_rot = 0; n_excl = 0;
    for (int c = 0; c < N; c++) co[c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check_loop('0, "power-up");
    for (int rd = 0; rd < ROUNDS; rd++) begin
      loop_clr = 1;
      @(negedge clk);
      loop_clr = 0;
      for (int c = 0; c < N; c++) ok[c] = ($urandom_range(0, 99) < 70);
      if (rd == 0) ok = '1;
      ok[0] = (rd != ROUNDS - 1);
      r = reach(ok);
      n_excl += N - $countones(r);
      grow = 1;
      repeat (N + 2) @(negedge clk);
      grow = 0;
      n_grow++;
      check("connected set", conn, r);
      junctions("grown", rot);
      n_rot += rot;
      check_loop(r, $sformatf("grow %0d", rd));
      if (rd < ROUNDS - 1) begin
        for (int c = 0; c < N; c++) saved[c] = sel[c];
        loop_clr = 1;
        @(negedge clk);
        loop_clr = 0;
        check_loop('0, "cleared");
        shift = 1;
        for (int c = N - 1; c >= 0; c--)
          for (int b = 5; b >= 0; b--) begin
            si = saved[c][b];
            @(negedge clk);
          end
        shift = 0; update = 1;
        @(negedge clk);
        update = 0;
        n_pipe++;
        for (int c = 0; c < N; c++) check("piped controls", sel[c], saved[c]);
        check_loop(r, "piped");
      end
    end
    done = 1;
  end
endmodule
