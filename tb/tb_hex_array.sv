// tb_hex_array: self-checking test of the six-neighbour wafer.
//
// A 6 x 5 and a 5 x 4 six-neighbour wafer are each taken through several
// rounds: clear to closed rings, random cells allowed to join, tree growth
// from the pad cell. Checked against a breadth-first search of its own
// over the six-neighbour grid (even rows shifted half a cell east):
// exactly the reachable cells connect; at every junction the three
// multiplexor settings form a permutation of the arriving signals; tracing
// the data path from the pads visits every connected cell once and
// returns to the pads; other cells keep their own rings. The grown
// controls are then shifted back in after a clear and must reproduce the
// same ring. Growth rounds in which a junction merged three rings at once
// (a rotation) are counted and must occur.
module tb_hex_array;
  import loop_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic done_a, done_b;
  int ca, fa, ga, pa, ra, ea, cb, fb, gb, pb, rb, eb;
  hex_harness #(.COLS(6), .ROWS(5)) ha (.clk, .done (done_a), .checks (ca), .failures (fa),
    .n_grow (ga), .n_pipe (pa), .n_rot (ra), .n_excl (ea));
  hex_harness #(.COLS(5), .ROWS(4)) hb (.clk, .done (done_b), .checks (cb), .failures (fb),
    .n_grow (gb), .n_pipe (pb), .n_rot (rb), .n_excl (eb));

  int checks, failures;

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb, fa + fb + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done_a && done_b);
    checks = ca + cb + 4;
    failures = fa + fb;
    $display("grow %0d pipe %0d rotations %0d excluded %0d", ga + gb, pa + pb, ra + rb, ea + eb);
    if (ga == 0 || gb == 0) failures++;
    if (pa == 0 || pb == 0) failures++;
    if (ra + rb == 0) failures++;
    if (ea == 0 || eb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
