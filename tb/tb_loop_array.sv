// tb_loop_array: self-checking test of the wafer loop array.
//
// Runs loop_array_harness on a four-neighbour 6 x 5 wafer, a
// three-neighbour 5 x 4 wafer (m_4 removed) and an eight-neighbour 5 x 5
// wafer (diagonal links m_5 .. m_8), and requires that tree growth, piping
// in the controls and excluding cells each happened in every one.
module tb_loop_array;
  logic clk = 0;
  always #5 clk = ~clk;

  logic d4, d3, d8;
  int c4, f4, g4, p4, e4, c3, f3, g3, p3, e3, c8, f8, g8, p8, e8;

  loop_array_harness #(.COLS(6), .ROWS(5), .NBR(4), .ROUNDS(6)) h4 (
    .clk, .done (d4), .checks (c4), .failures (f4), .n_grow (g4), .n_pipe (p4), .n_excluded (e4));
  loop_array_harness #(.COLS(5), .ROWS(4), .NBR(3), .ROUNDS(5)) h3 (
    .clk, .done (d3), .checks (c3), .failures (f3), .n_grow (g3), .n_pipe (p3), .n_excluded (e3));
  loop_array_harness #(.COLS(5), .ROWS(5), .NBR(8), .ROUNDS(6), .OK_PCT(55)) h8 (
    .clk, .done (d8), .checks (c8), .failures (f8), .n_grow (g8), .n_pipe (p8), .n_excluded (e8));

  int checks, failures;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c3 + c8, f4 + f3 + f8 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (d4 && d3 && d8);
    checks = c4 + c3 + c8 + 3;
    failures = f4 + f3 + f8;
    $display("four-neighbour: grow %0d pipe %0d excluded %0d", g4, p4, e4);
    $display("three-neighbour: grow %0d pipe %0d excluded %0d", g3, p3, e3);
    $display("eight-neighbour: grow %0d pipe %0d excluded %0d", g8, p8, e8);
    if (g4 == 0 || g3 == 0 || g8 == 0) failures++;
    if (p4 == 0 || p3 == 0 || p8 == 0) failures++;
    if (e4 == 0 || e3 == 0 || e8 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
