// tb_diag_cell: self-checking test of one cell's boundary-scan logic.
//
// Plays tester sequences into one diag_cell whose cell logic is a model in
// this testbench: a diagnosis of good logic (no failure may be flagged),
// a BYPASS run, and a diagnosis of logic with one stuck response bit
// (the comparator must flag it). It also checks the scan path content
// reaching the cell inputs, that TMS, vector and results chains delay by
// exactly one clock, and that Test-Logic-Reset clears the fail flag.
module tb_diag_cell;
  import diag_seq_pkg::*;

  logic tck = 0, trst_n = 0;
  always #5 tck = ~tck;

  logic tms = 1, tdi = 0, en = 0, ex = 0;
  logic tms_o, tv_o, en_o, ex_o, tdo, fail;
  logic [SL-1:0] stim, resp;
  logic faulty = 0;
  int   stuck_bit = 5;

  diag_cell #(.SCAN_LEN(SL)) dut (
    .tck, .trst_n, .tms_i (tms), .tms_o, .tv_i (tdi), .tv_o,
    .exp_en_i (en), .exp_i (ex), .exp_en_o (en_o), .exp_o (ex_o),
    .stim_o (stim), .resp_i (resp), .tdo_o (tdo), .fail_o (fail));

  always_comb resp = good_resp(stim) ^ (faulty ? (SL'(1) << stuck_bit) : '0);

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // play a sequence; check the one-clock pipeline of every chain
  task automatic play(pin_t q[$]);
    pin_t last;
    last = '0;
    foreach (q[i]) begin
      tms = q[i].tms; tdi = q[i].tdi; en = q[i].en; ex = q[i].exp;
      @(posedge tck); #1;
      check("tms chain", tms_o, q[i].tms);
      check("vector chain", tv_o, q[i].tdi);
      check("result chain", {en_o, ex_o}, {q[i].en, q[i].exp});
    end
    en = 0;
  endtask

  initial begin
    pin_t q[$];
    logic [SL-1:0] s;
    repeat (2) @(posedge tck);
    #1 trst_n = 1;

    // good cell
    q = {}; diagnosis(q, 6);
    play(q);
    check("good cell passes", fail, 0);

    // the scan path reaches the cell inputs
    q = {}; load_ir(q, 2'b01);
    s = 16'h3C5A;
    scan(q, s, 0, 0);
    play(q);
    check("cell inputs after update", stim, s);

    // bypass
    q = {}; bypass(q, 24);
    play(q);
    check("bypass passes", fail, 0);

    // faulty cell
    faulty = 1;
    q = {}; diagnosis(q, 6);
    play(q);
    check("faulty cell flagged", fail, 1);

    // Test-Logic-Reset clears the flag
    q = {}; repeat (5) push(q, 1);
    play(q);
    check("reset clears flag", fail, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
