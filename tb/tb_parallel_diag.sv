// tb_parallel_diag: self-checking test of the pipelined diagnosis chain.
//
// Twelve cells, some with faulty logic (response bit 3 inverted), are
// diagnosed at once by one tester sequence fed into stage 0. Checks: the
// fail flags mark exactly the faulty cells; the flag of faulty cell k
// rises exactly k - j clocks after that of faulty cell j (one clock of
// pipelining per cell); the whole chain is diagnosed within the sequence
// length plus N clocks; the chain outputs repeat the inputs N clocks
// later; and a diagnosis of all-good cells flags none.
module tb_parallel_diag;
  import diag_seq_pkg::*;
  localparam int N = 12;

  logic tck = 0, trst_n = 0;
  always #5 tck = ~tck;

  logic tms = 1, tdi = 0, en = 0, ex = 0;
  logic tms_o, tv_o, en_o, ex_o;
  logic [SL-1:0] stim [N];
  logic [SL-1:0] resp [N];
  logic [N-1:0] tdo, fail, faulty = '0;

  parallel_diag #(.N(N), .SCAN_LEN(SL)) dut (
    .tck, .trst_n, .tms_i (tms), .tv_i (tdi), .exp_en_i (en), .exp_i (ex),
    .tms_o, .tv_o, .exp_en_o (en_o), .exp_o (ex_o),
    .stim_o (stim), .resp_i (resp), .tdo_o (tdo), .fail_o (fail));

  always_comb
    for (int k = 0; k < N; k++)
      resp[k] = good_resp(stim[k]) ^ (faulty[k] ? SL'(1 << 3) : '0);

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  int rise [N];
  logic [N-1:0] fail_d = '0;
  always @(posedge tck) begin
    cyc <= cyc + 1;
    for (int k = 0; k < N; k++) if (fail[k] && !fail_d[k]) rise[k] = cyc;
    fail_d <= fail;
  end

  task automatic run(pin_t q[$], output int start);
    start = cyc;
    foreach (q[i]) begin
      @(negedge tck);
      tms = q[i].tms; tdi = q[i].tdi; en = q[i].en; ex = q[i].exp;
    end
    @(negedge tck);
    tms = 1'b0; en = 1'b0;   // stay in Run-Test/Idle
  endtask

  initial begin
    pin_t q[$];
    int start, first, len;
    repeat (2) @(negedge tck);
    trst_n = 1;

    // all good
    q = {}; diagnosis(q, 4);
    run(q, start);
    repeat (N + 1) @(negedge tck);
    check("all good: no flags", fail, 0);

    // some faulty cells
    faulty = 12'b1001_0010_0101;
    q = {}; diagnosis(q, 4);
    len = q.size();
    run(q, start);
    repeat (N + 1) @(negedge tck);
    check("faulty cells flagged", fail, faulty);
    first = -1;
    for (int k = 0; k < N; k++) if (faulty[k]) begin
      if (first < 0) first = k;
      else check($sformatf("skew of cell %0d", k), rise[k] - rise[first], k - first);
      checks++;
      if (rise[k] - start > len + N + 1) begin
        failures++;
        $display("FAIL cell %0d diagnosed late", k);
      end
    end
    $display("pipelined diagnosis of %0d cells in %0d clocks (sequence %0d)", N, len + N, len);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // last stage repeats the first stage N clocks later
  pin_t hist[$];
  always @(posedge tck) if (trst_n) begin
    hist.push_back('{tms, tdi, en, ex});
    if (hist.size() >= N) begin
      pin_t old;
      old = hist.pop_front();
      #1;
      checks++;
      if ({tms_o, tv_o, en_o, ex_o} != old) begin
        failures++;
        $display("FAIL chain delay");
      end
    end
  end
endmodule
