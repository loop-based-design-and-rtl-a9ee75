// diag_seq_pkg: tester-side sequences for the boundary-scan diagnosis.
//
// Builds the clock-by-clock pin values (TMS, TDI, compare enable,
// expected TDO) that a tester feeds into the first stage of the
// diagnosis chains. The TAP path is written out by hand from the
// boundary-scan state graph, independently of the RTL:
//   reset (TMS=1 five times) -> Run-Test/Idle
//   load IR: 1,1,0,0 to Shift-IR, IR_W bits (last with TMS=1), 1,0
//   per vector: 1,0,0 to Shift-DR, SCAN_LEN bits (last with TMS=1), 1,0
// The expected TDO while shifting is the previous vector's response
// under the good-cell model good_resp(); the first capture sees the
// reset value 0 of the cell inputs.
package diag_seq_pkg;

  typedef struct packed {
    logic tms;
    logic tdi;
    logic en;
    logic exp;
  } pin_t;

  localparam int SL = 16;   // scan length used by the tests

  // response of a fault-free cell to its inputs (stands in for its logic)
  function automatic logic [SL-1:0] good_resp(logic [SL-1:0] stim);
    return {stim[SL-2:0], stim[SL-1]} ^ 16'hA5C3 ^ (stim >> 3);
  endfunction

  function automatic void push(ref pin_t q[$], input logic tms, input logic tdi = 0,
                               input logic en = 0, input logic exp = 0);
    pin_t p;
    p.tms = tms; p.tdi = tdi; p.en = en; p.exp = exp;
    q.push_back(p);
  endfunction

  // reset, then load instruction ir (checking the captured 01 pattern)
  function automatic void load_ir(ref pin_t q[$], input logic [1:0] ir);
    repeat (5) push(q, 1);
    push(q, 0);                       // Run-Test/Idle
    push(q, 1); push(q, 1);           // Select-DR, Select-IR
    push(q, 0); push(q, 0);           // Capture-IR, Shift-IR
    push(q, 0, ir[0], 1, 1'b1);       // shift bit 0, captured bit 0 out
    push(q, 1, ir[1], 1, 1'b0);       // shift bit 1, to Exit1-IR
    push(q, 1); push(q, 0);           // Update-IR, Run-Test/Idle
  endfunction

  // one scan-path load: shift in stim while the previous response leaves
  function automatic void scan(ref pin_t q[$], input logic [SL-1:0] stim,
                               input logic [SL-1:0] prev_resp, input bit cmp);
    push(q, 1); push(q, 0); push(q, 0);   // Select-DR, Capture-DR, Shift-DR
    for (int b = 0; b < SL; b++)
      push(q, (b == SL - 1), stim[b], cmp, prev_resp[b]);
    push(q, 1); push(q, 0);               // Update-DR, Run-Test/Idle
  endfunction

  // a whole diagnosis: SCAN instruction, nvec random vectors, final unload
  function automatic void diagnosis(ref pin_t q[$], input int nvec);
    logic [SL-1:0] prev, s;
    load_ir(q, 2'b01);
    prev = '0;
    for (int v = 0; v < nvec; v++) begin
      s = SL'($urandom);
      scan(q, s, good_resp(prev), 1);
      prev = s;
    end
    scan(q, '0, good_resp(prev), 1);
  endfunction

  // BYPASS: TDO repeats TDI one clock later (the first bit out is 0)
  function automatic void bypass(ref pin_t q[$], input int nbits);
    logic prev, b;
    load_ir(q, 2'b11);
    push(q, 1); push(q, 0); push(q, 0);
    prev = 1'b0;
    for (int i = 0; i < nbits; i++) begin
      b = 1'($urandom);
      push(q, (i == nbits - 1), b, 1, prev);
      prev = b;
    end
    push(q, 1); push(q, 0);
  endfunction

endpackage
