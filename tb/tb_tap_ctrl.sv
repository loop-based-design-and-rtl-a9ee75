// tb_tap_ctrl: self-checking test of the TAP controller.
//
// A random TMS walk of 3000 clocks is checked against the state graph of
// the boundary-scan standard, written here as a table of successor names
// (TMS = 0, TMS = 1) rather than as logic. Also checked: asynchronous
// reset, five TMS-high clocks reach Test-Logic-Reset from every state,
// and the decoded strobes.
module tb_tap_ctrl;
  import loop_pkg::*;

  logic tck = 0, trst_n = 1, tms = 1;
  always #5 tck = ~tck;

  tap_state_e st;
  logic rst_s, cdr, sdr, udr, cir, sir, uir;
  tap_ctrl dut (.tck, .trst_n, .tms_i (tms), .state_o (st), .reset_o (rst_s),
    .capture_dr_o (cdr), .shift_dr_o (sdr), .update_dr_o (udr),
    .capture_ir_o (cir), .shift_ir_o (sir), .update_ir_o (uir));

  // successor table indexed by state name
  string succ0 [string], succ1 [string];
  initial begin
    succ0["TAP_RESET"]="TAP_IDLE";           succ1["TAP_RESET"]="TAP_RESET";
    succ0["TAP_IDLE"]="TAP_IDLE";            succ1["TAP_IDLE"]="TAP_SEL_DR";
    succ0["TAP_SEL_DR"]="TAP_CAPTURE_DR";    succ1["TAP_SEL_DR"]="TAP_SEL_IR";
    succ0["TAP_CAPTURE_DR"]="TAP_SHIFT_DR";  succ1["TAP_CAPTURE_DR"]="TAP_EXIT1_DR";
    succ0["TAP_SHIFT_DR"]="TAP_SHIFT_DR";    succ1["TAP_SHIFT_DR"]="TAP_EXIT1_DR";
    succ0["TAP_EXIT1_DR"]="TAP_PAUSE_DR";    succ1["TAP_EXIT1_DR"]="TAP_UPDATE_DR";
    succ0["TAP_PAUSE_DR"]="TAP_PAUSE_DR";    succ1["TAP_PAUSE_DR"]="TAP_EXIT2_DR";
    succ0["TAP_EXIT2_DR"]="TAP_SHIFT_DR";    succ1["TAP_EXIT2_DR"]="TAP_UPDATE_DR";
    succ0["TAP_UPDATE_DR"]="TAP_IDLE";       succ1["TAP_UPDATE_DR"]="TAP_SEL_DR";
    succ0["TAP_SEL_IR"]="TAP_CAPTURE_IR";    succ1["TAP_SEL_IR"]="TAP_RESET";
    succ0["TAP_CAPTURE_IR"]="TAP_SHIFT_IR";  succ1["TAP_CAPTURE_IR"]="TAP_EXIT1_IR";
    succ0["TAP_SHIFT_IR"]="TAP_SHIFT_IR";    succ1["TAP_SHIFT_IR"]="TAP_EXIT1_IR";
    succ0["TAP_EXIT1_IR"]="TAP_PAUSE_IR";    succ1["TAP_EXIT1_IR"]="TAP_UPDATE_IR";
    succ0["TAP_PAUSE_IR"]="TAP_PAUSE_IR";    succ1["TAP_PAUSE_IR"]="TAP_EXIT2_IR";
    succ0["TAP_EXIT2_IR"]="TAP_SHIFT_IR";    succ1["TAP_EXIT2_IR"]="TAP_UPDATE_IR";
    succ0["TAP_UPDATE_IR"]="TAP_IDLE";       succ1["TAP_UPDATE_IR"]="TAP_SEL_DR";
  end

  int checks = 0, failures = 0;
  task automatic check(string what, string got, string exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %s expected %s", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int visits [string];

  initial begin
    string exp, nm;
    #1 trst_n = 0;
    #1;
    check("async reset", st.name(), "TAP_RESET");
    @(negedge tck) trst_n = 1;
    exp = "TAP_RESET";
    for (int t = 0; t < 3000; t++) begin
      tms = (t % 200 < 5) ? 1'b1 : 1'($urandom);
      @(negedge tck);
      exp = tms ? succ1[exp] : succ0[exp];
      nm = st.name();
      check("state", nm, exp);
      visits[nm] = visits.exists(nm) ? visits[nm] + 1 : 1;
      check("reset strobe",      rst_s ? "1" : "0", nm == "TAP_RESET"      ? "1" : "0");
      check("capture-dr strobe", cdr ? "1" : "0",   nm == "TAP_CAPTURE_DR" ? "1" : "0");
      check("shift-dr strobe",   sdr ? "1" : "0",   nm == "TAP_SHIFT_DR"   ? "1" : "0");
      check("update-dr strobe",  udr ? "1" : "0",   nm == "TAP_UPDATE_DR"  ? "1" : "0");
      check("capture-ir strobe", cir ? "1" : "0",   nm == "TAP_CAPTURE_IR" ? "1" : "0");
      check("shift-ir strobe",   sir ? "1" : "0",   nm == "TAP_SHIFT_IR"   ? "1" : "0");
      check("update-ir strobe",  uir ? "1" : "0",   nm == "TAP_UPDATE_IR"  ? "1" : "0");
    end
    // five TMS-high clocks from anywhere
    for (int t = 0; t < 50; t++) begin
      tms = 0;
      repeat ($urandom_range(1, 7)) begin
        tms = 1'($urandom);
        @(negedge tck);
      end
      tms = 1;
      repeat (5) @(negedge tck);
      check("five ones reset", st.name(), "TAP_RESET");
    end
    // asynchronous reset in the middle of a shift
    tms = 0; repeat (3) @(negedge tck);
    #2 trst_n = 0; #1;
    check("async reset mid-run", st.name(), "TAP_RESET");
    trst_n = 1;
    checks++;
    if (visits.num() != 16) begin
      failures++;
      $display("FAIL only %0d states visited", visits.num());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
