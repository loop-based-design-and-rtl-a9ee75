// parallel_diag: parallel on-wafer diagnosis of N identical cells.
//
// N diag_cell stages in a row. The tester drives TMS, the test vectors and
// the results chain (expected output plus a compare enable) into stage 0;
// every stage registers them for the next, so stage k repeats stage 0's
// test k clocks later. All cells therefore run the same test in
// pipelined fashion, each comparing its own TDO against the expected bit
// that travels beside it, and fail_o[k] reports a mismatch in cell k.
// The chains' last stage outputs are brought out so that arrays can be
// concatenated. The row order of the stages is this design's own choice.
module parallel_diag #(
  parameter int unsigned N        = 256,
  parameter int unsigned SCAN_LEN = 16
) (
  input  logic                tck,
  input  logic                trst_n,
  input  logic                tms_i,
  input  logic                tv_i,
  input  logic                exp_en_i,
  input  logic                exp_i,
  output logic                tms_o,
  output logic                tv_o,
  output logic                exp_en_o,
  output logic                exp_o,
  output logic [SCAN_LEN-1:0] stim_o [N],
  input  logic [SCAN_LEN-1:0] resp_i [N],
  output logic [N-1:0]        tdo_o,
  output logic [N-1:0]        fail_o
);

  logic [N:0] tms_c, tv_c, en_c, exp_c;
  assign tms_c[0] = tms_i;
  assign tv_c[0]  = tv_i;
  assign en_c[0]  = exp_en_i;
  assign exp_c[0] = exp_i;

  for (genvar k = 0; k < N; k++) begin : g_cell
    diag_cell #(.SCAN_LEN(SCAN_LEN)) u_cell (
      .tck, .trst_n,
      .tms_i    (tms_c[k]),  .tms_o    (tms_c[k+1]),
      .tv_i     (tv_c[k]),   .tv_o     (tv_c[k+1]),
      .exp_en_i (en_c[k]),   .exp_en_o (en_c[k+1]),
      .exp_i    (exp_c[k]),  .exp_o    (exp_c[k+1]),
      .stim_o   (stim_o[k]),
      .resp_i   (resp_i[k]),
      .tdo_o    (tdo_o[k]),
      .fail_o   (fail_o[k])
    );
  end

  assign tms_o    = tms_c[N];
  assign tv_o     = tv_c[N];
  assign exp_en_o = en_c[N];
  assign exp_o    = exp_c[N];

endmodule
