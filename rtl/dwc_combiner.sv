// dwc_combiner: combiner protected by duplication with comparison (DWC).
//
// The combiner is the one part of the ensemble that every decision passes
// through, so it is duplicated: two identical copies of the robust combiner
// receive the same score streams, and compare_select picks the final label
// (agreeing labels pass; differing labels are resolved in favour of the copy
// with the larger winning sum, and the other copy is reported for repair).
// The structure follows the published DWC combiner; the repair report and the
// exposure of both copies' per-network flags are this design's choices.
//
// Interface: as combiner for the inputs. out_valid/out_label/out_sum come from
// compare_select, one clock after the copies' out_valid (12 clocks after the
// edge that takes in the last score word). repair[c] asks for copy c to be
// repaired (e.g. reconfigured). Per-network flags of both copies are brought
// out for monitoring.
module dwc_combiner
  import ensemble_pkg::*;
#(
  parameter int          NUM_NETS = 3,
  parameter int          C_T      = DEF_C_T,
  parameter int          CNT_W    = TIMER_W,
  parameter int unsigned T_MIN [MAX_NETS] = DEF_T_MIN,
  parameter int unsigned T_MAX [MAX_NETS] = DEF_T_MAX
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  logic   clear_faults,
  input  logic   en    [NUM_NETS],
  input  score_t score [NUM_NETS],
  output logic   busy,
  output logic   out_valid,
  output label_t out_label,
  output sum_t   out_sum,
  output logic   disagree,
  output logic [1:0] repair,
  output logic   net_early    [2][NUM_NETS],
  output logic   net_timeout  [2][NUM_NETS],
  output logic   net_excluded [2][NUM_NETS]
);

  logic   c_valid [2];
  label_t c_label [2];
  sum_t   c_sum   [2];
  logic   c_busy  [2];
  label_t c_net_label [2][NUM_NETS];

  combiner #(
    .NUM_NETS(NUM_NETS), .C_T(C_T), .CNT_W(CNT_W), .T_MIN(T_MIN), .T_MAX(T_MAX)
  ) u_comb0 (
    .clk, .rst_n, .start, .clear_faults, .en, .score,
    .busy         (c_busy[0]),
    .out_valid    (c_valid[0]),
    .out_label    (c_label[0]),
    .out_sum      (c_sum[0]),
    .net_label    (c_net_label[0]),
    .net_early    (net_early[0]),
    .net_timeout  (net_timeout[0]),
    .net_excluded (net_excluded[0])
  );

  combiner #(
    .NUM_NETS(NUM_NETS), .C_T(C_T), .CNT_W(CNT_W), .T_MIN(T_MIN), .T_MAX(T_MAX)
  ) u_comb1 (
    .clk, .rst_n, .start, .clear_faults, .en, .score,
    .busy         (c_busy[1]),
    .out_valid    (c_valid[1]),
    .out_label    (c_label[1]),
    .out_sum      (c_sum[1]),
    .net_label    (c_net_label[1]),
    .net_early    (net_early[1]),
    .net_timeout  (net_timeout[1]),
    .net_excluded (net_excluded[1])
  );

  compare_select u_cs (
    .clk, .rst_n,
    .valid0 (c_valid[0]), .label0 (c_label[0]), .sum0 (c_sum[0]),
    .valid1 (c_valid[1]), .label1 (c_label[1]), .sum1 (c_sum[1]),
    .out_valid, .out_label, .out_sum, .disagree, .repair
  );

  assign busy = c_busy[0] | c_busy[1];

endmodule
