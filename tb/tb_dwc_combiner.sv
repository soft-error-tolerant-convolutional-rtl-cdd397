// tb_dwc_combiner: two combiner copies and the compare & select block.
// Fault-free images must agree; then soft errors are emulated in one copy by
// forcing the outputs of one copy: a copy stuck at label 0 / sum 0 (faulty
// reset/start control), and a copy that delivers another label with a
// smaller winning sum (its sum state machine dropped scores). In every case the final label must equal the fault-free
// ensemble decision, and when the copies disagree the faulty copy must be the
// one reported for repair.
module tb_dwc_combiner;
  import ensemble_pkg::*;
  import ens_tb_pkg::*;

  localparam int N = 3;
  localparam int unsigned TMIN [MAX_NETS] = '{20, 30, 40, 50};
  localparam int unsigned TMAX [MAX_NETS] = '{40, 50, 60, 70};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   rst_n, start, clear_faults, busy, out_valid, disagree;
  logic   en [N];
  score_t score [N];
  label_t out_label;
  sum_t   out_sum;
  logic [1:0] repair;
  logic   net_early [2][N], net_timeout [2][N], net_excluded [2][N];
  int checks = 0, failures = 0;
  int disagreements = 0;
  int wrong_copy = -1;    // copy whose label/sum are replaced by a wrong, smaller result

  dwc_combiner #(.NUM_NETS(N), .CNT_W(8), .T_MIN(TMIN), .T_MAX(TMAX)) dut (.*);

  int      delay [N];
  scores_t sc [4];
  int      tk;
  always_ff @(posedge clk) tk <= start ? 1 : (tk < 100000 ? tk + 1 : tk);
  always_comb
    for (int i = 0; i < N; i++) begin
      en[i]    = delay[i] >= 0 && tk >= delay[i] && tk < delay[i] + 10;
      score[i] = en[i] ? score_t'(sc[i][tk - delay[i]]) : score_t'(0);
    end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // bad_copy: which copy is faulty (-1: none)
  task automatic image(int bad_copy);
    bit trusted [4] = '{1, 1, 1, 0};
    int exp_label, k_out;
    int unsigned exp_sum;
    int p;
    delay = '{$urandom_range(20, 40), $urandom_range(30, 50), $urandom_range(40, 60)};
    p = $urandom_range(1, 9);   // common favourite, never class 0
    for (int i = 0; i < N; i++) sc[i] = rand_scores($urandom_range(0, 3) == 0 ? -1 : p);
    exp_label = ens_decide(sc, trusted, N, exp_sum);
    if (wrong_copy == 1) begin
      force dut.c_label[1] = label_t'((exp_label + 1 + $urandom_range(0, 8)) % 10);
      force dut.c_sum[1]   = sum_t'($urandom_range(0, exp_sum - 1));
    end
    while (busy) @(posedge clk);
    #1 start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    k_out = -1;
    for (int k = 1; k < 400 && k_out < 0; k++) begin
      @(posedge clk); #1;
      if (out_valid) k_out = k;
    end
    check(k_out > 0, "out_valid seen");
    if (wrong_copy == 1) begin
      release dut.c_label[1];
      release dut.c_sum[1];
    end
    check(int'(out_label) == exp_label,
          $sformatf("final label %0d expected %0d (bad copy %0d)", out_label, exp_label, bad_copy));
    if (bad_copy < 0) begin
      check(!disagree && repair == 2'b00, "fault-free copies agree");
      check(int'(out_sum) == int'(exp_sum), "fault-free sum");
    end else if (disagree) begin
      disagreements++;
      check(repair == (2'b01 << bad_copy), $sformatf("repair %b for bad copy %0d", repair, bad_copy));
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; clear_faults = 1'b0;
    delay = '{-1, -1, -1};
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    repeat (10) image(-1);
    // copy 1: control logic fault, result stuck at label 0 / sum 0
    force dut.c_label[1] = '0;
    force dut.c_sum[1]   = '0;
    repeat (10) image(1);
    release dut.c_label[1];
    release dut.c_sum[1];
    // copy 0 stuck in the same way
    force dut.c_label[0] = '0;
    force dut.c_sum[0]   = '0;
    repeat (10) image(0);
    release dut.c_label[0];
    release dut.c_sum[0];
    // copy 1: sum state machine drops scores, giving another label with a
    // smaller winning sum
    wrong_copy = 1;
    repeat (30) image(1);
    wrong_copy = -1;
    repeat (5) image(-1);
    check(disagreements >= 20, $sformatf("faults caused disagreements (%0d)", disagreements));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
