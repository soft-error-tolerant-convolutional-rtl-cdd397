// tb_ensemble_top: end-to-end run of the ensemble system with three base
// accelerators, at reduced time windows so that images take tens of cycles.
// For every image each accelerator's PE array computes a 3x3x8 convolution
// for 8 output channels on its 4 rows (checked against a direct model), then
// the accelerators deliver their class scores to the DWC combiner, whose
// label is checked against a behavioural model of the robust combination.
// The mechanisms of the design are each made to happen and counted:
// fault-free vote, time out, early termination, exclusion after consecutive
// mismatches, a combiner copy disagreeing (and reported for repair),
// clear_faults, the fall-back to label 0 when no network is left, and two
// accelerators fetching instructions through one shared AXI port at once
// (checked beat by beat by the fetch models).
module tb_ensemble_top;
  import ensemble_pkg::*;
  import ens_tb_pkg::*;

  localparam int N = 3, P = 4, N_IC = 8, N_OC = 8, ACC_W = 32;
  localparam int unsigned TMIN [MAX_NETS] = '{40, 60, 80, 100};
  localparam int unsigned TMAX [MAX_NETS] = '{60, 80, 100, 120};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   rst_n, start, clear_faults, busy, out_valid, disagree;
  logic   pe_in_valid [N], pe_acc_clear [N], pe_in_last [N], pe_out_valid [N];
  data_t  pe_act [N][P][N_IC];
  data_t  pe_wgt [N][N_OC][N_IC];
  logic signed [ACC_W-1:0] pe_acc [N][P][N_OC];
  logic   net_en [N];
  score_t net_score [N];
  label_t out_label;
  sum_t   out_sum;
  logic [1:0] repair;
  logic   net_early [2][N], net_timeout [2][N], net_excluded [2][N];
  int checks = 0, failures = 0;
  localparam int SHARE_A = 0, SHARE_B = 1;   // the two networks on port 0

  // instruction fetch: accelerator models and general-purpose port models
  logic    inst_arvalid [N], inst_arready [N], inst_rvalid [N], inst_rready [N];
  axi_ar_t inst_ar [N];
  axi_r_t  inst_r [N];
  logic    gp_arvalid [NUM_GP], gp_arready [NUM_GP], gp_rvalid [NUM_GP], gp_rready [NUM_GP];
  axi_ar_t gp_ar [NUM_GP];
  axi_r_t  gp_r [NUM_GP];
  logic    fetch_go = 1'b0;
  int      fetch_bursts = 0;
  int      fetch_done [N], fetch_err [N];
  int      gp_bursts [NUM_GP] = '{0, 0};
  int      gp_contention = 0;
  for (genvar n = 0; n < N; n++) begin : g_fetch
    inst_fetch_model #(.BASE(32'h1000_0000 * (n + 1))) u_m (
      .clk, .rst_n, .go (fetch_go), .bursts (fetch_bursts),
      .arvalid (inst_arvalid[n]), .arready (inst_arready[n]), .ar (inst_ar[n]),
      .rvalid (inst_rvalid[n]), .rready (inst_rready[n]), .r (inst_r[n]),
      .done (fetch_done[n]), .errors (fetch_err[n]));
  end
  for (genvar g = 0; g < NUM_GP; g++) begin : g_gpm
    axi_rd_slave_model u_s (
      .clk, .rst_n, .arvalid (gp_arvalid[g]), .arready (gp_arready[g]), .ar (gp_ar[g]),
      .rvalid (gp_rvalid[g]), .rready (gp_rready[g]), .r (gp_r[g]));
    always @(posedge clk) if (rst_n && gp_arvalid[g] && gp_arready[g]) gp_bursts[g]++;
  end
  always @(posedge clk) if (rst_n && inst_arvalid[SHARE_A] && inst_arvalid[SHARE_B]) gp_contention++;

  ensemble_top #(.NUM_NETS(N), .P(P), .N_IC(N_IC), .N_OC(N_OC), .ACC_W(ACC_W),
                 .CNT_W(8), .T_MIN(TMIN), .T_MAX(TMAX)) dut (.*);

  // mechanism counters
  int n_conv = 0, n_vote = 0, n_timeout = 0, n_early = 0, n_mismatch_excl = 0;
  int n_dwc_disagree = 0, n_clear = 0, n_none_left = 0;

  // ---- score streams ----
  int      delay [N];
  scores_t sc [4];
  int      tk;
  always_ff @(posedge clk) tk <= start ? 1 : (tk < 100000 ? tk + 1 : tk);
  always_comb
    for (int i = 0; i < N; i++) begin
      net_en[i]    = delay[i] >= 0 && tk >= delay[i] && tk < delay[i] + 10;
      net_score[i] = net_en[i] ? score_t'(sc[i][tk - delay[i]]) : score_t'(0);
    end

  bit m_excl [N];
  int m_cnt  [N];
  int wrong_copy = -1;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // One convolution output pixel per row on all accelerators at once.
  task automatic conv_all();
    int ifm  [N][P+2][3][N_IC];
    int kern [N][N_OC][3][3][N_IC];
    foreach (ifm[n, y, x, c]) ifm[n][y][x][c] = $urandom_range(0, 255) - 128;
    foreach (kern[n, o, y, x, c]) kern[n][o][y][x][c] = $urandom_range(0, 255) - 128;
    for (int t = 0; t < 9; t++) begin
      for (int n = 0; n < N; n++) begin
        pe_in_valid[n] = 1'b1; pe_acc_clear[n] = (t == 0); pe_in_last[n] = (t == 8);
        for (int p = 0; p < P; p++)
          for (int c = 0; c < N_IC; c++) pe_act[n][p][c] = data_t'(ifm[n][p + t / 3][t % 3][c]);
        for (int o = 0; o < N_OC; o++)
          for (int c = 0; c < N_IC; c++) pe_wgt[n][o][c] = data_t'(kern[n][o][t / 3][t % 3][c]);
      end
      @(posedge clk); #1;
    end
    for (int n = 0; n < N; n++) begin
      pe_in_valid[n] = 1'b0; pe_acc_clear[n] = 1'b0; pe_in_last[n] = 1'b0;
    end
    @(posedge clk); #1;
    for (int n = 0; n < N; n++) begin
      check(pe_out_valid[n], $sformatf("acc%0d PE array done", n));
      for (int p = 0; p < P; p++)
        for (int o = 0; o < N_OC; o++) begin
          int r;
          r = 0;
          for (int t = 0; t < 9; t++)
            for (int c = 0; c < N_IC; c++) r += ifm[n][p + t / 3][t % 3][c] * kern[n][o][t / 3][t % 3][c];
          check(pe_acc[n][p][o] == r, $sformatf("acc%0d pe%0d oc%0d conv", n, p, o));
        end
    end
    n_conv++;
  endtask

  task automatic image(int d0, int d1, int d2, int p0, int p1, int p2);
    bit trusted [4];
    bit exc [N];
    int exp_label, k_out, live;
    int unsigned exp_sum;
    conv_all();
    delay = '{d0, d1, d2};
    sc[0] = rand_scores(p0); sc[1] = rand_scores(p1); sc[2] = rand_scores(p2); sc[3] = rand_scores(-1);
    trusted = '{0, 0, 0, 0};
    live = 0;
    for (int i = 0; i < N; i++) begin
      exc[i] = 0;
      if (!m_excl[i]) begin
        if (delay[i] < 0 || delay[i] > int'(TMAX[i])) begin exc[i] = 1; n_timeout++; end
        else if (delay[i] < int'(TMIN[i]))            begin exc[i] = 1; n_early++;   end
        else begin trusted[i] = 1; live++; end
      end
    end
    if (live == 0) n_none_left++;
    else           n_vote++;
    exp_label = ens_decide(sc, trusted, N, exp_sum);
    if (wrong_copy >= 0) begin
      force dut.u_comb.c_label[1] = label_t'((exp_label + 1) % 10);
      force dut.u_comb.c_sum[1]   = sum_t'(exp_sum / 2);
    end
    while (busy) @(posedge clk);
    #1 start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    k_out = -1;
    for (int k = 1; k < 1000 && k_out < 0; k++) begin
      @(posedge clk); #1;
      if (out_valid) k_out = k;
    end
    check(k_out > 0, "out_valid seen");
    check(int'(out_label) == exp_label,
          $sformatf("label %0d expected %0d", out_label, exp_label));
    if (wrong_copy < 0)
      check(int'(out_sum) == int'(exp_sum) && !disagree, "sum and agreement");
    else begin
      check(disagree && repair == 2'b10, "faulty combiner copy reported");
      if (disagree) n_dwc_disagree++;
      release dut.u_comb.c_label[1];
      release dut.u_comb.c_sum[1];
    end
    for (int i = 0; i < N; i++) begin
      if (trusted[i]) begin
        if (argmax(sc[i]) != exp_label) m_cnt[i]++;
        else                            m_cnt[i] = 0;
        if (m_cnt[i] > 4) begin m_excl[i] = 1; n_mismatch_excl++; m_cnt[i] = 0; end
      end
      if (exc[i]) m_excl[i] = 1;
    end
    @(posedge clk); #1;
    for (int i = 0; i < N; i++)
      for (int c = 0; c < 2; c++)
        check(net_excluded[c][i] == m_excl[i], $sformatf("copy%0d net%0d excluded", c, i));
  endtask

  task automatic clear();
    clear_faults = 1'b1;
    @(posedge clk); #1;
    clear_faults = 1'b0;
    m_excl = '{0, 0, 0};
    m_cnt  = '{0, 0, 0};
    n_clear++;
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; clear_faults = 1'b0;
    delay = '{-1, -1, -1};
    m_excl = '{0, 0, 0};
    m_cnt  = '{0, 0, 0};
    for (int n = 0; n < N; n++) begin
      pe_in_valid[n] = 1'b0; pe_acc_clear[n] = 1'b0; pe_in_last[n] = 1'b0;
      foreach (pe_act[n][p, c]) pe_act[n][p][c] = '0;
      foreach (pe_wgt[n][o, c]) pe_wgt[n][o][c] = '0;
    end
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    fetch_bursts = 40; fetch_go = 1'b1;
    image(50, 70, 90, 3, 3, 3);
    image(45, 65, 85, 2, 5, 2);
    image(50, 70, -1, 4, 4, 1);          // accelerator 2 hangs
    image(50, 70, 90, 6, 6, 1);          // and stays out
    clear();
    image(50, 20, 90, 7, 1, 7);          // accelerator 1 terminates early
    clear();
    for (int n = 0; n < 30 && !m_excl[0]; n++)
      image(50, 70, 90, 1, 8, 8);        // accelerator 0 keeps disagreeing
    image(50, 70, 90, 1, 1, 8);          // its vote no longer counts
    clear();
    wrong_copy = 1;                      // combiner copy 1 faulty
    repeat (3) image(50, 70, 90, 5, 5, 2);
    wrong_copy = -1;
    image(-1, 30, -1, 5, 5, 5);          // nothing left: label 0
    clear();
    repeat (10) image($urandom_range(40, 60), $urandom_range(60, 80), $urandom_range(80, 100),
                      $urandom_range(0, 10) - 1, $urandom_range(0, 10) - 1, $urandom_range(0, 10) - 1);
    $display("mechanisms: gp_contention=%0d conv=%0d vote=%0d timeout=%0d early=%0d mismatch_excl=%0d dwc=%0d clear=%0d none_left=%0d",
             gp_contention, n_conv, n_vote, n_timeout, n_early, n_mismatch_excl, n_dwc_disagree, n_clear, n_none_left);
    // instruction fetch results
    for (int w = 0; w < 100000; w++) begin
      bit all_done;
      all_done = 1;
      for (int n = 0; n < N; n++) if (fetch_done[n] < fetch_bursts) all_done = 0;
      if (all_done) break;
      @(posedge clk);
    end
    for (int n = 0; n < N; n++)
      check(fetch_done[n] == fetch_bursts && fetch_err[n] == 0,
            $sformatf("accelerator %0d instruction fetch: %0d bursts, %0d errors", n, fetch_done[n], fetch_err[n]));
    check(gp_bursts[0] == 2 * fetch_bursts && gp_bursts[1] == fetch_bursts,
          $sformatf("bursts per GP port %0d %0d", gp_bursts[0], gp_bursts[1]));
    check(gp_contention > 0, "two accelerators requested one GP port at once");
    check(n_conv > 0, "PE array used");
    check(n_vote > 0, "ensemble vote");
    check(n_timeout > 0, "time out");
    check(n_early > 0, "early termination");
    check(n_mismatch_excl > 0, "mismatch exclusion");
    check(n_dwc_disagree > 0, "DWC disagreement");
    check(n_clear > 0, "fault clear");
    check(n_none_left > 0, "no network left");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
