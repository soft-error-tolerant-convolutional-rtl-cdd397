// tb_ensemble_workload: the fault experiments of the ensemble, run on the
// four-network system (ResNet 20+32+44+56, NUM_NETS = 4) with time windows
// scaled down to tens of cycles. 4000 images with a ground-truth class are
// classified; each network is right on most images (scores peak at the true
// class) and wrong on a random few. The run is split into phases:
//   fault-free; network n hangs (for each n); network n terminates early (for
//   each n); network n has a corrupted datapath and answers at random until
//   its mismatch counter drops it (for each n).
// Each image's label is checked against the reference model, and the
// ensemble accuracy against the ground truth is reported per phase; with one
// failed network it must stay within 5 points of the fault-free accuracy.
// Instruction fetch runs alongside with the four-network port sharing:
// ResNet 32 and 44 on one general-purpose port, ResNet 20 and 56 on the other.
module tb_ensemble_workload;
  import ensemble_pkg::*;
  import ens_tb_pkg::*;

  localparam int N = 4, P = 4, N_IC = 8, N_OC = 8, ACC_W = 32;
  localparam int IMAGES = 4000;
  localparam int unsigned TMIN [MAX_NETS] = '{20, 30, 45, 55};
  localparam int unsigned TMAX [MAX_NETS] = '{24, 35, 50, 60};

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
  localparam int SHARE_A = 1, SHARE_B = 2;   // ResNet 32 and 44 share port 0

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

  ensemble_top #(.NUM_NETS(N), .CNT_W(8), .T_MIN(TMIN), .T_MAX(TMAX),
                 .GP_SLOT('{'{1, 2}, '{0, 3}})) dut (.*);

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

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // mode: 0 fault-free, 1 hang, 2 early, 3 corrupted datapath (network bad)
  task automatic image(int mode, int bad, output bit correct);
    bit trusted [4];
    bit exc [N];
    int exp_label, truth;
    int unsigned exp_sum;
    // per-network accuracy roughly 90 %, 92 %, 92 %, 93 %
    int right_pct [4] = '{90, 92, 92, 93};
    truth = $urandom_range(0, 9);
    for (int i = 0; i < N; i++) begin
      int p;
      p = ($urandom_range(1, 100) <= right_pct[i]) ? truth : $urandom_range(0, 9);
      if (mode == 3 && i == bad) p = $urandom_range(0, 9);
      sc[i] = rand_scores(p);
      delay[i] = $urandom_range(TMIN[i], TMAX[i]);
    end
    if (mode == 1) delay[bad] = -1;
    if (mode == 2) delay[bad] = 5;
    trusted = '{0, 0, 0, 0};
    for (int i = 0; i < N; i++) begin
      exc[i] = 0;
      if (!m_excl[i]) begin
        if (delay[i] < 0 || delay[i] > int'(TMAX[i]) || delay[i] < int'(TMIN[i])) exc[i] = 1;
        else trusted[i] = 1;
      end
    end
    exp_label = ens_decide(sc, trusted, N, exp_sum);
    while (busy) @(posedge clk);
    #1 start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    while (!out_valid) @(posedge clk);
    #1;
    check(int'(out_label) == exp_label && int'(out_sum) == int'(exp_sum),
          $sformatf("label %0d/%0d expected %0d/%0d", out_label, out_sum, exp_label, exp_sum));
    correct = (int'(out_label) == truth);
    for (int i = 0; i < N; i++) begin
      if (trusted[i]) begin
        if (argmax(sc[i]) != exp_label) m_cnt[i]++;
        else                            m_cnt[i] = 0;
        if (m_cnt[i] > 4) m_excl[i] = 1;
      end
      if (exc[i]) m_excl[i] = 1;
    end
  endtask

  task automatic clear();
    clear_faults = 1'b1;
    @(posedge clk); #1;
    clear_faults = 1'b0;
    m_excl = '{0, 0, 0, 0};
    m_cnt  = '{0, 0, 0, 0};
  endtask

  initial begin
    int per_phase, hits, base_hits;
    bit c;
    string names [4] = '{"fault-free", "hang", "early termination", "corrupted datapath"};
    rst_n = 1'b0; start = 1'b0; clear_faults = 1'b0;
    delay = '{-1, -1, -1, -1};
    m_excl = '{0, 0, 0, 0};
    m_cnt  = '{0, 0, 0, 0};
    for (int n = 0; n < N; n++) begin
      pe_in_valid[n] = 1'b0; pe_acc_clear[n] = 1'b0; pe_in_last[n] = 1'b0;
      foreach (pe_act[n][p, ch]) pe_act[n][p][ch] = '0;
      foreach (pe_wgt[n][o, ch]) pe_wgt[n][o][ch] = '0;
    end
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    fetch_bursts = 30; fetch_go = 1'b1;
    per_phase = IMAGES / 13;       // 1 fault-free phase + 3 fault kinds x 4 networks
    base_hits = 0;
    for (int k = 0; k < per_phase; k++) begin image(0, 0, c); base_hits += c; end
    $display("%s: accuracy %0d/%0d", names[0], base_hits, per_phase);
    for (int mode = 1; mode <= 3; mode++)
      for (int bad = 0; bad < N; bad++) begin
        clear();
        hits = 0;
        for (int k = 0; k < per_phase; k++) begin image(mode, bad, c); hits += c; end
        $display("%s of network %0d: accuracy %0d/%0d, excluded=%b", names[mode], bad, hits,
                 per_phase, net_excluded[0][bad]);
        check(net_excluded[0][bad] && net_excluded[1][bad],
              $sformatf("failed network %0d excluded", bad));
        check(hits * 100 >= base_hits * 100 - 5 * per_phase,
              $sformatf("accuracy with network %0d failed", bad));
      end
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
    check(gp_bursts[0] == 2 * fetch_bursts && gp_bursts[1] == 2 * fetch_bursts,
          $sformatf("bursts per GP port %0d %0d", gp_bursts[0], gp_bursts[1]));
    check(gp_contention > 0, "two accelerators requested one GP port at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
