// tb_ensemble_top_full: one complete classification with the top at its
// default configuration: three base accelerators (ResNet 20, 32, 44) with
// 512-parallelism PE arrays and the time windows of a 200 MHz clock. Each PE
// array computes one 3x3x8 convolution pixel per row; the accelerators then
// deliver their class scores at their nominal processing times (3.2, 4.8 and
// 6.7 ms = 640 000, 960 000 and 1 340 000 cycles), and the final label and
// sum must match the reference model, 12 clocks after the last score word.
// Meanwhile each accelerator reads 8 instruction bursts; ResNet 20 and 32
// share general-purpose port 0, ResNet 44 has port 1.
module tb_ensemble_top_full;
  import ensemble_pkg::*;
  import ens_tb_pkg::*;

  localparam int N = 3, P = 4, N_IC = 8, N_OC = 8, ACC_W = 32;

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

  ensemble_top dut (.*);

  int      delay [N] = '{640000, 960000, 1340000};
  scores_t sc [4];
  int      tk;
  always_ff @(posedge clk) tk <= start ? 1 : (tk < 2000000 ? tk + 1 : tk);
  always_comb
    for (int i = 0; i < N; i++) begin
      net_en[i]    = tk >= delay[i] && tk < delay[i] + 10;
      net_score[i] = net_en[i] ? score_t'(sc[i][tk - delay[i]]) : score_t'(0);
    end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  int ifm  [N][P+2][3][N_IC];
  int kern [N][N_OC][3][3][N_IC];

  initial begin
    bit trusted [4] = '{1, 1, 1, 0};
    int exp_label, k_out;
    int unsigned exp_sum;
    rst_n = 1'b0; start = 1'b0; clear_faults = 1'b0;
    for (int n = 0; n < N; n++) begin
      pe_in_valid[n] = 1'b0; pe_acc_clear[n] = 1'b0; pe_in_last[n] = 1'b0;
      foreach (pe_act[n][p, c]) pe_act[n][p][c] = '0;
      foreach (pe_wgt[n][o, c]) pe_wgt[n][o][c] = '0;
    end
    sc[0] = rand_scores(6); sc[1] = rand_scores(6); sc[2] = rand_scores(3); sc[3] = rand_scores(-1);
    exp_label = ens_decide(sc, trusted, N, exp_sum);
    foreach (ifm[n, y, x, c]) ifm[n][y][x][c] = $urandom_range(0, 255) - 128;
    foreach (kern[n, o, y, x, c]) kern[n][o][y][x][c] = $urandom_range(0, 255) - 128;
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    fetch_bursts = 8; fetch_go = 1'b1;
    start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0;
    // the PE arrays work while the combiner's timers run
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
      check(pe_out_valid[n], "PE array done");
      for (int p = 0; p < P; p++)
        for (int o = 0; o < N_OC; o++) begin
          int r;
          r = 0;
          for (int t = 0; t < 9; t++)
            for (int c = 0; c < N_IC; c++) r += ifm[n][p + t / 3][t % 3][c] * kern[n][o][t / 3][t % 3][c];
          check(pe_acc[n][p][o] == r, $sformatf("acc%0d pe%0d oc%0d conv", n, p, o));
        end
    end
    wait (out_valid);
    #1;
    k_out = tk - 1;   // edge index at which out_valid became visible
    check(int'(out_label) == exp_label && int'(out_sum) == int'(exp_sum) && !disagree,
          $sformatf("label %0d sum %0d expected %0d %0d", out_label, out_sum, exp_label, exp_sum));
    check(k_out == delay[2] + 9 + 12, $sformatf("latency: result at %0d", k_out));
    for (int i = 0; i < N; i++)
      check(!net_excluded[0][i] && !net_early[0][i] && !net_timeout[0][i], "no network flagged");
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
