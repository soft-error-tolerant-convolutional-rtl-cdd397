// tb_combiner: three base networks with short time windows feed the robust
// combiner. A behavioural model (ens_tb_pkg plus the timer and mismatch rules)
// predicts the label, the winning sum and which networks are excluded. The
// test covers fault-free images, time out, early termination, a network with
// a run of wrong decisions (excluded after the fifth consecutive mismatch), a
// run broken by a match, clear_faults, all networks excluded (label 0, sum 0),
// random images, and the 11-clock latency from the last score word to
// out_valid.
module tb_combiner;
  import ensemble_pkg::*;
  import ens_tb_pkg::*;

  localparam int N = 3;
  localparam int unsigned TMIN [MAX_NETS] = '{20, 30, 40, 50};
  localparam int unsigned TMAX [MAX_NETS] = '{40, 50, 60, 70};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   rst_n, start, clear_faults, busy, out_valid;
  logic   en [N];
  score_t score [N];
  label_t out_label;
  sum_t   out_sum;
  label_t net_label [N];
  logic   net_early [N], net_timeout [N], net_excluded [N];
  int checks = 0, failures = 0;

  combiner #(.NUM_NETS(N), .CNT_W(8), .T_MIN(TMIN), .T_MAX(TMAX)) dut (.*);

  // ---- stimulus: network i sends its ten words from edge delay[i] on ----
  int      delay [N];
  scores_t sc [4];
  int      tk;
  always_ff @(posedge clk) tk <= start ? 1 : (tk < 100000 ? tk + 1 : tk);
  always_comb
    for (int i = 0; i < N; i++) begin
      en[i]    = delay[i] >= 0 && tk >= delay[i] && tk < delay[i] + 10;
      score[i] = en[i] ? score_t'(sc[i][tk - delay[i]]) : score_t'($urandom);
    end

  // ---- model state ----
  bit m_excl [N];
  int m_cnt  [N];

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

  task automatic image(int d0, int d1, int d2, int p0, int p1, int p2);
    bit trusted [4];
    bit exc [N];
    int exp_label, k_out, k_last;
    int unsigned exp_sum;
    bit all_on_time;
    delay = '{d0, d1, d2};
    sc[0] = rand_scores(p0); sc[1] = rand_scores(p1); sc[2] = rand_scores(p2); sc[3] = rand_scores(-1);
    trusted = '{0, 0, 0, 0};
    all_on_time = 1; k_last = 0;
    for (int i = 0; i < N; i++) begin
      exc[i] = 0;
      if (!m_excl[i]) begin
        if (delay[i] < 0 || delay[i] > int'(TMAX[i]) || delay[i] < int'(TMIN[i])) begin
          exc[i] = 1; all_on_time = 0;
        end else begin
          trusted[i] = 1;
          if (delay[i] + 9 > k_last) k_last = delay[i] + 9;
        end
      end
    end
    exp_label = ens_decide(sc, trusted, N, exp_sum);
    // run
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
    check(int'(out_label) == exp_label && int'(out_sum) == int'(exp_sum),
          $sformatf("label %0d sum %0d, expected %0d %0d", out_label, out_sum, exp_label, exp_sum));
    if (all_on_time && k_last > 0)
      check(k_out == k_last + 11, $sformatf("latency %0d, expected %0d", k_out - k_last, 11));
    for (int i = 0; i < N; i++) begin
      if (!m_excl[i])
        check(net_early[i] == (delay[i] >= 0 && delay[i] < int'(TMIN[i])),
              $sformatf("net%0d early flag", i));
      if (trusted[i]) begin
        check(int'(net_label[i]) == argmax(sc[i]), $sformatf("net%0d own label", i));
        if (argmax(sc[i]) != exp_label) m_cnt[i]++;
        else                            m_cnt[i] = 0;
        if (m_cnt[i] > 4) m_excl[i] = 1;
      end
      if (exc[i]) m_excl[i] = 1;
    end
    @(posedge clk); #1;
    for (int i = 0; i < N; i++)
      check(net_excluded[i] == m_excl[i], $sformatf("net%0d excluded=%b model %b", i, net_excluded[i], m_excl[i]));
  endtask

  task automatic clear();
    clear_faults = 1'b1;
    @(posedge clk); #1;
    clear_faults = 1'b0;
    m_excl = '{0, 0, 0};
    m_cnt  = '{0, 0, 0};
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; clear_faults = 1'b0;
    delay = '{-1, -1, -1};
    m_excl = '{0, 0, 0};
    m_cnt  = '{0, 0, 0};
    repeat (3) @(posedge clk); #1;
    rst_n = 1'b1;
    // fault-free
    image(30, 40, 50, 3, 3, 3);
    image(20, 30, 40, 1, 2, 1);
    image(40, 50, 60, -1, -1, -1);
    // network 2 hangs, then stays excluded
    image(25, 35, -1, 4, 4, 6);
    check(net_timeout[2], "net2 timeout flag");
    image(25, 35, 45, 5, 5, 7);
    clear();
    // network 1 terminates early
    image(25, 10, 45, 2, 8, 2);
    clear();
    // network 0 keeps disagreeing with the other two: excluded after five
    for (int n = 0; n < 5; n++) image(30, 40, 50, 9, 2, 2);
    check(net_excluded[0], "net0 excluded after 5 mismatches");
    // now network 0 would decide the vote if it still counted
    image(30, 40, 50, 7, 1, 2);
    clear();
    // four mismatches, a match, four more: not excluded
    for (int n = 0; n < 4; n++) image(30, 40, 50, 9, 2, 2);
    image(30, 40, 50, 2, 2, 2);
    for (int n = 0; n < 4; n++) image(30, 40, 50, 9, 2, 2);
    check(!net_excluded[0], "net0 kept after broken run");
    clear();
    // every network fails: label 0, sum 0
    image(-1, 5, -1, 1, 1, 1);
    image(30, 40, 50, 1, 1, 1);
    clear();
    // random traffic
    for (int n = 0; n < 60; n++)
      image($urandom_range(18, 42), $urandom_range(28, 52), $urandom_range(38, 62),
            $urandom_range(0, 10) - 1, $urandom_range(0, 10) - 1, $urandom_range(0, 10) - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
