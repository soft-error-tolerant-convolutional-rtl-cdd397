// combiner: robust combiner of NUM_NETS base CNN classifiers.
//
// Each base network delivers ten class scores per image. In the fault-free
// case the ensemble decision is the class with the largest score sum (the
// same as the largest average). Around this sum/arg-max core the combiner
// removes networks that have failed:
//   * system exceptions: one exception_timer per network checks that the
//     network's output enable arrives inside its normal time window; a
//     network that times out or terminates early is left out;
//   * accuracy loss: one mismatch_counter per network compares the network's
//     own decision with the ensemble label after every image; more than C_T
//     consecutive mismatches exclude the network.
// The sum state machine then adds, category by category, only the scores of
// the networks that are still trusted. If no network is trusted the result is
// label 0 with sum 0.
//
// Taken from the published combiner: score summation per category, arg-max,
// per-network timers on the output enable, consecutive-mismatch counters with
// C_T = 4, removal of flagged networks from the sum. This design's own
// choices: scores are buffered per network so the networks may finish at
// different times; one category is summed per clock; ties go to the lower
// class index; a network flagged for an exception or for mismatches stays
// excluded until clear_faults (the network is assumed to need repair).
//
// Interface:
//   start         one-cycle pulse: an image has been issued to all networks;
//                 accepted only while busy is low
//   en[i], score[i]  network i's score stream: one score per cycle while
//                 en[i] is high, class 0 first, ten words per image
//   out_valid     one-cycle pulse with out_label / out_sum (held afterwards)
//   net_label[i]  network i's own decision for the last image
//   net_early/net_timeout[i]  exception verdicts of the current image
//   net_excluded[i]  network i is currently left out of the sum
// Timing: the combiner waits until every network has delivered ten words, has
// been flagged, or is excluded; out_valid rises 11 clocks after the clock
// edge that takes in the last score word (1 clock to leave collection,
// 10 clocks of summation; the result shows in the following cycle).
module combiner
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
  output label_t net_label    [NUM_NETS],
  output logic   net_early    [NUM_NETS],
  output logic   net_timeout  [NUM_NETS],
  output logic   net_excluded [NUM_NETS]
);

  initial begin
    assert (NUM_NETS >= 1 && NUM_NETS <= MAX_NETS)
      else $error("combiner: NUM_NETS out of range");
  end

  typedef enum logic [1:0] {S_IDLE, S_COLLECT, S_SUM, S_DONE} state_t;
  state_t state;

  localparam int WIDX_W = $clog2(NUM_CLASSES + 1);

  logic              start_acc;
  logic [WIDX_W-1:0] widx     [NUM_NETS];       // score words received
  score_t            sbuf     [NUM_NETS][NUM_CLASSES];
  logic              t_run    [NUM_NETS];
  logic              t_ok     [NUM_NETS];
  logic              exc_hold [NUM_NETS];       // sticky exception exclusion
  logic              mc_excl  [NUM_NETS];
  logic              use_net  [NUM_NETS];
  logic              ready    [NUM_NETS];
  logic              all_ready;
  logic              upd;
  logic [LABEL_W-1:0] kidx;
  score_t            nbest    [NUM_NETS];
  sum_t              best_sum;
  sum_t              cur_sum;

  assign start_acc = start && (state == S_IDLE);
  assign busy      = (state != S_IDLE);
  assign upd       = (state == S_DONE);
  assign out_valid = (state == S_DONE);
  assign out_sum   = best_sum;

  for (genvar i = 0; i < NUM_NETS; i++) begin : g_net
    exception_timer #(.CNT_W(CNT_W), .T_MIN(T_MIN[i]), .T_MAX(T_MAX[i])) u_timer (
      .clk     (clk),
      .rst_n   (rst_n),
      .start   (start_acc),
      .en      (en[i] && widx[i] == '0 && state == S_COLLECT),
      .running (t_run[i]),
      .ok      (t_ok[i]),
      .early   (net_early[i]),
      .timeout (net_timeout[i])
    );

    mismatch_counter #(.C_T(C_T)) u_mcnt (
      .clk      (clk),
      .rst_n    (rst_n),
      .clear    (clear_faults),
      .upd      (upd && use_net[i]),
      .mismatch (net_label[i] != out_label),
      .count    (),
      .excluded (mc_excl[i])
    );

    assign net_excluded[i] = mc_excl[i] | exc_hold[i];
    assign use_net[i] = !net_excluded[i] && t_ok[i] && widx[i] == WIDX_W'(NUM_CLASSES);
    assign ready[i]   = net_excluded[i] || net_early[i] || net_timeout[i] ||
                        widx[i] == WIDX_W'(NUM_CLASSES);

    // Score buffer: words are taken while the timer has not rejected the net.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        widx[i] <= '0;
      end else if (start_acc) begin
        widx[i] <= '0;
      end else if (state == S_COLLECT && en[i] && widx[i] < WIDX_W'(NUM_CLASSES) &&
                   (t_run[i] || t_ok[i])) begin
        widx[i] <= widx[i] + 1'b1;
      end
    end

    always_ff @(posedge clk) begin
      if (state == S_COLLECT && en[i] && widx[i] < WIDX_W'(NUM_CLASSES))
        sbuf[i][widx[i]] <= score[i];
    end

    // Sticky exclusion after a system exception, until repaired.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)            exc_hold[i] <= 1'b0;
      else if (clear_faults) exc_hold[i] <= 1'b0;
      else if (upd && (net_early[i] || net_timeout[i])) exc_hold[i] <= 1'b1;
    end

    // Network's own decision, scanned alongside the ensemble sum.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        nbest[i]     <= '0;
        net_label[i] <= '0;
      end else if (state == S_SUM) begin
        if (kidx == '0 || sbuf[i][kidx] > nbest[i]) begin
          nbest[i]     <= sbuf[i][kidx];
          net_label[i] <= kidx;
        end
      end
    end
  end

  always_comb begin
    all_ready = 1'b1;
    for (int i = 0; i < NUM_NETS; i++) all_ready &= ready[i];
  end

  // Sum of the trusted networks' scores for category kidx.
  always_comb begin
    cur_sum = '0;
    for (int i = 0; i < NUM_NETS; i++)
      if (use_net[i]) cur_sum = cur_sum + SUM_W'(sbuf[i][kidx]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      kidx      <= '0;
      best_sum  <= '0;
      out_label <= '0;
    end else begin
      unique case (state)
        S_IDLE:    if (start_acc) state <= S_COLLECT;
        S_COLLECT: if (all_ready) begin
                     state <= S_SUM;
                     kidx  <= '0;
                   end
        S_SUM: begin
          if (kidx == '0 || cur_sum > best_sum) begin
            best_sum  <= cur_sum;
            out_label <= kidx;
          end
          if (kidx == LABEL_W'(NUM_CLASSES - 1)) state <= S_DONE;
          else                                   kidx  <= kidx + 1'b1;
        end
        S_DONE:    state <= S_IDLE;
        default:   state <= S_IDLE;
      endcase
    end
  end

endmodule
