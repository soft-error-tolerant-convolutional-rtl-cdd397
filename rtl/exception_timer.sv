// exception_timer: detects system exceptions of one base network.
//
// A base accelerator hit by a soft error in its control, data mover or
// instruction logic may hang (time out) or raise its output enable too early
// (early termination). The timer is a cycle counter started with each image;
// it checks that the network's output enable arrives inside the normal time
// window [T_MIN, T_MAX], measured in advance for that network. The cycle
// counter and the window check follow the published combiner; the inclusive
// window bounds and the flag encoding are this design's choices.
//
// Interface and timing:
//   start    one-cycle pulse when the image is issued; restarts the count
//   en       the network's output enable (only its first assertion after
//            start is checked)
//   ok       en came k cycles after start with T_MIN <= k <= T_MAX
//   early    en came with k < T_MIN
//   timeout  no en by k = T_MAX; raised in the cycle after k = T_MAX
//   running  counting, no verdict yet
// Verdict flags are registered: they rise one clock after the deciding edge
// and hold until the next start.
module exception_timer
  import ensemble_pkg::*;
#(
  parameter int          CNT_W = TIMER_W,
  parameter int unsigned T_MIN = DEF_T_MIN[0],
  parameter int unsigned T_MAX = DEF_T_MAX[0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic en,
  output logic running,
  output logic ok,
  output logic early,
  output logic timeout
);

  logic [CNT_W-1:0] cnt;   // cycles since start, seen as k at edge k

  initial begin
    assert (T_MIN <= T_MAX) else $error("exception_timer: empty window");
    assert (CNT_W >= 32 || T_MAX < (32'd1 << CNT_W)) else $error("exception_timer: CNT_W too small");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      running <= 1'b0;
      ok      <= 1'b0;
      early   <= 1'b0;
      timeout <= 1'b0;
    end else if (start) begin
      cnt     <= CNT_W'(1);
      running <= 1'b1;
      ok      <= 1'b0;
      early   <= 1'b0;
      timeout <= 1'b0;
    end else if (running) begin
      if (en) begin
        running <= 1'b0;
        if (cnt < CNT_W'(T_MIN)) early <= 1'b1;
        else                     ok    <= 1'b1;
      end else if (cnt >= CNT_W'(T_MAX)) begin
        running <= 1'b0;
        timeout <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
