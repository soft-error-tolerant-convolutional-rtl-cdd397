// mismatch_counter: detects a base network that keeps disagreeing.
//
// A soft error in the PE array of a base network degrades its accuracy; a
// badly degraded network produces runs of wrong decisions. After every
// ensemble decision the combiner reports whether this network's own decision
// (arg-max of its scores) differed from the ensemble label. The counter
// counts consecutive mismatches and is reset by a match; once it is larger
// than the threshold C_T the network is excluded from the score sum. The
// consecutive count and "larger than C_T" (C_T = 4) follow the published
// combiner. Keeping the exclusion until clear (a repair of the network) and
// saturating the count are this design's choices.
//
// Interface and timing:
//   upd       one-cycle pulse: a decision with this network taking part
//   mismatch  with upd: the network's decision differed from the ensemble's
//   clear     forgets the count and the exclusion
//   count     consecutive mismatches so far (saturating)
//   excluded  registered, rises in the clock after the (C_T+1)-th
//             consecutive mismatch
module mismatch_counter #(
  parameter int C_T   = 4,
  parameter int CNT_W = $clog2(C_T + 2)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             upd,
  input  logic             mismatch,
  output logic [CNT_W-1:0] count,
  output logic             excluded
);

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic [CNT_W-1:0] next_count;

  always_comb begin
    next_count = count;
    if (upd) begin
      if (!mismatch)            next_count = '0;
      else if (count != CNT_MAX) next_count = count + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      excluded <= 1'b0;
    end else if (clear) begin
      count    <= '0;
      excluded <= 1'b0;
    end else begin
      count <= next_count;
      if (32'(next_count) > C_T) excluded <= 1'b1;
    end
  end

endmodule
