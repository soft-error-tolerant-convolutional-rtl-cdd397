// compare_select: final block of the duplicated (DWC) combiner.
//
// Two identical combiners each deliver a label L and the sum score S that
// won. A soft error in a combiner copy almost always makes its label wrong
// together with a sum that is smaller than the fault-free one (a score is
// dropped from the sum, or the copy is stuck at label 0 / sum 0). So: if the
// labels agree the common label is output; if they differ the label with the
// higher sum is output and the other copy is reported for repair. Label
// comparison and selection by higher score follow the published design. This
// design's choices: a tie of sums selects copy 0; if only one copy delivers a
// result its label is used and the silent copy is reported; outputs are
// registered.
//
// Interface and timing: inputs are sampled when either valid is high; out_valid,
// out_label, out_sum, disagree and repair[c] appear one clock later. repair[c]
// names the copy judged faulty for this result.
module compare_select
  import ensemble_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   valid0,
  input  label_t label0,
  input  sum_t   sum0,
  input  logic   valid1,
  input  label_t label1,
  input  sum_t   sum1,
  output logic   out_valid,
  output label_t out_label,
  output sum_t   out_sum,
  output logic   disagree,
  output logic [1:0] repair
);

  logic       pick1;
  logic [1:0] bad;

  always_comb begin
    pick1 = 1'b0;
    bad   = 2'b00;
    if (valid0 && valid1) begin
      if (label0 != label1) begin
        pick1 = (sum1 > sum0);
        bad   = pick1 ? 2'b01 : 2'b10;
      end
    end else if (valid1) begin
      pick1 = 1'b1;
      bad   = 2'b01;
    end else if (valid0) begin
      bad   = 2'b10;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_label <= '0;
      out_sum   <= '0;
      disagree  <= 1'b0;
      repair    <= 2'b00;
    end else begin
      out_valid <= valid0 | valid1;
      disagree  <= (valid0 | valid1) && (bad != 2'b00);
      repair    <= bad;
      if (valid0 | valid1) begin
        out_label <= pick1 ? label1 : label0;
        out_sum   <= pick1 ? sum1   : sum0;
      end
    end
  end

endmodule
