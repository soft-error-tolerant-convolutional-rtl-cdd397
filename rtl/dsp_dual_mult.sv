// dsp_dual_mult: two signed 8x8 multiplications in one 27x18 multiplier.
//
// A DSP48 multiplier (27 x 18 bits) can produce two int8 products that share
// one operand: the two weights are packed into the 27-bit port as
// w_hi * 2^18 + w_lo and multiplied by the shared activation. The low 18 bits
// of the result then hold w_lo * a (two's complement, |w_lo*a| <= 2^14) and
// the upper bits hold w_hi * a minus the borrow taken by a negative low
// product, which is added back from bit 17. Packing two products per DSP is
// the published accelerator's technique; the packing layout and the single
// output register stage (the DSP's P register) are this design's choice.
//
// Interface: ce enables the output register. Timing: products appear one
// clock after the operands.
module dsp_dual_mult
  import ensemble_pkg::*;
(
  input  logic         clk,
  input  logic         ce,
  input  data_t        a,      // shared operand (activation)
  input  data_t        w_hi,   // weight of the first product
  input  data_t        w_lo,   // weight of the second product
  output logic signed [2*DATA_W-1:0] p_hi,  // w_hi * a
  output logic signed [2*DATA_W-1:0] p_lo   // w_lo * a
);

  logic signed [26:0] packed_w;   // 27-bit multiplier port
  logic signed [17:0] a_ext;      // 18-bit multiplier port
  logic signed [44:0] prod;

  always_comb begin
    packed_w = (27'(w_hi) <<< 18) + 27'(w_lo);
    a_ext    = 18'(a);
    prod     = 45'(packed_w) * 45'(a_ext);
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      p_lo <= prod[2*DATA_W-1:0];
      p_hi <= prod[18 +: 2*DATA_W] + {{(2*DATA_W-1){1'b0}}, prod[17]};
    end
  end

endmodule
