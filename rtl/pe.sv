// pe: one processing element of the CONV module.
//
// The PE has N_OC channels, one per output channel. Each channel multiplies
// the N_IC input-channel activations of one pixel with that output channel's
// N_IC weights, adds the products in an adder tree and accumulates the tree
// output, so every cycle it performs N_IC multiply-and-accumulates per output
// channel (N_OC x N_IC in total). Multipliers are built in pairs: output
// channels 2k and 2k+1 share the activation and use one dsp_dual_mult, so a
// PE with N_IC = N_OC = 8 uses 32 multipliers of the 27x18 kind, as in the
// 512-parallelism accelerator. Channel/multiplier/tree organisation follows
// the published PE; the accumulator width, the pipeline and the
// valid/clear/last handshake are this design's choices.
//
// Interface and timing:
//   in_valid   operands act/wgt are valid this cycle
//   acc_clear  with in_valid: this term starts a new output (accumulator is
//              loaded instead of added to)
//   in_last    with in_valid: this term completes the output
//   acc        accumulated sums, one per output channel
//   out_valid  one-cycle pulse when acc holds a completed output; this is
//              two clocks after the in_valid cycle that carried in_last
//              (one clock in the multiplier register, one in the accumulator)
module pe
  import ensemble_pkg::*;
#(
  parameter int N_IC  = 8,
  parameter int N_OC  = 8,
  parameter int ACC_W = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  acc_clear,
  input  logic  in_last,
  input  data_t act [N_IC],
  input  data_t wgt [N_OC][N_IC],
  output logic signed [ACC_W-1:0] acc [N_OC],
  output logic  out_valid
);

  localparam int PROD_W = 2 * DATA_W;
  localparam int TREE_W = PROD_W + $clog2(N_IC) + 1;

  initial begin
    assert (N_OC % 2 == 0) else $error("pe: N_OC must be even (multipliers are paired)");
  end

  logic signed [PROD_W-1:0] prod [N_OC][N_IC];

  // Multiplier pairs: output channels 2k (high half) and 2k+1 (low half).
  for (genvar k = 0; k < N_OC / 2; k++) begin : g_pair
    for (genvar j = 0; j < N_IC; j++) begin : g_ic
      dsp_dual_mult u_mul (
        .clk  (clk),
        .ce   (in_valid),
        .a    (act[j]),
        .w_hi (wgt[2*k][j]),
        .w_lo (wgt[2*k+1][j]),
        .p_hi (prod[2*k][j]),
        .p_lo (prod[2*k+1][j])
      );
    end
  end

  // Control follows the multiplier register by one stage.
  logic s1_valid, s1_clear, s1_last;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_clear <= 1'b0;
      s1_last  <= 1'b0;
    end else begin
      s1_valid <= in_valid;
      s1_clear <= in_valid & acc_clear;
      s1_last  <= in_valid & in_last;
    end
  end

  // Adder tree per output channel (written as a sum; synthesis builds the tree).
  logic signed [TREE_W-1:0] tree [N_OC];
  always_comb begin
    for (int o = 0; o < N_OC; o++) begin
      tree[o] = '0;
      for (int j = 0; j < N_IC; j++) tree[o] = tree[o] + TREE_W'(prod[o][j]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int o = 0; o < N_OC; o++) acc[o] <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= s1_valid & s1_last;
      if (s1_valid) begin
        for (int o = 0; o < N_OC; o++)
          acc[o] <= (s1_clear ? '0 : acc[o]) + ACC_W'(tree[o]);
      end
    end
  end

endmodule
