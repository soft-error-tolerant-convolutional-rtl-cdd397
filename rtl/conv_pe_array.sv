// conv_pe_array: the PE array of the CONV module.
//
// P processing elements work on P different rows (positions along the
// height of the input feature map) at the same time. All PEs compute the
// same N_OC output channels, so the weights are broadcast from the memory
// pool to every PE, while each PE gets the N_IC activations of its own row.
// With P = 4 and N_IC = N_OC = 8 the array performs 256 MACs per cycle,
// i.e. 512 operations, the "512 parallelism" of the base-network
// accelerators; P = 4, N_IC = N_OC = 16 gives the 2048 configuration.
// The array organisation follows the published CONV module; the handshake
// (shared in_valid/acc_clear/in_last for all PEs) is this design's choice.
//
// Timing: as pe, results are valid (out_valid) two clocks after the last term.
module conv_pe_array
  import ensemble_pkg::*;
#(
  parameter int P     = 4,
  parameter int N_IC  = 8,
  parameter int N_OC  = 8,
  parameter int ACC_W = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  acc_clear,
  input  logic  in_last,
  input  data_t act [P][N_IC],          // one pixel's input channels per PE (row)
  input  data_t wgt [N_OC][N_IC],       // broadcast to all PEs
  output logic signed [ACC_W-1:0] acc [P][N_OC],
  output logic  out_valid
);

  logic pe_valid [P];

  for (genvar p = 0; p < P; p++) begin : g_pe
    pe #(.N_IC(N_IC), .N_OC(N_OC), .ACC_W(ACC_W)) u_pe (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid),
      .acc_clear (acc_clear),
      .in_last   (in_last),
      .act       (act[p]),
      .wgt       (wgt),
      .acc       (acc[p]),
      .out_valid (pe_valid[p])
    );
  end

  // All PEs run in lock step; the array is done when every PE is.
  always_comb begin
    out_valid = 1'b1;
    for (int p = 0; p < P; p++) out_valid &= pe_valid[p];
  end

endmodule
