// ensemble_top: soft-error tolerant CNN classifier built from an ensemble.
//
// Instead of one strong network (ResNet 110) or its triplication, NUM_NETS
// weaker base networks (by default ResNet 20, 32 and 44) run on NUM_NETS
// separate accelerators in the same FPGA and a robust, duplicated combiner
// merges their class scores. A soft error normally disturbs one accelerator
// only; the combiner notices a hung or early-finishing accelerator with its
// timers and an accelerator with a corrupted PE array with its mismatch
// counters, and drops that network from the vote.
//
// This top holds the parts of the system that are specified down to their
// logic: the CONV PE array of each base accelerator (P = 4 PEs, N_IC = 8,
// N_OC = 8: 512 parallelism), the DWC combiner, and the sharing of the two
// general-purpose AXI ports for instruction fetch (GP_SLOT: by default the
// two smaller networks share port 0 and the largest uses port 1; the data
// and weight ports, one high-performance port per accelerator, need no logic
// and are part of each accelerator's data mover). The rest of each
// accelerator (instruction dispatch, LOAD/SAVE data mover with its AXI ports,
// ALU and on-chip memory pool) is an existing instruction-set CNN engine and
// connects through ports: the memory-pool side of each PE array (operands in,
// accumulated sums out) and each accelerator's output enable and score stream
// into the combiner.
//
// Interface:
//   pe_*[n]       PE array of accelerator n, see conv_pe_array
//   inst_*[n]     instruction-fetch read channels of accelerator n
//   gp_*[g]       general-purpose AXI port g towards DDR, see axi_rd_arbiter
//   start         image issued to all accelerators (starts the combiner timers)
//   net_en[n], net_score[n]  accelerator n's ten class scores, see combiner
//   out_*         final label and winning sum, see dwc_combiner
//   repair        combiner copy to be repaired; net_excluded: networks dropped
// Timing: PE results two clocks after the last term; the label 12 clocks after
// the last score word of the last trusted network.
module ensemble_top
  import ensemble_pkg::*;
#(
  parameter int          NUM_NETS = 3,
  parameter int          P        = 4,
  parameter int          N_IC     = 8,
  parameter int          N_OC     = 8,
  parameter int          ACC_W    = 32,
  parameter int          C_T      = DEF_C_T,
  parameter int          CNT_W    = TIMER_W,
  parameter int unsigned T_MIN [MAX_NETS] = DEF_T_MIN,
  parameter int unsigned T_MAX [MAX_NETS] = DEF_T_MAX,
  parameter int          GP_SLOT [NUM_GP][2] = DEF_GP_SLOT
) (
  input  logic   clk,
  input  logic   rst_n,
  // CONV PE arrays, one per base accelerator
  input  logic   pe_in_valid  [NUM_NETS],
  input  logic   pe_acc_clear [NUM_NETS],
  input  logic   pe_in_last   [NUM_NETS],
  input  data_t  pe_act       [NUM_NETS][P][N_IC],
  input  data_t  pe_wgt       [NUM_NETS][N_OC][N_IC],
  output logic signed [ACC_W-1:0] pe_acc [NUM_NETS][P][N_OC],
  output logic   pe_out_valid [NUM_NETS],
  // instruction fetch of each accelerator (AXI4 read, accelerator is master)
  input  logic    inst_arvalid [NUM_NETS],
  output logic    inst_arready [NUM_NETS],
  input  axi_ar_t inst_ar      [NUM_NETS],
  output logic    inst_rvalid  [NUM_NETS],
  input  logic    inst_rready  [NUM_NETS],
  output axi_r_t  inst_r       [NUM_NETS],
  // general-purpose AXI ports of the processing system (slave side)
  output logic    gp_arvalid [NUM_GP],
  input  logic    gp_arready [NUM_GP],
  output axi_ar_t gp_ar      [NUM_GP],
  input  logic    gp_rvalid  [NUM_GP],
  output logic    gp_rready  [NUM_GP],
  input  axi_r_t  gp_r       [NUM_GP],
  // classification results of the base accelerators
  input  logic   start,
  input  logic   clear_faults,
  input  logic   net_en    [NUM_NETS],
  input  score_t net_score [NUM_NETS],
  // ensemble decision
  output logic   busy,
  output logic   out_valid,
  output label_t out_label,
  output sum_t   out_sum,
  output logic   disagree,
  output logic [1:0] repair,
  output logic   net_early    [2][NUM_NETS],
  output logic   net_timeout  [2][NUM_NETS],
  output logic   net_excluded [2][NUM_NETS]
);

  for (genvar n = 0; n < NUM_NETS; n++) begin : g_acc
    conv_pe_array #(.P(P), .N_IC(N_IC), .N_OC(N_OC), .ACC_W(ACC_W)) u_conv (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (pe_in_valid[n]),
      .acc_clear (pe_acc_clear[n]),
      .in_last   (pe_in_last[n]),
      .act       (pe_act[n]),
      .wgt       (pe_wgt[n]),
      .acc       (pe_acc[n]),
      .out_valid (pe_out_valid[n])
    );
  end

  // ---- instruction fetch: two accelerators per general-purpose port ----
  function automatic int slot_of(int net);
    for (int g = 0; g < NUM_GP; g++)
      for (int k = 0; k < 2; k++)
        if (GP_SLOT[g][k] == net) return 2 * g + k;
    return -1;
  endfunction

  function automatic int net_at(int slot);
    return GP_SLOT[slot / 2][slot % 2];
  endfunction

  logic    a_arvalid [NUM_GP][2], a_arready [NUM_GP][2];
  axi_ar_t a_ar      [NUM_GP][2];
  logic    a_rvalid  [NUM_GP][2], a_rready  [NUM_GP][2];
  axi_r_t  a_r       [NUM_GP][2];

  for (genvar g = 0; g < NUM_GP; g++) begin : g_gp
    for (genvar k = 0; k < 2; k++) begin : g_slot
      localparam int NET = net_at(2 * g + k);
      if (NET >= 0 && NET < NUM_NETS) begin : g_used
        assign a_arvalid[g][k] = inst_arvalid[NET];
        assign a_ar[g][k]      = inst_ar[NET];
        assign a_rready[g][k]  = inst_rready[NET];
      end else begin : g_free
        assign a_arvalid[g][k] = 1'b0;
        assign a_ar[g][k]      = '0;
        assign a_rready[g][k]  = 1'b0;
      end
    end

    axi_rd_arbiter u_arb (
      .clk, .rst_n,
      .m_arvalid (a_arvalid[g]), .m_arready (a_arready[g]), .m_ar (a_ar[g]),
      .m_rvalid  (a_rvalid[g]),  .m_rready  (a_rready[g]),  .m_r  (a_r[g]),
      .s_arvalid (gp_arvalid[g]), .s_arready (gp_arready[g]), .s_ar (gp_ar[g]),
      .s_rvalid  (gp_rvalid[g]),  .s_rready  (gp_rready[g]),  .s_r  (gp_r[g])
    );
  end

  for (genvar n = 0; n < NUM_NETS; n++) begin : g_fetch
    localparam int SL = slot_of(n);
    initial assert (SL >= 0) else $error("ensemble_top: accelerator %0d has no GP port slot", n);
    if (SL >= 0) begin : g_conn
      assign inst_arready[n] = a_arready[SL / 2][SL % 2];
      assign inst_rvalid[n]  = a_rvalid[SL / 2][SL % 2];
      assign inst_r[n]       = a_r[SL / 2][SL % 2];
    end else begin : g_none
      assign inst_arready[n] = 1'b0;
      assign inst_rvalid[n]  = 1'b0;
      assign inst_r[n]       = '0;
    end
  end

  dwc_combiner #(
    .NUM_NETS(NUM_NETS), .C_T(C_T), .CNT_W(CNT_W), .T_MIN(T_MIN), .T_MAX(T_MAX)
  ) u_comb (
    .clk, .rst_n, .start, .clear_faults,
    .en    (net_en),
    .score (net_score),
    .busy, .out_valid, .out_label, .out_sum, .disagree, .repair,
    .net_early, .net_timeout, .net_excluded
  );

endmodule
