// axi_rd_arbiter: lets two accelerators share one AXI4 read port.
//
// In the ensemble each accelerator fetches its instructions from DDR through
// a general-purpose AXI port of the processing system, and two accelerators
// share one port. This block arbitrates the read address channel between two
// masters and returns the read data to the master that owns the burst. It
// keeps one burst in flight: a grant is held from the address handshake until
// the beat with RLAST, then priority passes to the other master (round robin),
// so neither accelerator can starve the other. Sharing one port between two
// accelerators follows the published system; the arbitration policy and the
// one-burst-at-a-time rule are this design's choices (instruction fetch is
// not bandwidth critical, the data and weights use separate ports).
//
// Interface: m_* are the two master (accelerator) sides, s_* the slave (port)
// side, with AXI4 valid/ready handshakes. The address of the granted master
// is passed through combinationally; the grant is registered, so an address
// reaches the port at the earliest one clock after ARVALID rises. A master
// that never requests (tied-off slot) leaves the port to the other.
module axi_rd_arbiter
  import ensemble_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // masters
  input  logic    m_arvalid [2],
  output logic    m_arready [2],
  input  axi_ar_t m_ar      [2],
  output logic    m_rvalid  [2],
  input  logic    m_rready  [2],
  output axi_r_t  m_r       [2],
  // slave port
  output logic    s_arvalid,
  input  logic    s_arready,
  output axi_ar_t s_ar,
  input  logic    s_rvalid,
  output logic    s_rready,
  input  axi_r_t  s_r
);

  typedef enum logic [1:0] {A_IDLE, A_ADDR, A_DATA} arb_state_t;
  arb_state_t state;
  logic       owner;      // master holding the grant
  logic       prio;       // master preferred at the next arbitration

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= A_IDLE;
      owner <= 1'b0;
      prio  <= 1'b0;
    end else begin
      unique case (state)
        A_IDLE: if (m_arvalid[0] || m_arvalid[1]) begin
                  owner <= (m_arvalid[prio]) ? prio : ~prio;
                  state <= A_ADDR;
                end
        A_ADDR: if (s_arready) state <= A_DATA;
        A_DATA: if (s_rvalid && s_rready && s_r.last) begin
                  state <= A_IDLE;
                  prio  <= ~owner;
                end
        default: state <= A_IDLE;
      endcase
    end
  end

  always_comb begin
    s_arvalid = (state == A_ADDR) && m_arvalid[owner];
    s_ar      = m_ar[owner];
    s_rready  = (state == A_DATA) && m_rready[owner];
    for (int i = 0; i < 2; i++) begin
      m_arready[i] = (state == A_ADDR) && (owner == 1'(i)) && s_arready;
      m_rvalid[i]  = (state == A_DATA) && (owner == 1'(i)) && s_rvalid;
      m_r[i]       = s_r;
    end
  end

  // AXI rules on the port side: an address, once offered, stays until taken.
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_arvalid && !s_arready |=> s_arvalid && $stable(s_ar))
    else $error("axi_rd_arbiter: address withdrawn or changed before ARREADY");
  // Read data only comes back for a granted burst.
  a_r_owned: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid |-> state == A_DATA)
    else $error("axi_rd_arbiter: read data without an open burst");

endmodule
