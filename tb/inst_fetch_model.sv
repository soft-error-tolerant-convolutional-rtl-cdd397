// inst_fetch_model: behavioural instruction-fetch master of one accelerator.
// While `go` is high and bursts remain it reads bursts of 1..8 words from its
// own DDR region (BASE) and checks every beat against the slave model's rule
// (data = address + 4*beat, RLAST on the last beat). It counts finished bursts
// and errors.
module inst_fetch_model
  import ensemble_pkg::*;
#(
  parameter logic [31:0] BASE = 32'h1000_0000
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    go,
  input  int      bursts,
  output logic    arvalid,
  input  logic    arready,
  output axi_ar_t ar,
  input  logic    rvalid,
  output logic    rready,
  input  axi_r_t  r,
  output int      done,
  output int      errors
);
  axi_ar_t q [$];
  int      rbeat, issued;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arvalid <= 0; ar <= '0; rready <= 0; rbeat <= 0; issued <= 0; done <= 0; errors <= 0;
    end else begin
      rready <= ($urandom_range(0, 3) != 0);
      if (arvalid && arready) begin
        q.push_back(ar);
        arvalid <= 0;
      end else if (!arvalid && go && issued < bursts) begin
        axi_ar_t a;
        a.id    = '0;
        a.addr  = BASE + {18'd0, 12'($urandom_range(0, 4095)), 2'b00};
        a.len   = 8'($urandom_range(0, 7));
        a.size  = 3'd2;
        a.burst = 2'b01;
        ar <= a; arvalid <= 1; issued <= issued + 1;
      end
      if (rvalid && rready) begin
        if (q.size() == 0) errors <= errors + 1;
        else begin
          if (r.data !== q[0].addr + 32'(4 * rbeat) || r.last !== (rbeat == int'(q[0].len)))
            errors <= errors + 1;
          if (r.last) begin
            void'(q.pop_front()); rbeat <= 0; done <= done + 1;
          end else rbeat <= rbeat + 1;
        end
      end
    end
  end
endmodule
