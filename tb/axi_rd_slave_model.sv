// axi_rd_slave_model: behavioural AXI4 read slave standing in for a
// general-purpose port of the processing system and its DDR. It takes one
// burst at a time and answers beat b of a burst at address A with data
// A + 4*b, inserting random stalls on ARREADY and RVALID.
module axi_rd_slave_model
  import ensemble_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    arvalid,
  output logic    arready,
  input  axi_ar_t ar,
  output logic    rvalid,
  input  logic    rready,
  output axi_r_t  r
);
  axi_ar_t cur;
  int      beat;
  bit      busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 0; beat <= 0; arready <= 0; rvalid <= 0; r <= '0; cur <= '0;
    end else begin
      arready <= !busy && ($urandom_range(0, 2) != 0);
      if (arvalid && arready && !busy) begin
        cur <= ar; beat <= 0; busy <= 1; arready <= 0;
      end
      if (busy && (!rvalid || rready)) begin
        if (rvalid && rready && r.last) begin
          busy <= 0; rvalid <= 0;
        end else if ($urandom_range(0, 3) != 0) begin
          int b;
          b = (rvalid && rready) ? beat + 1 : beat;
          beat   <= b;
          rvalid <= 1;
          r.id   <= cur.id;
          r.data <= cur.addr + 32'(4 * b);
          r.resp <= 2'b00;
          r.last <= (b == int'(cur.len));
        end else begin
          if (rvalid && rready) beat <= beat + 1;
          rvalid <= 0;
        end
      end
    end
  end
endmodule
