// tb_dsp_dual_mult: checks the packed dual multiplication against the two
// plain products, for all corner operands (-128, -1, 0, 1, 127) and random
// ones, and checks the one-clock latency and the clock enable.
module tb_dsp_dual_mult;
  import ensemble_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic  ce;
  data_t a, w_hi, w_lo;
  logic signed [15:0] p_hi, p_lo;
  int checks = 0, failures = 0;

  dsp_dual_mult dut (.clk, .ce, .a, .w_hi, .w_lo, .p_hi, .p_lo);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(int av, int hv, int lv);
    a = data_t'(av); w_hi = data_t'(hv); w_lo = data_t'(lv); ce = 1'b1;
    @(posedge clk); #1;
    checks++;
    if (p_hi !== 16'(hv * av) || p_lo !== 16'(lv * av)) begin
      failures++;
      $display("FAIL a=%0d hi=%0d lo=%0d -> %0d %0d", av, hv, lv, p_hi, p_lo);
    end
  endtask

  int corner [5] = '{-128, -1, 0, 1, 127};

  initial begin
    ce = 1'b0; a = '0; w_hi = '0; w_lo = '0;
    @(posedge clk); #1;
    foreach (corner[x]) foreach (corner[y]) foreach (corner[z])
      try(corner[x], corner[y], corner[z]);
    for (int n = 0; n < 5000; n++)
      try($urandom_range(0, 255) - 128, $urandom_range(0, 255) - 128, $urandom_range(0, 255) - 128);
    // clock enable low: outputs hold
    try(3, 5, 7);
    ce = 1'b0; a = 8'sd100; w_hi = 8'sd100; w_lo = 8'sd100;
    @(posedge clk); #1;
    checks++;
    if (p_hi !== 16'sd15 || p_lo !== 16'sd21) begin
      failures++;
      $display("FAIL hold with ce low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
