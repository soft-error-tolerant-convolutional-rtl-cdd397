// tb_pe: runs random dot products of several lengths through one PE and
// compares every channel's accumulated sum with a behavioural model. It also
// checks the two-clock latency of out_valid after the last term, that a
// cycle without in_valid leaves the accumulators alone and that acc_clear
// starts a new sum.
module tb_pe;
  import ensemble_pkg::*;

  localparam int N_IC = 8, N_OC = 8, ACC_W = 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic  rst_n, in_valid, acc_clear, in_last, out_valid;
  data_t act [N_IC];
  data_t wgt [N_OC][N_IC];
  logic signed [ACC_W-1:0] acc [N_OC];
  int checks = 0, failures = 0;
  longint model [N_OC];

  pe #(.N_IC(N_IC), .N_OC(N_OC), .ACC_W(ACC_W)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_output(int terms, bit gaps);
    foreach (model[o]) model[o] = 0;
    for (int t = 0; t < terms; t++) begin
      if (gaps && t > 0) begin    // idle cycle with junk operands
        in_valid = 1'b0;
        foreach (act[j]) act[j] = data_t'($urandom);
        @(posedge clk); #1;
      end
      in_valid = 1'b1; acc_clear = (t == 0); in_last = (t == terms - 1);
      foreach (act[j]) act[j] = data_t'($urandom);
      foreach (wgt[o, j]) wgt[o][j] = data_t'($urandom);
      foreach (model[o]) for (int j = 0; j < N_IC; j++) model[o] += act[j] * wgt[o][j];
      @(posedge clk); #1;
    end
    in_valid = 1'b0; acc_clear = 1'b0; in_last = 1'b0;
    // last term sampled at the previous edge: result after one more edge
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid one clock early"); end
    @(posedge clk); #1;
    checks++;
    if (!out_valid) begin failures++; $display("FAIL out_valid missing after two clocks"); end
    foreach (model[o]) begin
      checks++;
      if (acc[o] !== ACC_W'(model[o])) begin
        failures++;
        $display("FAIL ch%0d acc=%0d model=%0d", o, acc[o], model[o]);
      end
    end
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid longer than one clock"); end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; acc_clear = 1'b0; in_last = 1'b0;
    foreach (act[j]) act[j] = '0;
    foreach (wgt[o, j]) wgt[o][j] = '0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    run_output(1, 1'b0);
    run_output(9, 1'b0);       // 3x3 kernel, one input-channel group
    run_output(9, 1'b1);
    for (int n = 0; n < 20; n++) run_output($urandom_range(1, 40), n[0]);
    // extreme operands: -128 * -128 on every multiplier for 100 terms
    foreach (model[o]) model[o] = 0;
    for (int t = 0; t < 100; t++) begin
      in_valid = 1'b1; acc_clear = (t == 0); in_last = (t == 99);
      foreach (act[j]) act[j] = -8'sd128;
      foreach (wgt[o, j]) wgt[o][j] = -8'sd128;
      @(posedge clk); #1;
    end
    in_valid = 1'b0; in_last = 1'b0; acc_clear = 1'b0;
    @(posedge clk); #1;
    foreach (acc[o]) begin
      checks++;
      if (acc[o] !== 32'sd13107200) begin failures++; $display("FAIL extreme ch%0d %0d", o, acc[o]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
