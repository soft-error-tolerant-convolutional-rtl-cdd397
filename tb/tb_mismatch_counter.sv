// tb_mismatch_counter: with C_T = 4, four consecutive mismatches keep the
// network, the fifth excludes it; a match in between restarts the count;
// cycles without upd change nothing; exclusion is kept until clear.
module tb_mismatch_counter;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, clear, upd, mismatch, excluded;
  logic [2:0] count;
  int checks = 0, failures = 0;
  int model_cnt = 0;
  bit model_excl = 0;

  mismatch_counter #(.C_T(4)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic decide(bit mm);
    upd = 1'b1; mismatch = mm;
    @(posedge clk); #1;
    upd = 1'b0; mismatch = 1'b0;
    model_cnt = mm ? (model_cnt < 7 ? model_cnt + 1 : 7) : 0;
    if (model_cnt > 4) model_excl = 1;
    checks++;
    if (excluded !== model_excl || int'(count) !== model_cnt) begin
      failures++;
      $display("FAIL after %b: count=%0d excl=%b (model %0d %b)", mm, count, excluded, model_cnt, model_excl);
    end
    // idle cycle with mismatch asserted but no upd
    mismatch = 1'b1;
    @(posedge clk); #1;
    mismatch = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; clear = 1'b0; upd = 1'b0; mismatch = 1'b0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    repeat (4) decide(1);
    checks++;
    if (excluded) begin failures++; $display("FAIL excluded after 4"); end
    decide(0);
    repeat (4) decide(1);
    decide(1);
    checks++;
    if (!excluded) begin failures++; $display("FAIL not excluded after 5"); end
    decide(0);
    checks++;
    if (!excluded) begin failures++; $display("FAIL exclusion not sticky"); end
    clear = 1'b1; @(posedge clk); #1; clear = 1'b0;
    model_cnt = 0; model_excl = 0;
    checks++;
    if (excluded || count != 0) begin failures++; $display("FAIL clear"); end
    for (int n = 0; n < 300; n++) begin
      if (n % 40 == 0) begin
        clear = 1'b1; @(posedge clk); #1; clear = 1'b0;
        model_cnt = 0; model_excl = 0;
      end
      decide($urandom_range(0, 3) != 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
