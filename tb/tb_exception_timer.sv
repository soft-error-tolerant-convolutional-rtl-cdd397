// tb_exception_timer: window [10, 20]. Checks early termination (enable at
// k = 5 and k = 9), normal arrival (k = 10, 15, 20), time out (no enable, or
// enable first at k = 21) with the verdict one clock after k = 20, that a
// second enable does not change the verdict, and that start restarts it.
module tb_exception_timer;
  import ensemble_pkg::*;

  localparam int unsigned TMIN = 10, TMAX = 20;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, start, en, running, ok, early, timeout;
  int checks = 0, failures = 0;

  exception_timer #(.CNT_W(8), .T_MIN(TMIN), .T_MAX(TMAX)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_flags(bit e_run, bit e_ok, bit e_early, bit e_to, string what);
    checks++;
    if ({running, ok, early, timeout} !== {e_run, e_ok, e_early, e_to}) begin
      failures++;
      $display("FAIL %s: run=%b ok=%b early=%b timeout=%b", what, running, ok, early, timeout);
    end
  endtask

  // en_at < 0: never. Enable is high during the cycle sampled by edge k.
  task automatic trial(int en_at);
    start = 1'b1;
    @(posedge clk); #1;          // edge 0
    start = 1'b0;
    for (int k = 1; k <= 30; k++) begin
      en = (k == en_at) || (en_at >= 0 && k == en_at + 3);  // and a second enable
      @(posedge clk); #1;        // edge k
      en = 1'b0;
      if (en_at >= 0 && en_at <= int'(TMAX) && k == en_at) begin
        if (en_at < int'(TMIN)) expect_flags(0, 0, 1, 0, $sformatf("early at %0d", en_at));
        else                    expect_flags(0, 1, 0, 0, $sformatf("ok at %0d", en_at));
      end
      if ((en_at < 0 || en_at > int'(TMAX)) && k == int'(TMAX) - 1)
        expect_flags(1, 0, 0, 0, "still running before T_MAX");
      if ((en_at < 0 || en_at > int'(TMAX)) && k == int'(TMAX))
        expect_flags(0, 0, 0, 1, "timeout");
    end
    // verdict holds
    if (en_at < 0 || en_at > int'(TMAX)) expect_flags(0, 0, 0, 1, "timeout holds");
    else if (en_at < int'(TMIN))         expect_flags(0, 0, 1, 0, "early holds");
    else                                 expect_flags(0, 1, 0, 0, "ok holds");
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; en = 1'b0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    expect_flags(0, 0, 0, 0, "after reset");
    trial(5);
    trial(9);
    trial(10);
    trial(15);
    trial(20);
    trial(21);
    trial(-1);
    trial(12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
