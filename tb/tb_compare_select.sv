// tb_compare_select: equal labels pass through; differing labels pick the
// copy with the higher sum (copy 0 on a tie) and report the other; a lone
// valid copy is taken and the silent one reported. One clock latency.
module tb_compare_select;
  import ensemble_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   rst_n, valid0, valid1, out_valid, disagree;
  label_t label0, label1, out_label;
  sum_t   sum0, sum1, out_sum;
  logic [1:0] repair;
  int checks = 0, failures = 0;

  compare_select dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic trial(bit v0, int l0, int s0, bit v1, int l1, int s1);
    int el, es; bit ed; logic [1:0] er;
    valid0 = v0; label0 = label_t'(l0); sum0 = sum_t'(s0);
    valid1 = v1; label1 = label_t'(l1); sum1 = sum_t'(s1);
    if (v0 && v1 && l0 == l1)      begin el = l0; es = s0; er = 2'b00; end
    else if (v0 && v1 && s1 > s0)  begin el = l1; es = s1; er = 2'b01; end
    else if (v0 && v1)             begin el = l0; es = s0; er = 2'b10; end
    else if (v1)                   begin el = l1; es = s1; er = 2'b01; end
    else                           begin el = l0; es = s0; er = 2'b10; end
    ed = (er != 2'b00);
    @(posedge clk); #1;
    valid0 = 1'b0; valid1 = 1'b0;
    checks++;
    if (!out_valid || int'(out_label) != el || int'(out_sum) != es ||
        disagree !== ed || repair !== er) begin
      failures++;
      $display("FAIL v%b%b l%0d/%0d s%0d/%0d -> v%b l%0d s%0d d%b r%b", v0, v1, l0, l1, s0, s1,
               out_valid, out_label, out_sum, disagree, repair);
    end
    @(posedge clk); #1;
    checks++;
    if (out_valid || repair != 2'b00) begin failures++; $display("FAIL valid stays high"); end
  endtask

  initial begin
    rst_n = 1'b0; valid0 = 0; valid1 = 0; label0 = 0; label1 = 0; sum0 = 0; sum1 = 0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    trial(1, 3, 500, 1, 3, 500);
    trial(1, 3, 500, 1, 0, 0);      // copy 1 stuck at label 0 / sum 0
    trial(1, 0, 0, 1, 7, 600);      // copy 0 stuck
    trial(1, 2, 300, 1, 5, 300);    // tie: copy 0
    trial(1, 4, 200, 0, 0, 0);
    trial(0, 0, 0, 1, 9, 700);
    for (int n = 0; n < 500; n++)
      trial(1'b1, $urandom_range(0, 9), $urandom_range(0, 1020),
            1'b1, $urandom_range(0, 9), $urandom_range(0, 1020));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
