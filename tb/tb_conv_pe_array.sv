// tb_conv_pe_array: drives the 4-PE array with a small convolution: each PE
// gets its own row of a random input feature map, all share the weights of 8
// output channels, and the 3x3 kernel over 8 input channels is fed as 9 terms.
// Every PE's sums are compared with a direct convolution model; the
// two-clock latency of out_valid is checked.
module tb_conv_pe_array;
  import ensemble_pkg::*;

  localparam int P = 4, N_IC = 8, N_OC = 8, ACC_W = 32;
  localparam int H = P + 2, W = 6;    // padded input rows/cols

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic  rst_n, in_valid, acc_clear, in_last, out_valid;
  data_t act [P][N_IC];
  data_t wgt [N_OC][N_IC];
  logic signed [ACC_W-1:0] acc [P][N_OC];
  int checks = 0, failures = 0;

  int ifm  [H][W][N_IC];
  int kern [N_OC][3][3][N_IC];

  conv_pe_array #(.P(P), .N_IC(N_IC), .N_OC(N_OC), .ACC_W(ACC_W)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; acc_clear = 1'b0; in_last = 1'b0;
    foreach (act[p, j]) act[p][j] = '0;
    foreach (wgt[o, j]) wgt[o][j] = '0;
    foreach (ifm[y, x, c]) ifm[y][x][c] = $urandom_range(0, 255) - 128;
    foreach (kern[o, ky, kx, c]) kern[o][ky][kx][c] = $urandom_range(0, 255) - 128;
    repeat (2) @(posedge clk); #1;
    rst_n = 1'b1;
    for (int ox = 0; ox < W - 2; ox++) begin
      for (int t = 0; t < 9; t++) begin
        int ky, kx;
        ky = t / 3; kx = t % 3;
        in_valid = 1'b1; acc_clear = (t == 0); in_last = (t == 8);
        for (int p = 0; p < P; p++)
          for (int c = 0; c < N_IC; c++) act[p][c] = data_t'(ifm[p + ky][ox + kx][c]);
        for (int o = 0; o < N_OC; o++)
          for (int c = 0; c < N_IC; c++) wgt[o][c] = data_t'(kern[o][ky][kx][c]);
        @(posedge clk); #1;
      end
      in_valid = 1'b0; acc_clear = 1'b0; in_last = 1'b0;
      checks++;
      if (out_valid) begin failures++; $display("FAIL early out_valid"); end
      @(posedge clk); #1;
      checks++;
      if (!out_valid) begin failures++; $display("FAIL no out_valid"); end
      for (int p = 0; p < P; p++)
        for (int o = 0; o < N_OC; o++) begin
          int ref_sum;
          ref_sum = 0;
          for (int ky = 0; ky < 3; ky++)
            for (int kx = 0; kx < 3; kx++)
              for (int c = 0; c < N_IC; c++)
                ref_sum += ifm[p + ky][ox + kx][c] * kern[o][ky][kx][c];
          checks++;
          if (acc[p][o] !== ref_sum) begin
            failures++;
            $display("FAIL x%0d pe%0d oc%0d: %0d vs %0d", ox, p, o, acc[p][o], ref_sum);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
