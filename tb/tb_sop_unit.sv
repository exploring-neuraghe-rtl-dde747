// tb_sop_unit: random windows and weights into one SoP unit in both
// precisions; the lane sums must match a direct sum of products and appear
// after exactly two enabled cycles.
module tb_sop_unit;
  import neuraghe_pkg::*;
  localparam int NIF = 3, K = 3;
  logic clk = 0, rst_n = 0, en = 0;
  prec_e prec;
  pix_t [NIF-1:0][LANES-1:0][K*K-1:0] win;
  pix_t [NIF-1:0][K*K-1:0] wgt;
  logic signed [LANES-1:0][ACC_W-1:0] sum;
  always #5 clk = ~clk;
  sop_unit #(.N_IF(NIF), .K(K)) dut (.*);

  int checks = 0, failures = 0;
  longint exp_s [LANES];

  initial begin
    win = '0; wgt = '0; prec = PREC16;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      int p8, P;
      p8 = it % 2;
      P = p8 ? 4 : 2;
      prec = p8 ? PREC8 : PREC16;
      for (int f = 0; f < NIF; f++)
        for (int k = 0; k < K*K; k++) begin
          wgt[f][k] = p8 ? pix_t'($urandom_range(0, 255) - 128) : pix_t'($urandom);
          for (int l = 0; l < LANES; l++)
            win[f][l][k] = (l >= P) ? '0 : (p8 ? pix_t'($urandom_range(0, 255) - 128) : pix_t'($urandom));
        end
      if (it == 0) begin
        for (int f = 0; f < NIF; f++) for (int k = 0; k < K*K; k++) begin
          wgt[f][k] = -16'sd32768; win[f][0][k] = -16'sd32768; win[f][1][k] = 16'sd32767;
        end
      end
      for (int l = 0; l < LANES; l++) begin
        exp_s[l] = 0;
        for (int f = 0; f < NIF; f++)
          for (int k = 0; k < K*K; k++) exp_s[l] += longint'(win[f][l][k]) * longint'(wgt[f][k]);
      end
      en = 1;
      @(negedge clk);
      win = '0;
      @(negedge clk);
      en = 0;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (longint'(signed'(sum[l])) != exp_s[l]) begin
          failures++;
          if (failures < 5) $display("FAIL it%0d lane%0d: %0d vs %0d", it, l, signed'(sum[l]), exp_s[l]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
