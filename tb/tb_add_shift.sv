// tb_add_shift: random SoP sums, shifts, y_in and biases into one
// adder-shifter; checks the shifted, offset and saturated lanes one
// enabled cycle later.
module tb_add_shift;
  import neuraghe_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, en = 0, use_yin;
  prec_e prec;
  logic [5:0] shift;
  logic signed [N-1:0][LANES-1:0][ACC_W-1:0] sop_sum;
  lanes_t yin, out;
  pix_t bias;
  always #5 clk = ~clk;
  add_shift #(.N_IN(N)) dut (.*);
  int checks = 0, failures = 0, nsat = 0;

  initial begin
    sop_sum = '0; yin = '0; bias = '0; shift = '0; use_yin = 0; prec = PREC16;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      longint e [LANES];
      int P, hi;
      prec = (it % 3 == 0) ? PREC8 : PREC16;
      P = (prec == PREC16) ? 2 : 4;
      hi = (prec == PREC16) ? 32767 : 127;
      shift = 6'($urandom_range(0, 12));
      use_yin = $urandom_range(0, 1);
      bias = pix_t'($urandom_range(0, 200) - 100);
      for (int l = 0; l < LANES; l++) begin
        yin[l] = pix_t'($urandom_range(0, 200) - 100);
        e[l] = 0;
        for (int c = 0; c < N; c++) begin
          sop_sum[c][l] = ACC_W'(longint'($urandom_range(0, 2000000)) - 1000000);
          e[l] += longint'(signed'(sop_sum[c][l]));
        end
        e[l] = (e[l] >>> shift) + (use_yin ? longint'(yin[l]) : longint'(bias));
        if (e[l] > hi) begin e[l] = hi; nsat++; end
        if (e[l] < -hi-1) begin e[l] = -hi-1; nsat++; end
        if (l >= P) e[l] = 0;
      end
      en = 1;
      @(negedge clk);
      en = 0;
      for (int l = 0; l < LANES; l++) begin
        checks++;
        if (longint'(out[l]) != e[l]) begin
          failures++;
          if (failures < 5) $display("FAIL it%0d lane%0d: %0d vs %0d", it, l, out[l], e[l]);
        end
      end
    end
    checks++;
    if (nsat == 0) failures++;
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
