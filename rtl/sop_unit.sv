// sop_unit: one Sum-of-Products unit of the engine's SoP matrix.
//
// It convolves the KSIZE x KSIZE windows of N_IF input features with their
// kernels and returns, per output lane, the sum over all features. As in
// the NEURAGHE engine it is built as a multi-trellis: one trellis of
// multiply-add per input feature, whose results a dedicated adder sums.
//
// DSP view: the unit has N_IF*K*K*2 multiply slices (54 for the default
// 3 features x 3x3 x 2 windows, i.e. 864 / 16 SoP units of the 4x4
// matrix). In 16-bit mode slice s computes one 16x16 product for lane s.
// In 8-bit mode the same slice computes two 8x8 products that share the
// weight, for lanes 2s and 2s+1, doubling the MACs per slice. The two
// 8-bit products are written as two multiplications; how they are packed
// into one DSP primitive is left to synthesis.
//
// Timing: two register stages, both advanced by en. Stage 1 registers
// the products, stage 2 the trellis sums and the dedicated adder.
module sop_unit
  import neuraghe_pkg::*;
#(
  parameter int N_IF = IF_PER_COL,
  parameter int K    = KSIZE
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                en,
  input  prec_e                               prec,
  input  pix_t [N_IF-1:0][LANES-1:0][K*K-1:0] win,
  input  pix_t [N_IF-1:0][K*K-1:0]            wgt,
  output logic signed [LANES-1:0][ACC_W-1:0]  sum
);

  localparam int SLICES = 2;  // slices per kernel tap (windows in 16-bit mode)

  // prod_q[f][k][s][h]: product h of slice s at tap k of feature f
  logic signed [2*DATA_W-1:0] prod_q [N_IF][K*K][SLICES][2];
  prec_e prec_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prec_q <= PREC16;
      for (int f = 0; f < N_IF; f++)
        for (int k = 0; k < K*K; k++)
          for (int s = 0; s < SLICES; s++) begin
            prod_q[f][k][s][0] <= '0;
            prod_q[f][k][s][1] <= '0;
          end
    end else if (en) begin
      prec_q <= prec;
      for (int f = 0; f < N_IF; f++)
        for (int k = 0; k < K*K; k++)
          for (int s = 0; s < SLICES; s++) begin
            if (prec == PREC16) begin
              prod_q[f][k][s][0] <= win[f][s][k] * wgt[f][k];
              prod_q[f][k][s][1] <= '0;
            end else begin
              prod_q[f][k][s][0] <= win[f][2*s][k]   * pix_t'(signed'(wgt[f][k][7:0]));
              prod_q[f][k][s][1] <= win[f][2*s+1][k] * pix_t'(signed'(wgt[f][k][7:0]));
            end
          end
    end
  end

  // trellis per feature, then the dedicated adder across features
  logic signed [ACC_W-1:0] trellis [N_IF][SLICES][2];
  logic signed [LANES-1:0][ACC_W-1:0] sum_d;

  always_comb begin
    logic signed [ACC_W-1:0] tot [SLICES][2];
    for (int s = 0; s < SLICES; s++) begin
      tot[s][0] = '0;
      tot[s][1] = '0;
    end
    for (int f = 0; f < N_IF; f++)
      for (int s = 0; s < SLICES; s++)
        for (int h = 0; h < 2; h++) begin
          trellis[f][s][h] = '0;
          for (int k = 0; k < K*K; k++) trellis[f][s][h] += ACC_W'(prod_q[f][k][s][h]);
          tot[s][h] += trellis[f][s][h];
        end
    if (prec_q == PREC16) begin
      sum_d[0] = tot[0][0];
      sum_d[1] = tot[1][0];
      sum_d[2] = '0;
      sum_d[3] = '0;
    end else begin
      sum_d[0] = tot[0][0];
      sum_d[1] = tot[0][1];
      sum_d[2] = tot[1][0];
      sum_d[3] = tot[1][1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sum <= '0;
    else if (en) sum <= sum_d;
  end

endmodule
