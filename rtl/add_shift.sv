// add_shift: the adder-shifter at the end of one SoP matrix row.
//
// It adds the sums of the N_COLS SoP units of its row, shifts the total
// right by `shift` bits (arithmetic, truncating) to return to the pixel
// fixed-point format, adds either the partial result read on the row's
// y_in port (use_yin) or the row's bias, and saturates to the pixel range
// of the current precision (16 or 8 bits). The unit, its y_in input and the
// bias input follow the NEURAGHE engine; the order shift-then-add, the
// truncation and the saturation are this design's own choices.
//
// Timing: one register stage advanced by en.
module add_shift
  import neuraghe_pkg::*;
#(
  parameter int N_IN = N_COLS
) (
  input  logic                                         clk,
  input  logic                                         rst_n,
  input  logic                                         en,
  input  prec_e                                        prec,
  input  logic [5:0]                                   shift,
  input  logic                                         use_yin,
  input  logic signed [N_IN-1:0][LANES-1:0][ACC_W-1:0] sop_sum,
  input  lanes_t                                       yin,
  input  pix_t                                         bias,
  output lanes_t                                       out
);

  lanes_t out_d;

  always_comb begin
    logic signed [ACC_W-1:0] acc;
    int unsigned p;
    p = ppw(prec);
    for (int l = 0; l < LANES; l++) begin
      acc = '0;
      for (int c = 0; c < N_IN; c++) acc += sop_sum[c][l];
      acc = acc >>> shift;
      acc += use_yin ? ACC_W'(yin[l]) : ACC_W'(bias);
      out_d[l] = (l < p) ? sat_pix(acc, prec) : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  out <= '0;
    else if (en) out <= out_d;
  end

endmodule
