// pooling_unit: on-the-fly 2x2 pooling of the output stream of one row.
//
// The NEURAGHE engine pools output pixels in square windows and keeps one
// pixel per window, by maximum, average or plain down-sampling, selected
// per job. Here the window is 2x2 with stride 2. Each input step carries
// the pixels of one output word (2 in 16-bit mode, 4 in 8-bit mode), so
// horizontal pairs are reduced inside the step. On even rows the reduced
// values are kept in a one-row store indexed by word column; on odd rows
// they are combined with the stored ones. Two consecutive steps of an odd
// row then fill one pooled output word, which is emitted on the second
// (odd column) step at pooled coordinates (row/2, col/2). With POOL_NONE
// every input step passes straight through.
//
// Average is the sum of the four pixels shifted right by 2 (truncating).
// Down-sampling keeps the top-left pixel. Window size, stride and rounding
// are this design's own choices.
//
// Timing: out_* are combinational from the inputs and the store; the store
// and the half-word holding register update when en && in_valid. The
// engine writes out_* into its output queue in that same cycle.
module pooling_unit
  import neuraghe_pkg::*;
#(
  parameter int DEPTH = MAX_WPR,
  parameter int RW    = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     in_valid,
  input  prec_e                    prec,
  input  pool_mode_e               mode,
  input  logic [RW-1:0]            row,
  input  logic [$clog2(DEPTH)-1:0] col,
  input  lanes_t                   in,
  output logic                     out_valid,
  output logic [WORD_W-1:0]        out_word,
  output logic [RW-1:0]            out_row,
  output logic [$clog2(DEPTH)-1:0] out_col
);

  typedef logic signed [DATA_W+1:0] wide_t;

  wide_t store [DEPTH][2];   // reduced upper-row values per word column
  wide_t hold_q [2];         // pooled pixels of the even column
  wide_t h [2];              // horizontal reduction of this step
  wide_t v [2];              // full 2x2 reduction (odd rows)

  function automatic wide_t wmax(wide_t a, wide_t b);
    return (a > b) ? a : b;
  endfunction

  always_comb begin
    lanes_t ol;
    for (int k = 0; k < 2; k++) begin
      unique case (mode)
        POOL_MAX: h[k] = wmax(wide_t'(in[2*k]), wide_t'(in[2*k+1]));
        POOL_AVG: h[k] = wide_t'(in[2*k]) + wide_t'(in[2*k+1]);
        default:  h[k] = wide_t'(in[2*k]);
      endcase
      unique case (mode)
        POOL_MAX: v[k] = wmax(store[col][k], h[k]);
        POOL_AVG: v[k] = (store[col][k] + h[k]) >>> 2;
        default:  v[k] = store[col][k];
      endcase
    end
    if (prec == PREC16) begin
      ol[0] = pix_t'(hold_q[0]);
      ol[1] = pix_t'(v[0]);
      ol[2] = '0;
      ol[3] = '0;
    end else begin
      ol[0] = pix_t'(hold_q[0]);
      ol[1] = pix_t'(hold_q[1]);
      ol[2] = pix_t'(v[0]);
      ol[3] = pix_t'(v[1]);
    end
    if (mode == POOL_NONE) begin
      out_valid = in_valid;
      out_word  = pack_word(in, prec);
      out_row   = row;
      out_col   = col;
    end else begin
      out_valid = in_valid && row[0] && col[0];
      out_word  = pack_word(ol, prec);
      out_row   = row >> 1;
      out_col   = col >> 1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_q[0] <= '0;
      hold_q[1] <= '0;
    end else if (en && in_valid && mode != POOL_NONE && row[0] && !col[0]) begin
      hold_q <= v;
    end
  end

  // row store: no reset, written on every even row before it is read
  always_ff @(posedge clk) begin
    if (en && in_valid && mode != POOL_NONE && !row[0]) store[col] <= h;
  end

endmodule
