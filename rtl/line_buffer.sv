// line_buffer: the LB of one SoP column.
//
// It caches the last KSIZE-1 rows of IF_PER_COL input feature maps so that
// each new port word (two 16-bit or four 8-bit pixels of one row) completes
// a whole KSIZE x KSIZE window for every pixel of that word: two windows per
// feature per cycle in 16-bit mode, four in 8-bit mode. This is the
// behaviour the NEURAGHE engine gives its LBs; the storage scheme (one
// row-delay memory per cached row, plus a register holding the previous
// word of each row for the left context) is this design's own.
//
// Window geometry: the window of lane j of the word at column c has its
// right-most pixel at image column c*P + j (P pixels per word), so output
// pixel x of a row is the valid convolution whose window ends at column x.
// At c = 0 the left context is zero, so the first KSIZE-1 pixels of each
// output row carry no meaning; the engine only emits rows >= KSIZE-1.
//
// Interface: a word is taken when en && in_valid. The windows appear on
// win one en-cycle later (registered). win[f][j][ky*KSIZE+kx] is pixel
// (ky, kx) of lane j of feature f, ky = 0 being the oldest row. Lanes
// beyond the pixels per word are zero.
module line_buffer
  import neuraghe_pkg::*;
#(
  parameter int N_IF   = IF_PER_COL,
  parameter int K      = KSIZE,
  parameter int DEPTH  = MAX_WPR
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  logic                        in_valid,
  input  prec_e                       prec,
  input  logic [$clog2(DEPTH)-1:0]    col,
  input  logic [N_IF-1:0][WORD_W-1:0] in_word,
  output pix_t [N_IF-1:0][LANES-1:0][K*K-1:0] win
);

  // lines[f][0] holds row r-1, lines[f][1] row r-2, ...
  logic [WORD_W-1:0] lines [N_IF][K-1][DEPTH];
  // previous word of each of the K rows (for the left context)
  logic [WORD_W-1:0] prev_q [N_IF][K];

  logic [WORD_W-1:0] colw [N_IF][K];  // colw[f][i]: row r-(K-1)+i at column col
  pix_t [N_IF-1:0][LANES-1:0][K*K-1:0] win_d;

  always_comb begin
    for (int f = 0; f < N_IF; f++) begin
      colw[f][K-1] = in_word[f];
      for (int i = 0; i < K-1; i++) colw[f][K-2-i] = lines[f][i][col];
    end
  end

  always_comb begin
    int p;
    int s;
    lanes_t cur_l, prv_l;
    p = int'(ppw(prec));
    for (int f = 0; f < N_IF; f++) begin
      for (int ky = 0; ky < K; ky++) begin
        cur_l = unpack_word(colw[f][ky], prec);
        prv_l = (col == '0) ? '0 : unpack_word(prev_q[f][ky], prec);
        for (int j = 0; j < LANES; j++) begin
          for (int kx = 0; kx < K; kx++) begin
            s = p + j - (K-1) + kx;
            if (j >= p)     win_d[f][j][ky*K+kx] = '0;
            else if (s < p) win_d[f][j][ky*K+kx] = prv_l[s];
            else            win_d[f][j][ky*K+kx] = cur_l[s-p];
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win <= '0;
      for (int f = 0; f < N_IF; f++)
        for (int i = 0; i < K; i++) prev_q[f][i] <= '0;
    end else if (en && in_valid) begin
      win <= win_d;
      for (int f = 0; f < N_IF; f++)
        for (int i = 0; i < K; i++) prev_q[f][i] <= colw[f][i];
    end
  end

  // row-delay memories: no reset, contents only read for rows >= K-1
  always_ff @(posedge clk) begin
    if (en && in_valid) begin
      for (int f = 0; f < N_IF; f++) begin
        lines[f][0][col] <= in_word[f];
        for (int i = 1; i < K-1; i++) lines[f][i][col] <= lines[f][i-1][col];
      end
    end
  end

endmodule
