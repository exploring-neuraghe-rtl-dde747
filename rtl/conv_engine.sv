// conv_engine: the Convolution Engine (CE) of one NEURAGHE CSP.
//
// The engine computes, for one job, up to M outputs maps from up to
// N*IF_PER_COL input maps (12 -> 4 with the default 4x4 SoP matrix):
//
//   x_in ports (N*IF_PER_COL) -> LB per column -> SoP matrix (M rows x N
//   columns) -> add_shift per row (+ y_in partial result or bias) -> ReLU
//   -> pooling -> y_out ports
//
// Column n of the matrix sees the windows of input maps n*IF_PER_COL ..
// n*IF_PER_COL+IF_PER_COL-1 from line buffer n; row m adds the results of
// its N SoP units into output map m. The weights live in the engine's
// private weight memory (written through the wm_* port by the WDMA) and are
// copied into the SoP units by the weight loader when the job starts.
// Precision (16 or 8 bit), shift, ReLU, pooling mode, bias and the use of
// y_in are per-job settings in cfg. This structure follows the NEURAGHE
// CE; the control of the job (ce_controller) and the data formats are this
// design's own.
//
// Output frame: output word (r, c) of a map is the KSIZE x KSIZE valid
// convolution whose window ends at input row r and input pixel column
// c*P+j (P pixels per word); rows r < KSIZE-1 are not written and the
// first KSIZE-1 pixels of each row carry no meaning. With pooling, the
// output is the 2x2-pooled frame at (r/2, c/2) with a row pitch of wpr/2.
//
// Timing: start is sampled in idle; done pulses once every output word has
// been written. Pipeline: LB (1) + SoP (2) + add_shift (1) + ReLU (1)
// register stages, all advanced together by the controller's adv.
module conv_engine
  import neuraghe_pkg::*;
#(
  parameter int N     = N_COLS,
  parameter int M     = M_ROWS,
  parameter int NIF   = IF_PER_COL,
  parameter int K     = KSIZE,
  parameter int WPR   = MAX_WPR,
  parameter int WNB   = N_WBANKS,
  parameter int WDEP  = WBANK_DEPTH
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  ce_cfg_t                       cfg,
  output logic                          busy,
  output logic                          done,
  output logic [31:0]                   stall_cycles,
  // weight memory write port (from the WDMA)
  input  logic                          wm_we,
  input  logic [$clog2(WNB*WDEP)-1:0]   wm_widx,
  input  pix_t                          wm_wdata,
  // TCDM ports
  output tcdm_req_t [N*NIF-1:0]         x_req,
  input  tcdm_rsp_t [N*NIF-1:0]         x_rsp,
  output tcdm_req_t [M-1:0]             yi_req,
  input  tcdm_rsp_t [M-1:0]             yi_rsp,
  output tcdm_req_t [M-1:0]             yo_req,
  input  tcdm_rsp_t [M-1:0]             yo_rsp
);

  localparam int NX  = N*NIF;
  localparam int KK  = K*K;
  localparam int NW  = M*N*NIF*KK;
  localparam int CW  = $clog2(WPR);
  localparam int RW  = 10;
  localparam int LAT = 5;

  ce_cfg_t cfg_q;
  logic adv, st_valid, st_emit;
  logic [RW-1:0] st_row;
  logic [CW-1:0] st_col;
  logic [NX-1:0][WORD_W-1:0] st_x;
  logic [M-1:0][WORD_W-1:0]  st_y;
  logic [M-1:0]              res_valid;
  logic [M-1:0][WORD_W-1:0]  res_word;
  logic [M-1:0][RW-1:0]      res_row;
  logic [M-1:0][CW-1:0]      res_col;

  logic wl_start, wl_done, wl_busy, wm_re;
  logic [$clog2(WDEP)-1:0] wm_raddr;
  pix_t [WNB-1:0] wm_rdata;
  pix_t [NW-1:0]  wgt;

  ce_controller #(.N_X(NX), .N_Y(M), .K(K), .LAT(LAT), .CW(CW), .RW(RW)) u_ctrl (
    .clk, .rst_n, .start, .cfg, .cfg_q, .busy, .done, .stall_cycles,
    .wl_start, .wl_done,
    .x_req, .x_rsp, .yi_req, .yi_rsp, .yo_req, .yo_rsp,
    .adv, .st_valid, .st_emit, .st_row, .st_col, .st_x, .st_y,
    .res_valid, .res_word, .res_row, .res_col
  );

  weight_memory #(.NB(WNB), .DEPTH(WDEP)) u_wmem (
    .clk, .we(wm_we), .widx(wm_widx), .wdata(wm_wdata),
    .re(wm_re), .raddr(wm_raddr), .rdata(wm_rdata)
  );

  weight_loader #(.NW(NW), .NB(WNB), .DEPTH(WDEP)) u_wl (
    .clk, .rst_n, .start(wl_start), .base(cfg_q.w_base[$clog2(WDEP)-1:0]),
    .busy(wl_busy), .done(wl_done),
    .mem_re(wm_re), .mem_raddr(wm_raddr), .mem_rdata(wm_rdata), .wgt
  );

  // line buffers, one per column
  pix_t [N-1:0][NIF-1:0][LANES-1:0][KK-1:0] win;
  for (genvar n = 0; n < N; n++) begin : g_lb
    line_buffer #(.N_IF(NIF), .K(K), .DEPTH(WPR)) u_lb (
      .clk, .rst_n, .en(adv), .in_valid(st_valid), .prec(cfg_q.prec),
      .col(st_col), .in_word(st_x[n*NIF +: NIF]), .win(win[n])
    );
  end

  // SoP matrix and row back end
  logic signed [M-1:0][N-1:0][LANES-1:0][ACC_W-1:0] sop_sum;
  lanes_t [M-1:0] as_out, relu_out;

  // step metadata, delayed to meet the datapath
  logic [LAT-1:0]           m_emit;
  logic [LAT-1:0][RW-1:0]   m_row;
  logic [LAT-1:0][CW-1:0]   m_col;
  logic [2:0][M-1:0][WORD_W-1:0] m_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_emit <= '0;
      m_row  <= '0;
      m_col  <= '0;
      m_y    <= '0;
    end else if (adv) begin
      m_emit <= {m_emit[LAT-2:0], st_emit};
      m_row  <= {m_row[LAT-2:0], st_row};
      m_col  <= {m_col[LAT-2:0], st_col};
      m_y    <= {m_y[1:0], st_y};
    end
  end

  for (genvar m = 0; m < M; m++) begin : g_row
    for (genvar n = 0; n < N; n++) begin : g_col
      sop_unit #(.N_IF(NIF), .K(K)) u_sop (
        .clk, .rst_n, .en(adv), .prec(cfg_q.prec), .win(win[n]),
        .wgt(wgt[(m*N+n)*NIF*KK +: NIF*KK]), .sum(sop_sum[m][n])
      );
    end

    add_shift #(.N_IN(N)) u_as (
      .clk, .rst_n, .en(adv), .prec(cfg_q.prec), .shift(cfg_q.shift),
      .use_yin(cfg_q.use_yin), .sop_sum(sop_sum[m]),
      .yin(unpack_word(m_y[2][m], cfg_q.prec)),
      .bias(cfg_q.bias[m*DATA_W +: DATA_W]), .out(as_out[m])
    );

    relu_unit u_relu (
      .clk, .rst_n, .en(adv), .relu_en(cfg_q.relu_en), .in(as_out[m]), .out(relu_out[m])
    );

    pooling_unit #(.DEPTH(WPR), .RW(RW)) u_pool (
      .clk, .rst_n, .en(adv), .in_valid(m_emit[LAT-1]), .prec(cfg_q.prec),
      .mode(cfg_q.pool), .row(m_row[LAT-1]), .col(m_col[LAT-1]), .in(relu_out[m]),
      .out_valid(res_valid[m]), .out_word(res_word[m]),
      .out_row(res_row[m]), .out_col(res_col[m])
    );
  end

endmodule
