// neuraghe_csp: one Convolution Specific Processor (CSP).
//
// A CSP runs convolutions on its own, leaving the host processor free for
// the rest of the network. It holds
//   - the Convolution Engine (conv_engine) with its private weight memory,
//   - a WDMA that fills the weight memory from DDR,
//   - an ADMA that moves activations between DDR and the TCDM,
//   - the TCDM: 32 word-interleaved dual-port banks of activations,
//   - the XBAR from the engine's 20 ports to one side of the TCDM, and the
//     logarithmic interconnect from the ADMA and the microcontroller to
//     the other side,
//   - control registers, an instruction memory and an L2 memory.
// The RISC microcontroller that runs the control firmware, and the AXI
// infrastructure toward the host, are not part of this RTL: their
// connection points are ports of this module (uc_*, imem_*, l2_*, and the
// two PS ports ps_w_* / ps_a_*, one per DMA). All of this follows the
// NEURAGHE CSP organisation; the single clock is this design's own
// simplification of its split into a fast domain (engine, WDMA) and a slow
// one (the rest).
//
// Timing: the register, TCDM, instruction and L2 ports all answer reads on
// the cycle after the request; `evt` pulses when a CE, WDMA or ADMA job
// ends.
module neuraghe_csp
  import neuraghe_pkg::*;
#(
  parameter int N          = N_COLS,
  parameter int M          = M_ROWS,
  parameter int IMEM_DEPTH = 4096,
  parameter int L2_DEPTH   = 8192
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // PS ports toward DDR
  output ext_req_t                      ps_w_req,
  input  ext_rsp_t                      ps_w_rsp,
  output ext_req_t                      ps_a_req,
  input  ext_rsp_t                      ps_a_rsp,
  // microcontroller: control registers
  input  logic                          uc_reg_req,
  input  logic                          uc_reg_we,
  input  logic [5:0]                    uc_reg_addr,
  input  logic [31:0]                   uc_reg_wdata,
  output logic [31:0]                   uc_reg_rdata,
  output logic                          evt,
  // microcontroller: TCDM through the logarithmic interconnect
  input  tcdm_req_t                     uc_tcdm_req,
  output tcdm_rsp_t                     uc_tcdm_rsp,
  // instruction memory
  input  logic                          imem_req,
  input  logic                          imem_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0] imem_addr,
  input  logic [31:0]                   imem_wdata,
  output logic [31:0]                   imem_rdata,
  // L2 memory
  input  logic                          l2_req,
  input  logic                          l2_we,
  input  logic [$clog2(L2_DEPTH)-1:0]   l2_addr,
  input  logic [31:0]                   l2_wdata,
  output logic [31:0]                   l2_rdata
);

  localparam int NX  = N*IF_PER_COL;
  localparam int NCE = NX + 2*M;
  localparam int BRW = TCDM_AW - $clog2(N_BANKS);

  // control
  ce_cfg_t ce_cfg;
  logic ce_start, ce_busy, ce_done;
  logic [31:0] ce_stalls;
  logic wdma_start, wdma_busy, wdma_done;
  logic [EXT_AW-1:0]  wdma_src;
  logic [WMEM_AW-1:0] wdma_dst;
  logic [WMEM_AW:0]   wdma_len;
  logic adma_start, adma_dir, adma_busy, adma_done;
  logic [EXT_AW-1:0]  adma_ext;
  logic [TCDM_AW-1:0] adma_tcdm;
  logic [TCDM_AW:0]   adma_len;

  csp_regs #(.M(M)) u_regs (
    .clk, .rst_n, .req(uc_reg_req), .we(uc_reg_we), .addr(uc_reg_addr),
    .wdata(uc_reg_wdata), .rdata(uc_reg_rdata),
    .ce_cfg, .ce_start, .ce_busy, .ce_done, .ce_stalls,
    .wdma_start, .wdma_src, .wdma_dst, .wdma_len, .wdma_busy, .wdma_done,
    .adma_start, .adma_dir, .adma_ext, .adma_tcdm, .adma_len, .adma_busy, .adma_done
  );

  assign evt = ce_done | wdma_done | adma_done;

  // engine
  logic wm_we;
  logic [WMEM_AW-1:0] wm_widx;
  pix_t wm_wdata;
  tcdm_req_t [NCE-1:0] ce_req;
  tcdm_rsp_t [NCE-1:0] ce_rsp;

  conv_engine #(.N(N), .M(M)) u_ce (
    .clk, .rst_n, .start(ce_start), .cfg(ce_cfg), .busy(ce_busy), .done(ce_done),
    .stall_cycles(ce_stalls),
    .wm_we, .wm_widx, .wm_wdata,
    .x_req(ce_req[NX-1:0]),       .x_rsp(ce_rsp[NX-1:0]),
    .yi_req(ce_req[NX+M-1:NX]),   .yi_rsp(ce_rsp[NX+M-1:NX]),
    .yo_req(ce_req[NCE-1:NX+M]),  .yo_rsp(ce_rsp[NCE-1:NX+M])
  );

  wdma u_wdma (
    .clk, .rst_n, .start(wdma_start), .src(wdma_src), .dst(wdma_dst), .len(wdma_len),
    .busy(wdma_busy), .done(wdma_done), .ext_req(ps_w_req), .ext_rsp(ps_w_rsp),
    .wm_we, .wm_widx, .wm_wdata
  );

  tcdm_req_t [1:0] li_req;
  tcdm_rsp_t [1:0] li_rsp;

  adma u_adma (
    .clk, .rst_n, .start(adma_start), .dir(adma_dir), .ext_addr(adma_ext),
    .tcdm_addr(adma_tcdm), .len(adma_len), .busy(adma_busy), .done(adma_done),
    .ext_req(ps_a_req), .ext_rsp(ps_a_rsp), .tcdm_req(li_req[0]), .tcdm_rsp(li_rsp[0])
  );

  assign li_req[1]   = uc_tcdm_req;
  assign uc_tcdm_rsp = li_rsp[1];

  // TCDM and its two interconnects
  logic [N_BANKS-1:0]              a_req, a_we, b_req, b_we;
  logic [N_BANKS-1:0][BRW-1:0]     a_addr, b_addr;
  logic [N_BANKS-1:0][WORD_W-1:0]  a_wdata, a_rdata, b_wdata, b_rdata;

  tcdm_xbar #(.NM(NCE), .NB(N_BANKS)) u_xbar (
    .clk, .rst_n, .m_req(ce_req), .m_rsp(ce_rsp),
    .b_req(a_req), .b_we(a_we), .b_addr(a_addr), .b_wdata(a_wdata), .b_rdata(a_rdata)
  );

  tcdm_xbar #(.NM(2), .NB(N_BANKS)) u_logic (
    .clk, .rst_n, .m_req(li_req), .m_rsp(li_rsp),
    .b_req(b_req), .b_we(b_we), .b_addr(b_addr), .b_wdata(b_wdata), .b_rdata(b_rdata)
  );

  tcdm #(.NB(N_BANKS), .DEPTH(BANK_DEPTH)) u_tcdm (
    .clk,
    .a_req, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_req, .b_we, .b_addr, .b_wdata, .b_rdata
  );

  sp_ram #(.W(32), .DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .req(imem_req), .we(imem_we), .addr(imem_addr), .wdata(imem_wdata), .rdata(imem_rdata)
  );

  sp_ram #(.W(32), .DEPTH(L2_DEPTH)) u_l2 (
    .clk, .req(l2_req), .we(l2_we), .addr(l2_addr), .wdata(l2_wdata), .rdata(l2_rdata)
  );

endmodule
