// neuraghe_top: the programmable-logic side of a NEURAGHE system.
//
// NEURAGHE pairs a host processor (with its DDR) with N_CSP Convolution
// Specific Processors on the programmable logic. Each CSP uses two PS
// ports toward DDR (one per DMA), so one or two CSPs fit the four ports of
// the target family. The default is one CSP with a 4x4 SoP matrix; two
// CSPs side by side are selected with N_CSP = 2 (and a 2x4 matrix with
// N_COLS_P = 4, M_ROWS_P = 2 would give the two-CSP organisation compared
// in the evaluation). Every CSP's ports are brought out unchanged, indexed
// by CSP; the host, the DDR, the microcontrollers and the AXI
// infrastructure connect to them from outside.
module neuraghe_top
  import neuraghe_pkg::*;
#(
  parameter int N_CSP      = 1,
  parameter int N_COLS_P   = N_COLS,
  parameter int M_ROWS_P   = M_ROWS,
  parameter int IMEM_DEPTH = 4096,
  parameter int L2_DEPTH   = 8192
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  output ext_req_t [N_CSP-1:0]                      ps_w_req,
  input  ext_rsp_t [N_CSP-1:0]                      ps_w_rsp,
  output ext_req_t [N_CSP-1:0]                      ps_a_req,
  input  ext_rsp_t [N_CSP-1:0]                      ps_a_rsp,
  input  logic     [N_CSP-1:0]                      uc_reg_req,
  input  logic     [N_CSP-1:0]                      uc_reg_we,
  input  logic     [N_CSP-1:0][5:0]                 uc_reg_addr,
  input  logic     [N_CSP-1:0][31:0]                uc_reg_wdata,
  output logic     [N_CSP-1:0][31:0]                uc_reg_rdata,
  output logic     [N_CSP-1:0]                      evt,
  input  tcdm_req_t [N_CSP-1:0]                     uc_tcdm_req,
  output tcdm_rsp_t [N_CSP-1:0]                     uc_tcdm_rsp,
  input  logic     [N_CSP-1:0]                      imem_req,
  input  logic     [N_CSP-1:0]                      imem_we,
  input  logic     [N_CSP-1:0][$clog2(IMEM_DEPTH)-1:0] imem_addr,
  input  logic     [N_CSP-1:0][31:0]                imem_wdata,
  output logic     [N_CSP-1:0][31:0]                imem_rdata,
  input  logic     [N_CSP-1:0]                      l2_req,
  input  logic     [N_CSP-1:0]                      l2_we,
  input  logic     [N_CSP-1:0][$clog2(L2_DEPTH)-1:0]   l2_addr,
  input  logic     [N_CSP-1:0][31:0]                l2_wdata,
  output logic     [N_CSP-1:0][31:0]                l2_rdata
);

  for (genvar i = 0; i < N_CSP; i++) begin : g_csp
    neuraghe_csp #(.N(N_COLS_P), .M(M_ROWS_P), .IMEM_DEPTH(IMEM_DEPTH), .L2_DEPTH(L2_DEPTH)) u_csp (
      .clk, .rst_n,
      .ps_w_req(ps_w_req[i]), .ps_w_rsp(ps_w_rsp[i]),
      .ps_a_req(ps_a_req[i]), .ps_a_rsp(ps_a_rsp[i]),
      .uc_reg_req(uc_reg_req[i]), .uc_reg_we(uc_reg_we[i]), .uc_reg_addr(uc_reg_addr[i]),
      .uc_reg_wdata(uc_reg_wdata[i]), .uc_reg_rdata(uc_reg_rdata[i]), .evt(evt[i]),
      .uc_tcdm_req(uc_tcdm_req[i]), .uc_tcdm_rsp(uc_tcdm_rsp[i]),
      .imem_req(imem_req[i]), .imem_we(imem_we[i]), .imem_addr(imem_addr[i]),
      .imem_wdata(imem_wdata[i]), .imem_rdata(imem_rdata[i]),
      .l2_req(l2_req[i]), .l2_we(l2_we[i]), .l2_addr(l2_addr[i]),
      .l2_wdata(l2_wdata[i]), .l2_rdata(l2_rdata[i])
    );
  end

endmodule
