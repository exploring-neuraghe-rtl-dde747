// tcdm_xbar: arbitrated crossbar from NM word-addressed masters to NB
// word-interleaved memory banks.
//
// The CSP uses it twice: as the XBAR between the Convolution Engine's 20
// ports and one port of every TCDM bank, and as the logarithmic
// interconnect between the ADMA / microcontroller and the other port.
// Word address a lives in bank a mod NB at row a / NB, so consecutive words
// sit in consecutive banks. Each bank grants one master per cycle,
// round-robin, starting after the master it granted last; the others see
// gnt low and must keep their request (a bank conflict stalls them).
// The interconnects are named by the NEURAGHE CSP; interleaving and
// round-robin arbitration are this design's own choices.
//
// Timing: gnt is combinational in the request cycle; rvalid and rdata of a
// granted read come one cycle later. Writes complete with the grant.
module tcdm_xbar
  import neuraghe_pkg::*;
#(
  parameter int NM = 2,
  parameter int NB = N_BANKS,
  parameter int RW = TCDM_AW - $clog2(NB)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  tcdm_req_t [NM-1:0]               m_req,
  output tcdm_rsp_t [NM-1:0]               m_rsp,
  output logic      [NB-1:0]               b_req,
  output logic      [NB-1:0]               b_we,
  output logic      [NB-1:0][RW-1:0]       b_addr,
  output logic      [NB-1:0][WORD_W-1:0]   b_wdata,
  input  logic      [NB-1:0][WORD_W-1:0]   b_rdata
);

  localparam int BW = $clog2(NB);
  localparam int MW = (NM > 1) ? $clog2(NM) : 1;

  logic [NB-1:0][MW-1:0] last_q;     // last granted master per bank
  logic [NB-1:0][MW-1:0] win;        // granted master per bank
  logic [NM-1:0]         gnt;
  logic [NM-1:0]         rd_q;       // read granted last cycle
  logic [NM-1:0][BW-1:0] rbank_q;    // its bank
  int                    cand;       // master looked at by the round-robin search

  always_comb begin
    gnt = '0;
    cand = 0;
    for (int b = 0; b < NB; b++) begin
      b_req[b] = 1'b0;
      win[b]   = last_q[b];
      for (int i = 1; i <= NM; i++) begin
        cand = (int'(last_q[b]) + i) % NM;
        if (!b_req[b] && m_req[cand].req && int'(m_req[cand].addr[BW-1:0]) == b) begin
          b_req[b] = 1'b1;
          win[b]   = MW'(cand);
        end
      end
      b_we[b]    = m_req[win[b]].we;
      b_addr[b]  = m_req[win[b]].addr[TCDM_AW-1:BW];
      b_wdata[b] = m_req[win[b]].wdata;
      if (b_req[b]) gnt[win[b]] = 1'b1;
    end
  end

  always_comb begin
    for (int m = 0; m < NM; m++) begin
      m_rsp[m].gnt    = gnt[m];
      m_rsp[m].rvalid = rd_q[m];
      m_rsp[m].rdata  = b_rdata[rbank_q[m]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q  <= '0;
      rd_q    <= '0;
      rbank_q <= '0;
    end else begin
      for (int b = 0; b < NB; b++)
        if (b_req[b]) last_q[b] <= win[b];
      for (int m = 0; m < NM; m++) begin
        rd_q[m]    <= gnt[m] && !m_req[m].we;
        rbank_q[m] <= m_req[m].addr[BW-1:0];
      end
    end
  end

endmodule
