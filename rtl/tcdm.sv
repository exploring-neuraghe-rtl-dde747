// tcdm: the CSP's Tightly Coupled Data Memory that holds the activations.
//
// NB banks of DEPTH 32-bit words, each a true dual-port memory: port A is
// driven by the XBAR of the Convolution Engine, port B by the logarithmic
// interconnect (ADMA and microcontroller). Both ports can read or write
// any bank in the same cycle. The 32 banks follow the NEURAGHE CSP; the
// dual-port split and the depth are this design's own choices. Writing the
// same word from both ports in one cycle leaves an undefined result.
//
// Timing: synchronous read, data on *_rdata the cycle after the request.
module tcdm
  import neuraghe_pkg::*;
#(
  parameter int NB    = N_BANKS,
  parameter int DEPTH = BANK_DEPTH
) (
  input  logic                                  clk,
  input  logic [NB-1:0]                         a_req,
  input  logic [NB-1:0]                         a_we,
  input  logic [NB-1:0][$clog2(DEPTH)-1:0]      a_addr,
  input  logic [NB-1:0][WORD_W-1:0]             a_wdata,
  output logic [NB-1:0][WORD_W-1:0]             a_rdata,
  input  logic [NB-1:0]                         b_req,
  input  logic [NB-1:0]                         b_we,
  input  logic [NB-1:0][$clog2(DEPTH)-1:0]      b_addr,
  input  logic [NB-1:0][WORD_W-1:0]             b_wdata,
  output logic [NB-1:0][WORD_W-1:0]             b_rdata
);

  logic [WORD_W-1:0] mem [NB][DEPTH];

  always_ff @(posedge clk) begin
    for (int b = 0; b < NB; b++) begin
      if (a_req[b]) begin
        if (a_we[b]) mem[b][a_addr[b]] <= a_wdata[b];
        else         a_rdata[b] <= mem[b][a_addr[b]];
      end
      if (b_req[b]) begin
        if (b_we[b]) mem[b][b_addr[b]] <= b_wdata[b];
        else         b_rdata[b] <= mem[b][b_addr[b]];
      end
    end
  end

endmodule
