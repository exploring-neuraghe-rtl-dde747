// weight_memory: the Convolution Engine's private weight memory.
//
// NB banks of 16-bit weights. The write side (filled by the WDMA) takes one
// weight per cycle at a flat index: bank = index mod NB, row = index / NB.
// The read side (used by the weight loader, WL) reads the same row of all
// NB banks at once, giving NB weights per cycle: the "32 ports to dedicated
// memory" of the engine. Bank count follows the NEURAGHE engine; the depth
// and the single write port are this design's own choices.
//
// Timing: synchronous read, rdata valid the cycle after raddr is applied
// with re. Writes take effect at the clock edge.
module weight_memory
  import neuraghe_pkg::*;
#(
  parameter int NB    = N_WBANKS,
  parameter int DEPTH = WBANK_DEPTH,
  parameter int IW    = $clog2(NB*DEPTH)
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [IW-1:0]            widx,
  input  pix_t                     wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output pix_t [NB-1:0]            rdata
);

  localparam int BW = $clog2(NB);

  pix_t mem [NB][DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[widx[BW-1:0]][widx[IW-1:BW]] <= wdata;
    if (re)
      for (int b = 0; b < NB; b++) rdata[b] <= mem[b][raddr];
  end

endmodule
