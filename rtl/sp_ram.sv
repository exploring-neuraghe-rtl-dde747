// sp_ram: single-port synchronous RAM.
//
// Used for the CSP's instruction memory (microcontroller firmware) and its
// L2 BRAM memory. One access per cycle: a write when req && we, otherwise a
// read whose data appear on rdata the next cycle. The memories are named by
// the NEURAGHE CSP; their sizes and this port are this design's own.
module sp_ram #(
  parameter int W     = 32,
  parameter int DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     req,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (req) begin
      if (we) mem[addr] <= wdata;
      else    rdata <= mem[addr];
    end
  end

endmodule
