// weight_loader: WL, moves one job's weights into the SoP weight registers.
//
// On start it reads NROWS consecutive rows of the weight memory, from row
// base, and stores the NB weights of each row into the flat weight register
// file wgt[row*NB + bank]. Weight i belongs to SoP unit
// (matrix row, column) = (i / (N_COLS*N_IF*K*K), (i / (N_IF*K*K)) mod
// N_COLS), feature (i / (K*K)) mod N_IF, tap i mod (K*K). The WL block and
// its 32-weight-wide access follow the NEURAGHE engine; the register file
// and this ordering are this design's own choices.
//
// Timing: busy from the cycle after start until done, which pulses after
// NROWS+1 cycles. The weight registers keep their value until the next job.
module weight_loader
  import neuraghe_pkg::*;
#(
  parameter int NW    = M_ROWS*N_COLS*IF_PER_COL*KSIZE*KSIZE,
  parameter int NB    = N_WBANKS,
  parameter int DEPTH = WBANK_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [$clog2(DEPTH)-1:0] base,
  output logic                     busy,
  output logic                     done,
  output logic                     mem_re,
  output logic [$clog2(DEPTH)-1:0] mem_raddr,
  input  pix_t [NB-1:0]            mem_rdata,
  output pix_t [NW-1:0]            wgt
);

  localparam int NROWS = (NW + NB - 1) / NB;
  localparam int CW    = $clog2(NROWS + 1);

  logic [CW-1:0] issue_q;   // rows requested so far
  logic          dv_q;      // read data arrives this cycle
  logic [CW-1:0] dst_q;     // row index of the arriving data

  assign mem_re    = busy && (issue_q < CW'(NROWS));
  assign mem_raddr = base + $clog2(DEPTH)'(issue_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      done    <= 1'b0;
      issue_q <= '0;
      dv_q    <= 1'b0;
      dst_q   <= '0;
    end else begin
      done <= 1'b0;
      dv_q <= mem_re;
      if (mem_re) begin
        dst_q   <= issue_q;
        issue_q <= issue_q + 1'b1;
      end
      if (start && !busy) begin
        busy    <= 1'b1;
        issue_q <= '0;
      end else if (busy && dv_q && dst_q == CW'(NROWS-1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wgt <= '0;
    else if (dv_q)
      for (int b = 0; b < NB; b++)
        if (int'(dst_q)*NB + b < NW) wgt[int'(dst_q)*NB + b] <= mem_rdata[b];
  end

endmodule
