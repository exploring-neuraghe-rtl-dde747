// wdma: weight DMA of a CSP.
//
// It copies `len` 16-bit weights from the PS port (DDR) at byte address
// src into the Convolution Engine's weight memory from flat index dst on.
// Each 32-bit PS word carries two weights, low half first. The WDMA as the
// engine's dedicated weight mover follows NEURAGHE; the transfer format
// and the one-word-at-a-time sequence (request, wait for data, write two
// weights) are this design's own choices.
//
// Interface: start is sampled when idle; done pulses after the last weight
// is written. The PS port keeps req until gnt and takes read data on
// rvalid, which may come any number of cycles after the grant.
module wdma
  import neuraghe_pkg::*;
#(
  parameter int IW = WMEM_AW
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [EXT_AW-1:0] src,
  input  logic [IW-1:0]     dst,
  input  logic [IW:0]       len,
  output logic              busy,
  output logic              done,
  output ext_req_t          ext_req,
  input  ext_rsp_t          ext_rsp,
  output logic              wm_we,
  output logic [IW-1:0]     wm_widx,
  output pix_t              wm_wdata
);

  typedef enum logic [2:0] {S_IDLE, S_REQ, S_WAIT, S_WR0, S_WR1} state_e;
  state_e state_q;

  logic [EXT_AW-1:0] addr_q;
  logic [IW-1:0]     idx_q;
  logic [IW:0]       left_q;
  logic [WORD_W-1:0] data_q;

  assign busy          = (state_q != S_IDLE);
  assign ext_req.req   = (state_q == S_REQ);
  assign ext_req.we    = 1'b0;
  assign ext_req.addr  = addr_q;
  assign ext_req.wdata = '0;
  assign wm_we         = (state_q == S_WR0) || (state_q == S_WR1);
  assign wm_widx       = idx_q;
  assign wm_wdata      = (state_q == S_WR1) ? pix_t'(data_q[31:16]) : pix_t'(data_q[15:0]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      addr_q  <= '0;
      idx_q   <= '0;
      left_q  <= '0;
      data_q  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          addr_q <= src;
          idx_q  <= dst;
          left_q <= len;
          if (len != '0) state_q <= S_REQ;
          else           done    <= 1'b1;
        end
        S_REQ: if (ext_rsp.gnt) begin
          addr_q  <= addr_q + EXT_AW'(4);
          state_q <= S_WAIT;
        end
        S_WAIT: if (ext_rsp.rvalid) begin
          data_q  <= ext_rsp.rdata;
          state_q <= S_WR0;
        end
        S_WR0: begin
          idx_q  <= idx_q + 1'b1;
          left_q <= left_q - 1'b1;
          if (left_q == 1) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else state_q <= S_WR1;
        end
        S_WR1: begin
          idx_q  <= idx_q + 1'b1;
          left_q <= left_q - 1'b1;
          if (left_q == 1) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else state_q <= S_REQ;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
