// adma: activation DMA of a CSP.
//
// It moves `len` 32-bit words between the PS port (DDR) and the TCDM, in
// the direction given by `dir`: 0 (receive) copies from ext_addr in DDR to
// tcdm_addr in the TCDM, 1 (transmit) copies from the TCDM back to DDR.
// Its TCDM side is a master of the logarithmic interconnect. The ADMA and
// its two directions follow the NEURAGHE CSP; the sequence of one word at a
// time (read, wait for data, write) is this design's own choice.
//
// Interface: start is sampled when idle; done pulses after the last
// write is granted. Both ports keep req until gnt; read data come on rvalid
// (one cycle after the grant on the TCDM, any time later on the PS port).
module adma
  import neuraghe_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               dir,
  input  logic [EXT_AW-1:0]  ext_addr,
  input  logic [TCDM_AW-1:0] tcdm_addr,
  input  logic [TCDM_AW:0]   len,
  output logic               busy,
  output logic               done,
  output ext_req_t           ext_req,
  input  ext_rsp_t           ext_rsp,
  output tcdm_req_t          tcdm_req,
  input  tcdm_rsp_t          tcdm_rsp
);

  typedef enum logic [2:0] {S_IDLE, S_RD, S_RWAIT, S_WR} state_e;
  state_e state_q;

  logic               dir_q;
  logic [EXT_AW-1:0]  ea_q;
  logic [TCDM_AW-1:0] ta_q;
  logic [TCDM_AW:0]   left_q;
  logic [WORD_W-1:0]  data_q;

  logic rd_gnt, rd_valid, wr_gnt;
  assign rd_gnt   = dir_q ? tcdm_rsp.gnt    : ext_rsp.gnt;
  assign rd_valid = dir_q ? tcdm_rsp.rvalid : ext_rsp.rvalid;
  assign wr_gnt   = dir_q ? ext_rsp.gnt     : tcdm_rsp.gnt;

  always_comb begin
    ext_req  = '0;
    tcdm_req = '0;
    ext_req.addr   = ea_q;
    ext_req.wdata  = data_q;
    tcdm_req.addr  = ta_q;
    tcdm_req.wdata = data_q;
    if (state_q == S_RD) begin
      if (dir_q) tcdm_req.req = 1'b1;
      else       ext_req.req  = 1'b1;
    end
    if (state_q == S_WR) begin
      if (dir_q) begin
        ext_req.req = 1'b1;
        ext_req.we  = 1'b1;
      end else begin
        tcdm_req.req = 1'b1;
        tcdm_req.we  = 1'b1;
      end
    end
  end

  assign busy = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      dir_q   <= 1'b0;
      ea_q    <= '0;
      ta_q    <= '0;
      left_q  <= '0;
      data_q  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          dir_q  <= dir;
          ea_q   <= ext_addr;
          ta_q   <= tcdm_addr;
          left_q <= len;
          if (len != '0) state_q <= S_RD;
          else           done    <= 1'b1;
        end
        S_RD:    if (rd_gnt) state_q <= S_RWAIT;
        S_RWAIT: if (rd_valid) begin
          data_q  <= dir_q ? tcdm_rsp.rdata : ext_rsp.rdata;
          state_q <= S_WR;
        end
        S_WR: if (wr_gnt) begin
          ea_q   <= ea_q + EXT_AW'(4);
          ta_q   <= ta_q + 1'b1;
          left_q <= left_q - 1'b1;
          if (left_q == 1) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else state_q <= S_RD;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
