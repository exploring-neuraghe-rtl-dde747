// csp_regs: control registers of a CSP, programmed by its microcontroller.
//
// The NEURAGHE CSP is driven by firmware on a RISC microcontroller that
// starts the engine and the two DMAs and synchronises them; how it talks to
// them is not described, so this register map is this design's own. Word
// addresses on the register port:
//
//   0x00 CE_START    write: bit0 starts a CE job
//   0x01 X_BASE      0x02 X_STRIDE   0x03 Y_BASE    0x04 O_BASE
//   0x05 O_STRIDE    0x06 GEOM {rows[25:16], wpr[7:0]}
//   0x07 W_BASE      weight memory row of the job's weights
//   0x08 MODE        {use_yin[21], pool[20:19], relu_en[18], prec[17],
//                     shift[16:11], n_of[10:8], n_if[3:0]}
//   0x09 + i         BIAS i (bits 15:0), i = 0..M-1
//   0x10 WDMA_START  0x11 WDMA_SRC   0x12 WDMA_DST  0x13 WDMA_LEN
//   0x18 ADMA_START  write: bit0 start, bit1 direction (1 = TCDM to DDR)
//   0x19 ADMA_EXT    0x1A ADMA_TCDM  0x1B ADMA_LEN
//   0x20 STATUS      read: {done adma, wdma, ce [6:4], busy adma, wdma, ce [2:0]};
//                    write 1s to bits 6:4 clear the done flags
//   0x21 CE_STALLS   stalled streaming cycles of the last CE job
//
// Timing: writes take effect at the clock edge; reads return rdata on the
// cycle after the request. Start outputs are one-cycle pulses.
module csp_regs
  import neuraghe_pkg::*;
#(
  parameter int M = M_ROWS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req,
  input  logic               we,
  input  logic [5:0]         addr,
  input  logic [31:0]        wdata,
  output logic [31:0]        rdata,
  output ce_cfg_t            ce_cfg,
  output logic               ce_start,
  input  logic               ce_busy,
  input  logic               ce_done,
  input  logic [31:0]        ce_stalls,
  output logic               wdma_start,
  output logic [EXT_AW-1:0]  wdma_src,
  output logic [WMEM_AW-1:0] wdma_dst,
  output logic [WMEM_AW:0]   wdma_len,
  input  logic               wdma_busy,
  input  logic               wdma_done,
  output logic               adma_start,
  output logic               adma_dir,
  output logic [EXT_AW-1:0]  adma_ext,
  output logic [TCDM_AW-1:0] adma_tcdm,
  output logic [TCDM_AW:0]   adma_len,
  input  logic               adma_busy,
  input  logic               adma_done
);

  logic [2:0] done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ce_cfg     <= '0;
      ce_start   <= 1'b0;
      wdma_start <= 1'b0;
      wdma_src   <= '0;
      wdma_dst   <= '0;
      wdma_len   <= '0;
      adma_start <= 1'b0;
      adma_dir   <= 1'b0;
      adma_ext   <= '0;
      adma_tcdm  <= '0;
      adma_len   <= '0;
      done_q     <= '0;
      rdata      <= '0;
    end else begin
      ce_start   <= 1'b0;
      wdma_start <= 1'b0;
      adma_start <= 1'b0;
      if (ce_done)   done_q[0] <= 1'b1;
      if (wdma_done) done_q[1] <= 1'b1;
      if (adma_done) done_q[2] <= 1'b1;
      if (req && we) begin
        unique case (addr)
          6'h00: ce_start        <= wdata[0];
          6'h01: ce_cfg.x_base   <= wdata[TCDM_AW-1:0];
          6'h02: ce_cfg.x_stride <= wdata[TCDM_AW-1:0];
          6'h03: ce_cfg.y_base   <= wdata[TCDM_AW-1:0];
          6'h04: ce_cfg.o_base   <= wdata[TCDM_AW-1:0];
          6'h05: ce_cfg.o_stride <= wdata[TCDM_AW-1:0];
          6'h06: begin
            ce_cfg.wpr  <= wdata[7:0];
            ce_cfg.rows <= wdata[25:16];
          end
          6'h07: ce_cfg.w_base <= wdata[WMEM_AW-1:0];
          6'h08: begin
            ce_cfg.n_if    <= wdata[3:0];
            ce_cfg.n_of    <= wdata[10:8];
            ce_cfg.shift   <= wdata[16:11];
            ce_cfg.prec    <= prec_e'(wdata[17]);
            ce_cfg.relu_en <= wdata[18];
            ce_cfg.pool    <= pool_mode_e'(wdata[20:19]);
            ce_cfg.use_yin <= wdata[21];
          end
          6'h10: wdma_start <= wdata[0];
          6'h11: wdma_src   <= wdata;
          6'h12: wdma_dst   <= wdata[WMEM_AW-1:0];
          6'h13: wdma_len   <= wdata[WMEM_AW:0];
          6'h18: begin
            adma_start <= wdata[0];
            adma_dir   <= wdata[1];
          end
          6'h19: adma_ext  <= wdata;
          6'h1A: adma_tcdm <= wdata[TCDM_AW-1:0];
          6'h1B: adma_len  <= wdata[TCDM_AW:0];
          6'h20: done_q    <= done_q & ~wdata[6:4];
          default: begin
            for (int i = 0; i < M; i++)
              if (int'(addr) == 9 + i) ce_cfg.bias[i*DATA_W +: DATA_W] <= wdata[DATA_W-1:0];
          end
        endcase
      end
      if (req && !we) begin
        unique case (addr)
          6'h01: rdata <= 32'(ce_cfg.x_base);
          6'h02: rdata <= 32'(ce_cfg.x_stride);
          6'h03: rdata <= 32'(ce_cfg.y_base);
          6'h04: rdata <= 32'(ce_cfg.o_base);
          6'h05: rdata <= 32'(ce_cfg.o_stride);
          6'h06: rdata <= {6'd0, ce_cfg.rows, 8'd0, ce_cfg.wpr};
          6'h07: rdata <= 32'(ce_cfg.w_base);
          6'h08: rdata <= {10'd0, ce_cfg.use_yin, ce_cfg.pool, ce_cfg.relu_en, ce_cfg.prec,
                           ce_cfg.shift, ce_cfg.n_of, 4'd0, ce_cfg.n_if};
          6'h11: rdata <= wdma_src;
          6'h12: rdata <= 32'(wdma_dst);
          6'h13: rdata <= 32'(wdma_len);
          6'h19: rdata <= adma_ext;
          6'h1A: rdata <= 32'(adma_tcdm);
          6'h1B: rdata <= 32'(adma_len);
          6'h20: rdata <= {25'd0, done_q, 1'b0, adma_busy, wdma_busy, ce_busy};
          6'h21: rdata <= ce_stalls;
          default: begin
            rdata <= '0;
            for (int i = 0; i < M; i++)
              if (int'(addr) == 9 + i) rdata <= 32'(ce_cfg.bias[i*DATA_W +: DATA_W]);
          end
        endcase
      end
    end
  end

endmodule
