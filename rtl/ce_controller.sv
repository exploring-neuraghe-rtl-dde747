// ce_controller: sequencer and TCDM port logic of the Convolution Engine.
//
// One job convolves up to N_X input maps (one per x_in port) into up to N_Y
// output maps over a whole frame of cfg.rows x cfg.wpr words. The
// controller
//   1. starts the weight loader and waits for it,
//   2. streams the frame one word position ("step") at a time: for each
//      step it reads one word per active x_in port and, when partial
//      results are accumulated (cfg.use_yin) on rows >= K-1, one word per
//      active y_in port; the step is handed to the datapath (adv) once all
//      of its words are in,
//   3. gives the datapath LAT empty steps to flush its pipeline,
//   4. waits until every output word has been written through y_out.
// The engine's x_in / y_in / y_out ports and the idea of an autonomous
// engine follow NEURAGHE; everything inside this block is this design's
// own, since the engine's control is not described beyond that.
//
// Stalls: a port whose request is not granted (a TCDM bank conflict)
// keeps requesting; words that did arrive are held, and adv waits. Each
// y_out port has a two-entry queue so that a write that waits for its bank
// does not stop the stream at once; adv also waits while a queue is full.
// Without conflicts the engine takes one step per cycle: the requests of
// step t+1 go out in the cycle in which step t is handed over.
//
// Addresses: map m starts at base + m*stride; pixel word (r, c) is at
// r*wpr + c inside it. Pooled outputs use a row pitch of wpr/2.
//
// stall_cycles counts cycles of the streaming phase without adv.
module ce_controller
  import neuraghe_pkg::*;
#(
  parameter int N_X = N_COLS*IF_PER_COL,
  parameter int N_Y = M_ROWS,
  parameter int K   = KSIZE,
  parameter int LAT = 5,
  parameter int CW  = $clog2(MAX_WPR),
  parameter int RW  = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  ce_cfg_t                  cfg,
  output ce_cfg_t                  cfg_q,
  output logic                     busy,
  output logic                     done,
  output logic [31:0]              stall_cycles,
  // weight loader
  output logic                     wl_start,
  input  logic                     wl_done,
  // TCDM ports
  output tcdm_req_t [N_X-1:0]      x_req,
  input  tcdm_rsp_t [N_X-1:0]      x_rsp,
  output tcdm_req_t [N_Y-1:0]      yi_req,
  input  tcdm_rsp_t [N_Y-1:0]      yi_rsp,
  output tcdm_req_t [N_Y-1:0]      yo_req,
  input  tcdm_rsp_t [N_Y-1:0]      yo_rsp,
  // step handed to the datapath when adv
  output logic                     adv,
  output logic                     st_valid,
  output logic                     st_emit,
  output logic [RW-1:0]            st_row,
  output logic [CW-1:0]            st_col,
  output logic [N_X-1:0][WORD_W-1:0] st_x,
  output logic [N_Y-1:0][WORD_W-1:0] st_y,
  // results of the datapath, written when adv
  input  logic [N_Y-1:0]           res_valid,
  input  logic [N_Y-1:0][WORD_W-1:0] res_word,
  input  logic [N_Y-1:0][RW-1:0]   res_row,
  input  logic [N_Y-1:0][CW-1:0]   res_col
);

  localparam int NP = N_X + N_Y;   // read ports: x_in then y_in

  typedef enum logic [2:0] {S_IDLE, S_WLOAD, S_STREAM, S_FLUSH, S_DRAIN} state_e;
  state_e state_q;

  logic [RW-1:0] r_q, r_n;
  logic [CW-1:0] c_q, c_n;
  logic          last;
  logic [$clog2(LAT+1)-1:0] flush_q;

  // read port state
  logic [NP-1:0]             have_q, pend_q;
  logic [NP-1:0][WORD_W-1:0] held_q;
  logic [NP-1:0]             need_t, need_n, req, gnt, ready;
  logic [NP-1:0][WORD_W-1:0] rdata, pdata;
  tcdm_req_t [NP-1:0]        preq;

  // output queues
  typedef struct packed {
    logic [TCDM_AW-1:0] addr;
    logic [WORD_W-1:0]  data;
  } oq_t;
  oq_t [N_Y-1:0][1:0] oq_q;
  logic [N_Y-1:0][1:0] oq_cnt;
  logic [N_Y-1:0]      push, pop;
  logic                fifo_ok, all_ready, complete;

  always_comb begin
    last = (r_q == cfg_q.rows - 1'b1) && (c_q == CW'(cfg_q.wpr - 1'b1));
    if (c_q == CW'(cfg_q.wpr - 1'b1)) begin
      c_n = '0;
      r_n = r_q + 1'b1;
    end else begin
      c_n = c_q + 1'b1;
      r_n = r_q;
    end
  end

  function automatic logic port_needed(int p, logic [RW-1:0] r, ce_cfg_t c);
    if (p < N_X) return p < int'(c.n_if);
    return c.use_yin && (p - N_X) < int'(c.n_of) && r >= RW'(K-1);
  endfunction

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      need_t[p] = port_needed(p, r_q, cfg_q);
      need_n[p] = port_needed(p, r_n, cfg_q);
    end
  end

  always_comb begin
    fifo_ok = 1'b1;
    for (int o = 0; o < N_Y; o++)
      if (oq_cnt[o] == 2'd2) fifo_ok = 1'b0;
  end

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      gnt[p]   = (p < N_X) ? x_rsp[p].gnt   : yi_rsp[p-N_X].gnt;
      rdata[p] = (p < N_X) ? x_rsp[p].rdata : yi_rsp[p-N_X].rdata;
      ready[p] = have_q[p] || pend_q[p] || !need_t[p];
      pdata[p] = !need_t[p] ? '0 : (pend_q[p] ? rdata[p] : held_q[p]);
    end
    all_ready = &ready;
    complete  = (state_q == S_STREAM) && all_ready && fifo_ok;
    adv       = complete || (state_q == S_FLUSH && fifo_ok);
  end

  // requests and addresses
  always_comb begin
    logic [RW-1:0] rs;
    logic [CW-1:0] cs;
    logic [TCDM_AW-1:0] off;
    rs  = complete ? r_n : r_q;
    cs  = complete ? c_n : c_q;
    off = TCDM_AW'(rs) * TCDM_AW'(cfg_q.wpr) + TCDM_AW'(cs);
    for (int p = 0; p < NP; p++) begin
      if (complete) req[p] = !last && need_n[p];
      else          req[p] = (state_q == S_STREAM) && need_t[p] && !have_q[p] && !pend_q[p];
      preq[p].req   = req[p];
      preq[p].we    = 1'b0;
      preq[p].wdata = '0;
      if (p < N_X) preq[p].addr = cfg_q.x_base + TCDM_AW'(p) * cfg_q.x_stride + off;
      else         preq[p].addr = cfg_q.y_base + TCDM_AW'(p - N_X) * cfg_q.o_stride + off;
    end
    for (int p = 0; p < N_X; p++) x_req[p] = preq[p];
    for (int o = 0; o < N_Y; o++) yi_req[o] = preq[N_X + o];
  end

  // step to the datapath
  assign st_valid = (state_q == S_STREAM);
  assign st_emit  = (state_q == S_STREAM) && (r_q >= RW'(K-1));
  assign st_row   = r_q;
  assign st_col   = c_q;
  always_comb begin
    for (int p = 0; p < N_X; p++) st_x[p] = pdata[p];
    for (int o = 0; o < N_Y; o++) st_y[o] = pdata[N_X + o];
  end

  // output queues and y_out ports
  oq_t [N_Y-1:0]      oq_in;
  logic [TCDM_AW-1:0] pitch;
  always_comb begin
    pitch = (cfg_q.pool == POOL_NONE) ? TCDM_AW'(cfg_q.wpr) : TCDM_AW'(cfg_q.wpr >> 1);
    for (int o = 0; o < N_Y; o++) begin
      oq_in[o].addr = cfg_q.o_base + TCDM_AW'(o) * cfg_q.o_stride
                    + TCDM_AW'(res_row[o]) * pitch + TCDM_AW'(res_col[o]);
      oq_in[o].data = res_word[o];
      push[o] = adv && res_valid[o] && (o < int'(cfg_q.n_of));
      yo_req[o].req   = (oq_cnt[o] != 2'd0);
      yo_req[o].we    = 1'b1;
      yo_req[o].addr  = oq_q[o][0].addr;
      yo_req[o].wdata = oq_q[o][0].data;
      pop[o] = yo_req[o].req && yo_rsp[o].gnt;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      oq_q   <= '0;
      oq_cnt <= '0;
    end else begin
      for (int o = 0; o < N_Y; o++) begin
        if (pop[o]) oq_q[o][0] <= oq_q[o][1];
        if (push[o]) begin
          if (oq_cnt[o] == 2'd0 || (oq_cnt[o] == 2'd1 && pop[o])) oq_q[o][0] <= oq_in[o];
          else                                                   oq_q[o][1] <= oq_in[o];
        end
        oq_cnt[o] <= oq_cnt[o] + {1'b0, push[o]} - {1'b0, pop[o]};
      end
    end
  end

  // read port bookkeeping
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_q <= '0;
      pend_q <= '0;
      held_q <= '0;
    end else begin
      for (int p = 0; p < NP; p++) begin
        pend_q[p] <= req[p] && gnt[p];
        if (complete) have_q[p] <= 1'b0;
        else          have_q[p] <= have_q[p] || pend_q[p];
        if (pend_q[p]) held_q[p] <= rdata[p];
      end
    end
  end

  // sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      cfg_q        <= '0;
      r_q          <= '0;
      c_q          <= '0;
      flush_q      <= '0;
      wl_start     <= 1'b0;
      done         <= 1'b0;
      stall_cycles <= '0;
    end else begin
      wl_start <= 1'b0;
      done     <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          cfg_q        <= cfg;
          wl_start     <= 1'b1;
          stall_cycles <= '0;
          state_q      <= S_WLOAD;
        end
        S_WLOAD: if (wl_done) begin
          r_q     <= '0;
          c_q     <= '0;
          state_q <= S_STREAM;
        end
        S_STREAM: begin
          if (!complete) stall_cycles <= stall_cycles + 1'b1;
          if (complete) begin
            r_q <= r_n;
            c_q <= c_n;
            if (last) begin
              flush_q <= ($clog2(LAT+1))'(LAT);
              state_q <= S_FLUSH;
            end
          end
        end
        S_FLUSH: if (adv) begin
          flush_q <= flush_q - 1'b1;
          if (flush_q == 1) state_q <= S_DRAIN;
        end
        S_DRAIN: if (oq_cnt == '0) begin
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

  // a queue never overflows
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(push[0] && oq_cnt[0] == 2'd2 && !pop[0]));

endmodule
