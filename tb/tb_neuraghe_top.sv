// tb_neuraghe_top: end-to-end test of one NEURAGHE CSP at its default size
// (4x4 SoP matrix, 12 x_in ports, 32 TCDM banks).
//
// The testbench plays the microcontroller (register and TCDM ports) and the
// DDR behind both PS ports (random grant delays, 1-3 cycle read latency).
// For each job it
//   1. writes random input maps and weights to DDR,
//   2. moves the maps into the TCDM with the ADMA and the weights into the
//      weight memory with the WDMA,
//   3. runs a CE job and checks every meaningful output word against a
//      convolution / ReLU / pooling model written here,
// Job A also copies its outputs back to DDR with the ADMA and checks them
// there. The jobs cover 16- and 8-bit precision, every pooling mode, ReLU,
// bias and y_in accumulation, fewer than 12 input maps, saturation, and
// TCDM bank conflicts (stalls). Job A is laid out so that no bank conflict
// can occur; it must stream one word per cycle with no stall.
module tb_neuraghe_top;
  import neuraghe_pkg::*;

  localparam int NX   = N_COLS*IF_PER_COL;   // 12
  localparam int M    = M_ROWS;              // 4
  localparam int WPR  = 8;                   // words per row
  localparam int ROWS = 8;
  localparam int DDR_WORDS = 8192;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ext_req_t  [0:0] ps_w_req, ps_a_req;
  ext_rsp_t  [0:0] ps_w_rsp, ps_a_rsp;
  logic      [0:0] uc_reg_req, uc_reg_we, evt;
  logic      [0:0][5:0]  uc_reg_addr;
  logic      [0:0][31:0] uc_reg_wdata, uc_reg_rdata;
  tcdm_req_t [0:0] uc_tcdm_req;
  tcdm_rsp_t [0:0] uc_tcdm_rsp;
  logic      [0:0] imem_req, imem_we, l2_req, l2_we;
  logic      [0:0][11:0] imem_addr;
  logic      [0:0][12:0] l2_addr;
  logic      [0:0][31:0] imem_wdata, imem_rdata, l2_wdata, l2_rdata;

  neuraghe_top dut (.*);

  int checks = 0, failures = 0;
  int cnt_stall = 0, cnt_relu = 0, cnt_sat = 0, cnt_pool[4] = '{0, 0, 0, 0};
  int cnt_p8 = 0, cnt_yin = 0, cnt_partial_if = 0, cnt_adma_tx = 0, cnt_l2 = 0;

  // ---------------- DDR model behind both PS ports ----------------
  logic [31:0] ddr [DDR_WORDS];

  // port W
  logic        w_pend = 0; int w_lat = 0; logic [31:0] w_data = 0;
  logic        a_pend = 0; int a_lat = 0; logic [31:0] a_data = 0;
  logic        w_g, a_g;
  always_comb begin
    ps_w_rsp[0] = '0;
    ps_a_rsp[0] = '0;
    ps_w_rsp[0].gnt    = ps_w_req[0].req && w_g && !w_pend;
    ps_a_rsp[0].gnt    = ps_a_req[0].req && a_g && !a_pend;
    ps_w_rsp[0].rvalid = w_pend && (w_lat == 0);
    ps_w_rsp[0].rdata  = w_data;
    ps_a_rsp[0].rvalid = a_pend && (a_lat == 0);
    ps_a_rsp[0].rdata  = a_data;
  end
  always_ff @(posedge clk) begin
    w_g <= ($urandom_range(0, 3) != 0);
    a_g <= ($urandom_range(0, 3) != 0);
    if (w_pend) begin
      if (w_lat == 0) w_pend <= 0; else w_lat <= w_lat - 1;
    end
    if (a_pend) begin
      if (a_lat == 0) a_pend <= 0; else a_lat <= a_lat - 1;
    end
    if (ps_w_rsp[0].gnt) begin
      if (ps_w_req[0].we) ddr[ps_w_req[0].addr[14:2]] <= ps_w_req[0].wdata;
      else begin
        w_pend <= 1; w_lat <= $urandom_range(0, 2); w_data <= ddr[ps_w_req[0].addr[14:2]];
      end
    end
    if (ps_a_rsp[0].gnt) begin
      if (ps_a_req[0].we) ddr[ps_a_req[0].addr[14:2]] <= ps_a_req[0].wdata;
      else begin
        a_pend <= 1; a_lat <= $urandom_range(0, 2); a_data <= ddr[ps_a_req[0].addr[14:2]];
      end
    end
  end

  // ---------------- microcontroller-side helpers ----------------
  task automatic reg_wr(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk);
    uc_reg_req = 1; uc_reg_we = 1; uc_reg_addr[0] = a; uc_reg_wdata[0] = d;
    @(negedge clk);
    uc_reg_req = 0; uc_reg_we = 0;
  endtask

  task automatic reg_rd(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    uc_reg_req = 1; uc_reg_we = 0; uc_reg_addr[0] = a;
    @(negedge clk);
    uc_reg_req = 0;
    d = uc_reg_rdata[0];
  endtask

  task automatic tcdm_rd(input int a, output logic [31:0] d);
    @(negedge clk);
    uc_tcdm_req[0] = '{req: 1'b1, we: 1'b0, addr: TCDM_AW'(a), wdata: '0};
    #1;
    while (!uc_tcdm_rsp[0].gnt) @(negedge clk);
    @(negedge clk);
    uc_tcdm_req[0].req = 0;
    d = uc_tcdm_rsp[0].rdata;
  endtask

  // wait for a status "done" bit, return cycles waited
  task automatic wait_done(input int bitn, output int cyc);
    logic [31:0] st;
    cyc = 0;
    do begin
      reg_rd(6'h20, st);
      cyc += 2;
    end while (!st[bitn]);
    reg_wr(6'h20, 32'(1) << bitn);
  endtask

  // ---------------- reference model ----------------
  int X [NX][ROWS][4*WPR];     // input pixels
  int Wt [M][NX][9];           // weights
  int Y [M][ROWS][4*WPR];      // y_in partial results
  int R [M][ROWS][4*WPR];      // expected (before pooling)
  int Pl [M][ROWS/2][2*WPR];   // expected pooled

  function automatic int sat(int v, int p8);
    int hi = p8 ? 127 : 32767;
    if (v > hi) return hi;
    if (v < -hi-1) return -hi-1;
    return v;
  endfunction

  function automatic int sx(int v, int bits);
    v = v & ((1 << bits) - 1);
    if (v >= (1 << (bits-1))) v -= (1 << bits);
    return v;
  endfunction

  // one full job
  task automatic run_job(input string name, input int p8, input int n_if, input int n_of,
                         input int shift, input int relu, input int pool, input int use_yin,
                         input int x_base, input int x_stride, input int y_base,
                         input int o_base, input int o_stride, input int w_row,
                         input int amp, input int expect_no_stall, input int tx_back);
    int P = p8 ? 4 : 2;
    int W = WPR * P;
    int bits = p8 ? 8 : 16;
    int bias[M];
    int cyc, cyc_ce, steps;
    logic [31:0] d, st;
    longint acc;
    int v;
    int lo, hi;
    int tcdm_lo, tcdm_hi;

    // --- data
    for (int f = 0; f < NX; f++)
      for (int r = 0; r < ROWS; r++)
        for (int x = 0; x < W; x++)
          X[f][r][x] = $urandom_range(0, 2*amp) - amp;
    for (int m = 0; m < M; m++) begin
      bias[m] = $urandom_range(0, 40) - 20;
      for (int f = 0; f < NX; f++)
        for (int k = 0; k < 9; k++) Wt[m][f][k] = $urandom_range(0, 2*amp) - amp;
      for (int r = 0; r < ROWS; r++)
        for (int x = 0; x < W; x++) Y[m][r][x] = $urandom_range(0, 200) - 100;
    end

    // --- DDR image of the TCDM region [x_base, end of maps) and y_in maps
    tcdm_lo = x_base;
    tcdm_hi = x_base + (NX-1)*x_stride + ROWS*WPR;
    for (int a = 0; a < tcdm_hi - tcdm_lo; a++) ddr[a] = $urandom;
    for (int f = 0; f < NX; f++)
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < WPR; c++) begin
          logic [31:0] wd = '0;
          for (int j = 0; j < P; j++) wd |= (32'(X[f][r][c*P+j]) & ((1 << bits) - 1)) << (j*bits);
          ddr[x_base - tcdm_lo + f*x_stride + r*WPR + c] = wd;
        end
    // weights at DDR word 4096, two per word
    for (int i = 0; i < M*NX*9; i += 2) begin
      int w0 = Wt[(i/9)/NX][(i/9)%NX][i%9];
      int w1 = Wt[((i+1)/9)/NX][((i+1)/9)%NX][(i+1)%9];
      ddr[4096 + i/2] = {16'(w1), 16'(w0)};
    end
    // y_in maps at DDR word 6144 -> TCDM y_base
    for (int m = 0; m < M; m++)
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < WPR; c++) begin
          logic [31:0] wd = '0;
          for (int j = 0; j < P; j++) wd |= (32'(Y[m][r][c*P+j]) & ((1 << bits) - 1)) << (j*bits);
          ddr[6144 + m*o_stride + r*WPR + c] = wd;
        end

    // --- DMAs
    reg_wr(6'h19, 32'(0)); reg_wr(6'h1A, 32'(tcdm_lo)); reg_wr(6'h1B, 32'(tcdm_hi - tcdm_lo));
    reg_wr(6'h18, 32'h1);
    reg_wr(6'h11, 32'(4096*4)); reg_wr(6'h12, 32'(w_row*32)); reg_wr(6'h13, 32'(M*NX*9));
    reg_wr(6'h10, 32'h1);
    wait_done(5, cyc);
    wait_done(6, cyc);
    if (use_yin) begin
      reg_wr(6'h19, 32'(6144*4)); reg_wr(6'h1A, 32'(y_base)); reg_wr(6'h1B, 32'((M-1)*o_stride + ROWS*WPR));
      reg_wr(6'h18, 32'h1);
      wait_done(6, cyc);
    end

    // --- reference
    for (int m = 0; m < M; m++)
      for (int r = 2; r < ROWS; r++)
        for (int x = 2; x < W; x++) begin
          acc = 0;
          if (m < n_of) begin
            for (int f = 0; f < n_if; f++)
              for (int ky = 0; ky < 3; ky++)
                for (int kx = 0; kx < 3; kx++)
                  acc += longint'(X[f][r-2+ky][x-2+kx]) * longint'(Wt[m][f][ky*3+kx]);
          end
          v = int'(acc >>> shift) + (use_yin ? Y[m][r][x] : bias[m]);
          if (v != sat(v, p8)) cnt_sat++;
          v = sat(v, p8);
          if (relu && v < 0) begin v = 0; cnt_relu++; end
          R[m][r][x] = v;
        end
    for (int m = 0; m < M; m++)
      for (int pr = 1; pr < ROWS/2; pr++)
        for (int px = 1; px < W/2; px++) begin
          int a = R[m][2*pr][2*px], b = R[m][2*pr][2*px+1];
          int c = R[m][2*pr+1][2*px], e = R[m][2*pr+1][2*px+1];
          case (pool)
            1: Pl[m][pr][px] = (a > b ? a : b) > (c > e ? c : e) ? (a > b ? a : b) : (c > e ? c : e);
            2: Pl[m][pr][px] = (a + b + c + e) >>> 2;
            default: Pl[m][pr][px] = a;
          endcase
        end

    // --- CE job
    reg_wr(6'h01, 32'(x_base)); reg_wr(6'h02, 32'(x_stride)); reg_wr(6'h03, 32'(y_base));
    reg_wr(6'h04, 32'(o_base)); reg_wr(6'h05, 32'(o_stride));
    reg_wr(6'h06, {6'd0, 10'(ROWS), 8'd0, 8'(WPR)}); reg_wr(6'h07, 32'(w_row));
    reg_wr(6'h08, {10'd0, 1'(use_yin), 2'(pool), 1'(relu), 1'(p8), 6'(shift), 3'(n_of), 4'd0, 4'(n_if)});
    for (int m = 0; m < M; m++) reg_wr(6'(9 + m), 32'(bias[m]));
    reg_wr(6'h00, 32'h1);
    wait_done(4, cyc_ce);
    reg_rd(6'h21, st);
    steps = ROWS * WPR;
    if (st != 0) cnt_stall++;
    if (expect_no_stall) begin
      checks++;
      if (st > 1 || cyc_ce > steps + 40) begin
        failures++;
        $display("FAIL %s: %0d stall cycles, job took %0d cycles for %0d steps", name, st, cyc_ce, steps);
      end
    end
    if (p8) cnt_p8++;
    if (use_yin) cnt_yin++;
    if (n_if < NX) cnt_partial_if++;
    cnt_pool[pool]++;

    // --- optional copy back to DDR (word 2048 on)
    if (tx_back) begin
      reg_wr(6'h19, 32'(2048*4)); reg_wr(6'h1A, 32'(o_base)); reg_wr(6'h1B, 32'((M-1)*o_stride + ROWS*WPR));
      reg_wr(6'h18, 32'h3);
      wait_done(6, cyc);
      cnt_adma_tx++;
    end

    // --- compare
    for (int m = 0; m < n_of; m++) begin
      int prow = (pool == 0) ? ROWS : ROWS/2;
      int pw   = (pool == 0) ? WPR  : WPR/2;
      for (int r = (pool == 0 ? 2 : 1); r < prow; r++)
        for (int c = 0; c < pw; c++) begin
          int addr = o_base + m*o_stride + r*pw + c;
          if (tx_back) d = ddr[2048 + addr - o_base];
          else         tcdm_rd(addr, d);
          for (int j = 0; j < P; j++) begin
            int x = c*P + j;
            int exp_v, got;
            if (pool == 0 && x < 2) continue;
            if (pool != 0 && x < 1) continue;
            exp_v = (pool == 0) ? R[m][r][x] : Pl[m][r][x];
            got = sx(int'(d >> (j*bits)), bits);
            checks++;
            if (got !== exp_v) begin
              failures++;
              if (failures < 10)
                $display("FAIL %s: map %0d row %0d px %0d got %0d expected %0d", name, m, r, x, got, exp_v);
            end
          end
        end
    end
    $display("%s: CE job %0d cycles, %0d stall cycles, failures so far %0d", name, cyc_ce, st, failures);
  endtask

  initial begin
    logic [31:0] d;
    uc_reg_req = 0; uc_reg_we = 0; uc_reg_addr = '0; uc_reg_wdata = '0;
    uc_tcdm_req = '0;
    imem_req = 0; imem_we = 0; imem_addr = '0; imem_wdata = '0;
    l2_req = 0; l2_we = 0; l2_addr = '0; l2_wdata = '0;
    repeat (4) @(negedge clk);
    rst_n = 1;

    // A: 16-bit, all 12 maps, ReLU, bias, no pooling, conflict-free layout
    run_job("A", 0, 12, 4, 4, 1, 0, 0, 0, 97, 0, 2068, 97, 0, 60, 1, 1);
    // B: 16-bit, 5 maps, y_in accumulation, max pooling, conflicting layout
    run_job("B", 0, 5, 4, 2, 0, 1, 1, 0, 64, 1024, 1600, 96, 14, 60, 0, 0);
    // C: 8-bit, average pooling, ReLU, saturating values
    run_job("C", 1, 12, 4, 0, 1, 2, 0, 0, 65, 0, 1600, 70, 3, 100, 0, 0);
    // D: 16-bit, down-sampling, 3 output maps, large values (saturation)
    run_job("D", 0, 12, 3, 0, 0, 3, 0, 0, 70, 0, 1600, 72, 20, 3000, 0, 0);
    // E: 8-bit, no pooling, y_in accumulation
    run_job("E", 1, 9, 4, 3, 0, 0, 1, 0, 66, 1100, 1700, 66, 5, 20, 0, 0);

    // instruction and L2 memories: write then read back
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      imem_req = 1; imem_we = 1; imem_addr[0] = 12'(i*3); imem_wdata[0] = 32'(i*7 + 1);
      l2_req = 1; l2_we = 1; l2_addr[0] = 13'(i*5); l2_wdata[0] = 32'(i*11 + 2);
    end
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      imem_req = 1; imem_we = 0; imem_addr[0] = 12'(i*3);
      l2_req = 1; l2_we = 0; l2_addr[0] = 13'(i*5);
      @(negedge clk);
      checks += 2;
      if (imem_rdata[0] != 32'(i*7 + 1)) failures++;
      if (l2_rdata[0] != 32'(i*11 + 2)) failures++;
      cnt_l2++;
    end
    imem_req = 0; l2_req = 0;

    // every mechanism must have happened
    checks++; if (cnt_stall == 0)      begin failures++; $display("FAIL: no TCDM stall"); end
    checks++; if (cnt_relu == 0)       begin failures++; $display("FAIL: ReLU never clipped"); end
    checks++; if (cnt_sat == 0)        begin failures++; $display("FAIL: no saturation"); end
    for (int p = 0; p < 4; p++) begin
      checks++; if (cnt_pool[p] == 0)  begin failures++; $display("FAIL: pool mode %0d unused", p); end
    end
    checks++; if (cnt_p8 == 0)         begin failures++; $display("FAIL: no 8-bit job"); end
    checks++; if (cnt_yin == 0)        begin failures++; $display("FAIL: no y_in job"); end
    checks++; if (cnt_partial_if == 0) begin failures++; $display("FAIL: no partial-IF job"); end
    checks++; if (cnt_adma_tx == 0)    begin failures++; $display("FAIL: no ADMA transmit"); end
    $display("mechanisms: stall_jobs=%0d relu=%0d sat=%0d pool=%0d/%0d/%0d/%0d p8=%0d yin=%0d partial_if=%0d adma_tx=%0d mem=%0d",
             cnt_stall, cnt_relu, cnt_sat, cnt_pool[0], cnt_pool[1], cnt_pool[2], cnt_pool[3],
             cnt_p8, cnt_yin, cnt_partial_if, cnt_adma_tx, cnt_l2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
