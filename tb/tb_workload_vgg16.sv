// tb_workload_vgg16: runs a strip of a VGG-16 style 3x3 layer on one CSP at
// its default size, with the frame at full VGG-16 width (224 pixels, 112
// words per row, 16 bit).
//
// The layer has 24 input maps and 4 output maps, so it needs two engine
// jobs over the same 6-row strip:
//   job 1: input maps 0..11, bias, no ReLU       -> partial maps in the TCDM
//   job 2: input maps 12..23, adds job 1 through y_in, ReLU, 2x2 max pooling
// This is how a layer with more input maps than the engine takes at once is
// split. The testbench acts as the microcontroller and the DDR (random
// grants), moves maps with the ADMA and weights with the WDMA, copies the
// pooled result back to DDR, and checks every meaningful output pixel
// against a reference model of the whole layer.
module tb_workload_vgg16;
  import neuraghe_pkg::*;

  localparam int NX   = N_COLS*IF_PER_COL;   // 12 input maps per job
  localparam int M    = M_ROWS;              // 4 output maps
  localparam int NG   = 2;                   // input map groups
  localparam int WPR  = 112;                 // 224 pixels per row
  localparam int W    = 2*WPR;
  localparam int ROWS = 6;
  localparam int MAP  = ROWS*WPR + 1;        // map stride in words
  localparam int DDR_WORDS = 32768;
  localparam int SHIFT = 6;

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
      if (ps_w_req[0].we) ddr[ps_w_req[0].addr[16:2]] <= ps_w_req[0].wdata;
      else begin
        w_pend <= 1; w_lat <= $urandom_range(0, 2); w_data <= ddr[ps_w_req[0].addr[16:2]];
      end
    end
    if (ps_a_rsp[0].gnt) begin
      if (ps_a_req[0].we) ddr[ps_a_req[0].addr[16:2]] <= ps_a_req[0].wdata;
      else begin
        a_pend <= 1; a_lat <= $urandom_range(0, 2); a_data <= ddr[ps_a_req[0].addr[16:2]];
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

  int X [NG*NX][ROWS][W];
  int Wt [NG][M][NX][9];
  int bias [M];
  int P1 [M][ROWS][W];
  int R2 [M][ROWS][W];

  function automatic int sat(int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  task automatic start_adma(input int ddr_word, input int tcdm, input int len, input int dir);
    int cyc;
    reg_wr(6'h19, 32'(ddr_word*4)); reg_wr(6'h1A, 32'(tcdm)); reg_wr(6'h1B, 32'(len));
    reg_wr(6'h18, {30'd0, 1'(dir), 1'b1});
    wait_done(6, cyc);
  endtask

  task automatic ce_job(input int x_base, input int use_yin, input int relu, input int pool,
                        input int o_base, input int w_row, output int cyc);
    reg_wr(6'h01, 32'(x_base)); reg_wr(6'h02, 32'(MAP)); reg_wr(6'h03, 32'(NG*NX*MAP));
    reg_wr(6'h04, 32'(o_base)); reg_wr(6'h05, 32'(MAP));
    reg_wr(6'h06, {6'd0, 10'(ROWS), 8'd0, 8'(WPR)}); reg_wr(6'h07, 32'(w_row));
    reg_wr(6'h08, {10'd0, 1'(use_yin), 2'(pool), 1'(relu), 1'b0, 6'(SHIFT), 3'(M), 4'd0, 4'(NX)});
    for (int m = 0; m < M; m++) reg_wr(6'(9 + m), 32'(bias[m]));
    reg_wr(6'h00, 32'h1);
    wait_done(4, cyc);
  endtask

  initial begin
    int cyc1, cyc2, cyc;
    int n_relu, n_pooled;
    longint acc;
    logic [31:0] d;
    uc_reg_req = 0; uc_reg_we = 0; uc_reg_addr = '0; uc_reg_wdata = '0;
    uc_tcdm_req = '0;
    imem_req = 0; imem_we = 0; imem_addr = '0; imem_wdata = '0;
    l2_req = 0; l2_we = 0; l2_addr = '0; l2_wdata = '0;
    n_relu = 0; n_pooled = 0;

    // data: all maps of both groups back to back in DDR (and TCDM) at MAP stride
    for (int f = 0; f < NG*NX; f++)
      for (int r = 0; r < ROWS; r++)
        for (int x = 0; x < W; x++) X[f][r][x] = $urandom_range(0, 400) - 200;
    for (int g = 0; g < NG; g++)
      for (int m = 0; m < M; m++)
        for (int f = 0; f < NX; f++)
          for (int k = 0; k < 9; k++) Wt[g][m][f][k] = $urandom_range(0, 120) - 60;
    for (int m = 0; m < M; m++) bias[m] = $urandom_range(0, 2000) - 1000;
    for (int a = 0; a < DDR_WORDS; a++) ddr[a] = '0;
    for (int f = 0; f < NG*NX; f++)
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < WPR; c++)
          ddr[f*MAP + r*WPR + c] = {16'(X[f][r][2*c+1]), 16'(X[f][r][2*c])};
    // weights of group g at DDR word 20000 + g*256 (432 weights, two per word)
    for (int g = 0; g < NG; g++)
      for (int i = 0; i < M*NX*9; i += 2)
        ddr[20000 + g*256 + i/2] = {16'(Wt[g][(i+1)/(NX*9)][((i+1)/9)%NX][(i+1)%9]),
                                    16'(Wt[g][i/(NX*9)][(i/9)%NX][i%9])};

    repeat (4) @(negedge clk);
    rst_n = 1;

    // reference: job 1 then job 2 and pooling
    for (int m = 0; m < M; m++)
      for (int r = 2; r < ROWS; r++)
        for (int x = 2; x < W; x++) begin
          for (int g = 0; g < NG; g++) begin
            acc = 0;
            for (int f = 0; f < NX; f++)
              for (int k = 0; k < 9; k++)
                acc += longint'(X[g*NX + f][r-2+k/3][x-2+k%3]) * longint'(Wt[g][m][f][k]);
            if (g == 0) P1[m][r][x] = sat(int'(acc >>> SHIFT) + bias[m]);
            else        R2[m][r][x] = sat(int'(acc >>> SHIFT) + P1[m][r][x]);
          end
          if (R2[m][r][x] < 0) begin R2[m][r][x] = 0; n_relu++; end
        end

    // load both groups and both weight sets
    start_adma(0, 0, NG*NX*MAP, 0);
    for (int g = 0; g < NG; g++) begin
      reg_wr(6'h11, 32'((20000 + g*256)*4)); reg_wr(6'h12, 32'(g*14*32)); reg_wr(6'h13, 32'(M*NX*9));
      reg_wr(6'h10, 32'h1);
      wait_done(5, cyc);
    end
    // job 1: partial sums of group 0 into the y area; job 2 accumulates group 1
    ce_job(0, 0, 0, 0, NG*NX*MAP, 0, cyc1);
    ce_job(NX*MAP, 1, 1, 1, (NG*NX + M)*MAP, 14, cyc2);
    $display("job 1: %0d cycles, job 2: %0d cycles for %0d steps each", cyc1, cyc2, ROWS*WPR);
    checks += 2;
    if (cyc1 > 2*ROWS*WPR) begin failures++; $display("FAIL: job 1 too slow"); end
    if (cyc2 > 2*ROWS*WPR) begin failures++; $display("FAIL: job 2 too slow"); end

    // pooled maps back to DDR word 24000
    start_adma(24000, (NG*NX + M)*MAP, M*MAP, 1);
    for (int m = 0; m < M; m++)
      for (int pr = 1; pr < ROWS/2; pr++)
        for (int pc = 0; pc < WPR/2; pc++) begin
          d = ddr[24000 + m*MAP + pr*(WPR/2) + pc];
          for (int j = 0; j < 2; j++) begin
            int px, e, got;
            px = 2*pc + j;
            if (px < 1) continue;
            e = R2[m][2*pr][2*px];
            if (R2[m][2*pr][2*px+1] > e)   e = R2[m][2*pr][2*px+1];
            if (R2[m][2*pr+1][2*px] > e)   e = R2[m][2*pr+1][2*px];
            if (R2[m][2*pr+1][2*px+1] > e) e = R2[m][2*pr+1][2*px+1];
            got = int'(signed'(d[16*j +: 16]));
            checks++;
            n_pooled++;
            if (got != e) begin
              failures++;
              if (failures < 10) $display("FAIL map %0d prow %0d px %0d: got %0d expected %0d", m, pr, px, got, e);
            end
          end
        end
    checks++;
    if (n_relu == 0) begin failures++; $display("FAIL: ReLU never clipped"); end
    $display("pooled pixels checked %0d, ReLU clipped %0d", n_pooled, n_relu);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
