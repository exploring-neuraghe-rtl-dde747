// tb_pooling_unit: streams random 4-row frames through the pooling unit in
// every mode and both precisions; each emitted word and its pooled
// coordinates are checked against a 2x2 max / average / top-left model, and
// the number of emitted words must be one per 2x2 block (one per step with
// pooling off).
module tb_pooling_unit;
  import neuraghe_pkg::*;
  localparam int WPR = 4, ROWS = 4;
  logic clk = 0, rst_n = 0, en = 0, in_valid = 0;
  prec_e prec;
  pool_mode_e mode;
  logic [9:0] row, out_row;
  logic [6:0] col, out_col;
  lanes_t in;
  logic out_valid;
  logic [WORD_W-1:0] out_word;
  always #5 clk = ~clk;
  pooling_unit #(.DEPTH(128), .RW(10)) dut (.*);
  int checks = 0, failures = 0;
  int img [ROWS][4*WPR];

  task automatic run(input prec_e p, input pool_mode_e md);
    int P = (p == PREC16) ? 2 : 4, bits = (p == PREC16) ? 16 : 8;
    int nout = 0;
    prec = p; mode = md;
    for (int r = 0; r < ROWS; r++)
      for (int x = 0; x < WPR*P; x++) img[r][x] = $urandom_range(0, (1 << bits) - 1) - (1 << (bits-1));
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < WPR; c++) begin
        @(negedge clk);
        en = 1; in_valid = 1; row = 10'(r); col = 7'(c);
        for (int l = 0; l < LANES; l++) in[l] = (l < P) ? pix_t'(img[r][c*P+l]) : '0;
        #1;
        if (out_valid) begin
          nout++;
          for (int j = 0; j < P; j++) begin
            int e, got, x;
            got = int'(out_word >> (j*bits)) & ((1 << bits) - 1);
            if (got >= (1 << (bits-1))) got -= (1 << bits);
            if (md == POOL_NONE) begin
              e = img[r][c*P+j];
              checks++;
              if (out_row != 10'(r) || out_col != 7'(c)) failures++;
            end else begin
              int a, b, cc, d;
              x = int'(out_col)*P + j;
              a = img[2*out_row][2*x]; b = img[2*out_row][2*x+1];
              cc = img[2*out_row+1][2*x]; d = img[2*out_row+1][2*x+1];
              case (md)
                POOL_MAX:  begin e = a; if (b > e) e = b; if (cc > e) e = cc; if (d > e) e = d; end
                POOL_AVG:  e = (a + b + cc + d) >>> 2;
                default:   e = a;
              endcase
            end
            checks++;
            if (got != e) begin
              failures++;
              if (failures < 5) $display("FAIL mode %0d p%0d r%0d c%0d j%0d: %0d vs %0d", md, P, r, c, j, got, e);
            end
          end
        end
      end
    @(negedge clk);
    en = 0; in_valid = 0;
    checks++;
    if (nout != ((md == POOL_NONE) ? ROWS*WPR : ROWS*WPR/4)) begin
      failures++;
      $display("FAIL mode %0d: %0d words out", md, nout);
    end
  endtask

  initial begin
    in = '0; row = '0; col = '0; prec = PREC16; mode = POOL_NONE;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      run(PREC16, pool_mode_e'(m));
      run(PREC8, pool_mode_e'(m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
