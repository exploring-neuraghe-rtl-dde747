// tb_line_buffer: streams random frames into one line buffer, in 16-bit and
// 8-bit mode, and checks every emitted window pixel against the frame.
// Windows must appear one cycle after the word that completes them.
module tb_line_buffer;
  import neuraghe_pkg::*;
  localparam int NIF = 3, K = 3, WPR = 6, ROWS = 5;
  logic clk = 0, rst_n = 0, en = 0, in_valid = 0;
  prec_e prec;
  logic [6:0] col;
  logic [NIF-1:0][WORD_W-1:0] in_word;
  pix_t [NIF-1:0][LANES-1:0][K*K-1:0] win;
  always #5 clk = ~clk;
  line_buffer #(.N_IF(NIF), .K(K), .DEPTH(128)) dut (.*);

  int checks = 0, failures = 0;
  int img [NIF][ROWS][4*WPR];

  task automatic run(input prec_e p);
    int P = (p == PREC16) ? 2 : 4, bits = (p == PREC16) ? 16 : 8;
    prec = p;
    for (int f = 0; f < NIF; f++)
      for (int r = 0; r < ROWS; r++)
        for (int x = 0; x < WPR*P; x++) img[f][r][x] = $urandom_range(0, (1 << bits) - 1) - (1 << (bits-1));
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < WPR; c++) begin
        @(negedge clk);
        en = 1; in_valid = 1; col = 7'(c);
        for (int f = 0; f < NIF; f++) begin
          in_word[f] = '0;
          for (int j = 0; j < P; j++) in_word[f] |= (32'(img[f][r][c*P+j]) & ((1 << bits) - 1)) << (j*bits);
        end
        @(negedge clk);
        en = 0;
        if (r >= K-1)
          for (int f = 0; f < NIF; f++)
            for (int j = 0; j < LANES; j++)
              for (int ky = 0; ky < K; ky++)
                for (int kx = 0; kx < K; kx++) begin
                  int x = c*P + j - (K-1) + kx, e;
                  if (j >= P) e = 0;
                  else if (x < 0) e = 0;
                  else e = img[f][r-(K-1)+ky][x];
                  checks++;
                  if (int'(win[f][j][ky*K+kx]) != e) begin
                    failures++;
                    if (failures < 5) $display("FAIL f%0d r%0d c%0d j%0d (%0d,%0d): %0d vs %0d", f, r, c, j, ky, kx, win[f][j][ky*K+kx], e);
                  end
                end
      end
  endtask

  initial begin
    in_word = '0; col = '0; prec = PREC16;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(PREC16);
    run(PREC8);
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
