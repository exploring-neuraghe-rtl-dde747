// tb_weight_loader: fills a weight memory through its write port with
// random weights, runs the weight loader from two different base rows and
// checks every weight register and the load time (NROWS+1 cycles).
module tb_weight_loader;
  import neuraghe_pkg::*;
  localparam int NW = 432, NB = 32, DEPTH = 512;
  logic clk = 0, rst_n = 0, we = 0, re, start = 0, busy, done;
  logic [13:0] widx;
  pix_t wdata;
  logic [8:0] raddr, base;
  pix_t [NB-1:0] rdata;
  pix_t [NW-1:0] wgt;
  always #5 clk = ~clk;
  weight_memory #(.NB(NB), .DEPTH(DEPTH)) u_mem (.clk, .we, .widx, .wdata, .re, .raddr, .rdata);
  weight_loader #(.NW(NW), .NB(NB), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .start, .base, .busy, .done, .mem_re(re), .mem_raddr(raddr), .mem_rdata(rdata), .wgt);
  int checks = 0, failures = 0;
  pix_t ref_m [NB*DEPTH];

  initial begin
    base = '0; widx = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 64*NB; i++) begin
      we = 1; widx = 14'(i); wdata = pix_t'($urandom); ref_m[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    foreach (ref_m[i]) if (i >= 64*NB) ref_m[i] = '0;
    for (int t = 0; t < 2; t++) begin
      int b, cyc;
      b = t ? 37 : 3;
      cyc = 0;
      base = 9'(b); start = 1;
      @(negedge clk);
      start = 0;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != (NW + NB - 1) / NB + 1) begin
        failures++;
        $display("FAIL load took %0d cycles", cyc);
      end else begin
        $display("load took %0d cycles", cyc);
      end
      for (int i = 0; i < NW; i++) begin
        checks++;
        if (wgt[i] != ref_m[b*NB + i]) begin
          failures++;
          if (failures < 5) $display("FAIL base %0d w%0d: %h vs %h", b, i, wgt[i], ref_m[b*NB+i]);
        end
      end
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
