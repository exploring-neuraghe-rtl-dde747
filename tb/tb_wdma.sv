// tb_wdma: the weight DMA copies weights from a DDR model with random
// grant and read latencies; every weight-memory write is captured and the
// written indices and values are checked, for an even and an odd length.
module tb_wdma;
  import neuraghe_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done, wm_we;
  logic [EXT_AW-1:0] src;
  logic [13:0] dst, wm_widx;
  logic [14:0] len;
  ext_req_t ext_req;
  ext_rsp_t ext_rsp;
  pix_t wm_wdata;
  always #5 clk = ~clk;
  wdma dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] ddr [1024];
  pix_t got [16384];
  logic wr [16384];
  logic pend = 0, g = 0; int lat = 0; logic [31:0] rd = 0;
  always_comb begin
    ext_rsp.gnt    = ext_req.req && g && !pend;
    ext_rsp.rvalid = pend && lat == 0;
    ext_rsp.rdata  = rd;
  end
  always_ff @(posedge clk) begin
    g <= ($urandom_range(0, 2) != 0);
    if (pend) begin if (lat == 0) pend <= 0; else lat <= lat - 1; end
    if (ext_rsp.gnt) begin pend <= 1; lat <= $urandom_range(0, 3); rd <= ddr[ext_req.addr[11:2]]; end
    if (wm_we) begin got[wm_widx] <= wm_wdata; wr[wm_widx] <= 1; end
  end

  task automatic xfer(input int s, input int d, input int n);
    foreach (wr[i]) wr[i] = 0;
    @(negedge clk);
    src = EXT_AW'(s*4); dst = 14'(d); len = 15'(n); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    for (int i = 0; i < n + 4; i++) begin
      pix_t e;
      e = (i % 2) ? pix_t'(ddr[s + i/2][31:16]) : pix_t'(ddr[s + i/2][15:0]);
      checks++;
      if (i < n && (!wr[d+i] || got[d+i] != e)) begin
        failures++;
        if (failures < 5) $display("FAIL weight %0d", i);
      end
      if (i >= n && wr[d+i]) failures++;
    end
  endtask

  initial begin
    foreach (ddr[i]) ddr[i] = $urandom;
    src = '0; dst = '0; len = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    xfer(10, 100, 432);
    xfer(300, 5000, 37);
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
