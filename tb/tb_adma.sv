// tb_adma: the activation DMA moves words from a DDR model to a TCDM model
// and back, both with random grant delays; all destination words are
// checked, and words just past the block must stay untouched.
module tb_adma;
  import neuraghe_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, dir = 0, busy, done;
  logic [EXT_AW-1:0] ext_addr;
  logic [TCDM_AW-1:0] tcdm_addr;
  logic [TCDM_AW:0] len;
  ext_req_t ext_req;
  ext_rsp_t ext_rsp;
  tcdm_req_t tcdm_req;
  tcdm_rsp_t tcdm_rsp;
  always #5 clk = ~clk;
  adma dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] ddr [1024];
  logic [31:0] tc [1024];
  logic epend = 0, eg = 0, tg = 0, tv = 0; int elat = 0; logic [31:0] erd = 0, trd = 0;
  always_comb begin
    ext_rsp.gnt     = ext_req.req && eg && !epend;
    ext_rsp.rvalid  = epend && elat == 0;
    ext_rsp.rdata   = erd;
    tcdm_rsp.gnt    = tcdm_req.req && tg;
    tcdm_rsp.rvalid = tv;
    tcdm_rsp.rdata  = trd;
  end
  always_ff @(posedge clk) begin
    eg <= ($urandom_range(0, 2) != 0);
    tg <= ($urandom_range(0, 2) != 0);
    if (epend) begin if (elat == 0) epend <= 0; else elat <= elat - 1; end
    if (ext_rsp.gnt) begin
      if (ext_req.we) ddr[ext_req.addr[11:2]] <= ext_req.wdata;
      else begin epend <= 1; elat <= $urandom_range(0, 3); erd <= ddr[ext_req.addr[11:2]]; end
    end
    tv <= tcdm_rsp.gnt && !tcdm_req.we;
    if (tcdm_rsp.gnt) begin
      if (tcdm_req.we) tc[tcdm_req.addr[9:0]] <= tcdm_req.wdata;
      else trd <= tc[tcdm_req.addr[9:0]];
    end
  end

  task automatic xfer(input logic d, input int e, input int t, input int n);
    logic [31:0] src [1024];
    logic [31:0] old [1024];
    src = d ? tc : ddr;
    old = d ? ddr : tc;
    @(negedge clk);
    dir = d; ext_addr = EXT_AW'(e*4); tcdm_addr = TCDM_AW'(t); len = (TCDM_AW+1)'(n); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    for (int i = 0; i <= n; i++) begin
      checks++;
      if (d) begin
        if (i < n && ddr[e+i] != src[t+i]) failures++;
        if (i == n && ddr[e+i] != old[e+i]) failures++;
      end else begin
        if (i < n && tc[t+i] != src[e+i]) failures++;
        if (i == n && tc[t+i] != old[t+i]) failures++;
      end
    end
  endtask

  initial begin
    foreach (ddr[i]) ddr[i] = $urandom;
    foreach (tc[i]) tc[i] = 32'(i);
    ext_addr = '0; tcdm_addr = '0; len = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    xfer(1'b0, 17, 200, 150);
    xfer(1'b1, 600, 250, 90);
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
