// tb_csp_regs: writes every configuration register and reads it back,
// checks the decoded engine configuration, the one-cycle start pulses and
// the sticky done flags with their write-1-to-clear.
module tb_csp_regs;
  import neuraghe_pkg::*;
  logic clk = 0, rst_n = 0, req = 0, we = 0;
  logic [5:0] addr;
  logic [31:0] wdata, rdata;
  ce_cfg_t ce_cfg;
  logic ce_start, ce_busy = 0, ce_done = 0;
  logic [31:0] ce_stalls = 32'd1234;
  logic wdma_start, wdma_busy = 0, wdma_done = 0;
  logic [EXT_AW-1:0] wdma_src;
  logic [WMEM_AW-1:0] wdma_dst;
  logic [WMEM_AW:0] wdma_len;
  logic adma_start, adma_dir, adma_busy = 1, adma_done = 0;
  logic [EXT_AW-1:0] adma_ext;
  logic [TCDM_AW-1:0] adma_tcdm;
  logic [TCDM_AW:0] adma_len;
  always #5 clk = ~clk;
  csp_regs #(.M(4)) dut (.*);
  int checks = 0, failures = 0;

  task automatic wr(input logic [5:0] a, input logic [31:0] d);
    @(negedge clk); req = 1; we = 1; addr = a; wdata = d;
    @(negedge clk); req = 0; we = 0;
  endtask
  task automatic rd(input logic [5:0] a, output logic [31:0] d);
    @(negedge clk); req = 1; we = 0; addr = a;
    @(negedge clk); req = 0; d = rdata;
  endtask
  task automatic chk(input logic [31:0] got, input logic [31:0] e, input string what);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s: %h vs %h", what, got, e); end
  endtask

  initial begin
    logic [31:0] d;
    int pulses;
    addr = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wr(6'h01, 32'h1234); wr(6'h02, 32'h0061); wr(6'h03, 32'h0400); wr(6'h04, 32'h0814);
    wr(6'h05, 32'h0060); wr(6'h06, {6'd0, 10'd224, 8'd0, 8'd112}); wr(6'h07, 32'd14);
    wr(6'h08, {10'd0, 1'b1, 2'd2, 1'b1, 1'b1, 6'd9, 3'd3, 4'd0, 4'd11});
    wr(6'h09, 32'hfff0); wr(6'h0C, 32'h0007);
    chk(32'(ce_cfg.x_base), 32'h1234, "x_base");
    chk(32'(ce_cfg.x_stride), 32'h61, "x_stride");
    chk(32'(ce_cfg.rows), 224, "rows");
    chk(32'(ce_cfg.wpr), 112, "wpr");
    chk(32'(ce_cfg.n_if), 11, "n_if");
    chk(32'(ce_cfg.n_of), 3, "n_of");
    chk(32'(ce_cfg.shift), 9, "shift");
    chk(32'(ce_cfg.prec), 1, "prec");
    chk(32'(ce_cfg.relu_en), 1, "relu");
    chk(32'(ce_cfg.pool), 2, "pool");
    chk(32'(ce_cfg.use_yin), 1, "use_yin");
    chk(32'(ce_cfg.bias[15:0]), 32'hfff0, "bias0");
    chk(32'(ce_cfg.bias[63:48]), 32'h0007, "bias3");
    rd(6'h01, d); chk(d, 32'h1234, "rd x_base");
    rd(6'h06, d); chk(d, {6'd0, 10'd224, 8'd0, 8'd112}, "rd geom");
    rd(6'h0C, d); chk(d, 32'h0007, "rd bias3");
    rd(6'h21, d); chk(d, 32'd1234, "rd stalls");
    // start pulses last one cycle
    pulses = 0;
    fork
      wr(6'h00, 32'h1);
      repeat (4) @(posedge clk) if (ce_start) pulses++;
    join
    chk(32'(pulses), 1, "ce_start pulse");
    wr(6'h11, 32'hA000); wr(6'h12, 32'd64); wr(6'h13, 32'd432);
    chk(wdma_src, 32'hA000, "wdma_src"); chk(32'(wdma_len), 432, "wdma_len");
    wr(6'h19, 32'hB000); wr(6'h1A, 32'd77); wr(6'h1B, 32'd99);
    pulses = 0;
    fork
      wr(6'h18, 32'h3);
      repeat (4) @(posedge clk) if (adma_start) pulses++;
    join
    chk(32'(pulses), 1, "adma_start pulse");
    chk(32'(adma_dir), 1, "adma_dir");
    chk(32'(adma_tcdm), 77, "adma_tcdm");
    // done flags
    @(negedge clk); ce_done = 1; @(negedge clk); ce_done = 0;
    rd(6'h20, d); chk(d & 32'h7f, 32'h14, "status ce done, adma busy");
    wr(6'h20, 32'h10);
    rd(6'h20, d); chk(d & 32'h7f, 32'h04, "status cleared");
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
