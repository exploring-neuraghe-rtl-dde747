// tb_sp_ram: random writes and reads against a model array; read data
// must appear the cycle after the request.
module tb_sp_ram;
  localparam int DEPTH = 256;
  logic clk = 0, req = 0, we = 0;
  logic [7:0] addr;
  logic [31:0] wdata, rdata;
  always #5 clk = ~clk;
  sp_ram #(.W(32), .DEPTH(DEPTH)) dut (.*);
  int checks = 0, failures = 0;
  logic [31:0] m [DEPTH];
  logic valid [DEPTH];
  initial begin
    foreach (valid[i]) valid[i] = 0;
    addr = '0; wdata = '0;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      req = 1; addr = 8'($urandom); we = $urandom_range(0, 1);
      wdata = $urandom;
      if (we) begin m[addr] = wdata; valid[addr] = 1; end
      else if (valid[addr]) begin
        logic [7:0] a;
        a = addr;
        @(negedge clk);
        req = 0;
        checks++;
        if (rdata != m[a]) failures++;
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
