// tb_relu_unit: random lanes with ReLU on and off; negative lanes must be
// zero only when enabled, and nothing may change while en is low.
module tb_relu_unit;
  import neuraghe_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, relu_en = 0;
  lanes_t in, out;
  always #5 clk = ~clk;
  relu_unit dut (.*);
  int checks = 0, failures = 0;
  initial begin
    in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      lanes_t prev;
      prev = out;
      relu_en = $urandom_range(0, 1);
      for (int l = 0; l < LANES; l++) in[l] = pix_t'($urandom);
      en = (it % 5 != 4);
      @(negedge clk);
      for (int l = 0; l < LANES; l++) begin
        pix_t e;
        e = !en ? prev[l] : ((relu_en && in[l] < 0) ? pix_t'(0) : in[l]);
        checks++;
        if (out[l] != e) begin
          failures++;
          if (failures < 5) $display("FAIL it%0d lane%0d: %0d vs %0d", it, l, out[l], e);
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
