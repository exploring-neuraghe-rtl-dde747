// relu_unit: optional Rectifier Linear Unit on the output of one row.
//
// When relu_en is set, negative lanes become zero; otherwise the lanes pass
// unchanged. As in the NEURAGHE engine the block sits between the
// adder-shifter and the pooling stage and is enabled per job.
//
// Timing: one register stage advanced by en.
module relu_unit
  import neuraghe_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   relu_en,
  input  lanes_t in,
  output lanes_t out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else if (en)
      for (int l = 0; l < LANES; l++)
        out[l] <= (relu_en && in[l] < 0) ? '0 : in[l];
  end

endmodule
