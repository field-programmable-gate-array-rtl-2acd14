// relu: rectified linear unit, out = max(0, in), with a bypass.
//
// With en low the value passes unchanged, so a layer without activation can
// run on the same datapath. One register stage: in cycle t gives out in
// cycle t+1. ReLU as the only supported activation follows the design
// description; the bypass and the register stage are this implementation's
// choices.
module relu
  import cnn_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic in_valid,
  input  acc_t in,
  output logic out_valid,
  output acc_t out
);

  always_ff @(posedge clk) out <= (en && in < 0) ? '0 : in;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;

endmodule
