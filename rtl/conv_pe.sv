// conv_pe: convolution processing element for one output channel.
//
// The loop over the N = C*K*K taps of a window is fully unrolled: N
// multipliers work in parallel, an adder tree sums the products and the bias
// is added, so one output pixel is produced per cycle. The work is split into
// two pipeline stages (products, then sum + bias). Loop unrolling and
// pipelining of the convolution follow the design description; the stage
// split and the exact integer arithmetic (ACC_W-bit sum, no rounding) are
// this implementation's choices.
//
// Timing: in_valid/win/wgt/bias in cycle t give out_valid/out in cycle t+2.
// A new window may be presented every cycle.
module conv_pe
  import cnn_pkg::*;
#(
  parameter int N = 25   // taps per window, C*K*K
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t win  [N],
  input  data_t wgt  [N],
  input  acc_t  bias,
  output logic  out_valid,
  output acc_t  out
);

  acc_t prod   [N];
  acc_t bias_q;
  logic v_q;
  acc_t sum;

  // stage 1: all products at once
  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) prod[i] <= ACC_W'(win[i]) * ACC_W'(wgt[i]);
    bias_q <= bias;
  end

  // stage 2: adder tree plus bias
  always_comb begin
    sum = bias_q;
    for (int i = 0; i < N; i++) sum += prod[i];
  end

  always_ff @(posedge clk) out <= sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v_q       <= in_valid;
      out_valid <= v_q;
    end
  end

endmodule
