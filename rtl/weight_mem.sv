// weight_mem: kernel and bias store of the convolution layer.
//
// The host writes the C_OUT kernels, N = C*K*K weights each, one weight per
// cycle at address co*N + ci*K*K + ky*K + kx, and the C_OUT biases at address
// co. During a pass the controller selects a group grp of PAR output
// channels; the store then presents all N weights and the bias of channels
// grp*PAR .. grp*PAR+PAR-1 at once to the PAR processing elements, so the
// unrolled multipliers get their operands in one cycle. Lanes whose channel
// number is C_OUT or more read zero. Reads are
// combinational; writes take effect on the clock edge. Kernel and bias
// storage on chip is implied by the design description; the address map and
// register-file form are this implementation's choices.
module weight_mem
  import cnn_pkg::*;
#(
  parameter int C_OUT = 6,
  parameter int N     = 25,
  parameter int PAR   = 3,
  parameter int WAW   = $clog2(C_OUT * N),
  parameter int BAW   = (C_OUT > 1) ? $clog2(C_OUT) : 1,
  parameter int GW    = 8
) (
  input  logic           clk,
  input  logic           w_we,
  input  logic [WAW-1:0] w_addr,
  input  data_t          w_wdata,
  input  logic           b_we,
  input  logic [BAW-1:0] b_addr,
  input  acc_t           b_wdata,
  input  logic [GW-1:0]  grp,
  output data_t          wgt      [PAR][N],
  output acc_t           bias     [PAR]
);

  data_t wmem [C_OUT][N];
  acc_t  bmem [C_OUT];

  always_ff @(posedge clk) begin
    if (w_we && 32'(w_addr) < C_OUT * N) wmem[32'(w_addr) / N][32'(w_addr) % N] <= w_wdata;
    if (b_we && 32'(b_addr) < C_OUT)     bmem[b_addr] <= b_wdata;
  end

  always_comb begin
    for (int l = 0; l < PAR; l++) begin
      automatic int co = int'(grp) * PAR + l;
      bias[l]      = (co < C_OUT) ? bmem[co] : '0;
      for (int i = 0; i < N; i++) wgt[l][i] = (co < C_OUT) ? wmem[co][i] : '0;
    end
  end

endmodule
