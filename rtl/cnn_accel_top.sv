// cnn_accel_top: parameterized convolution-layer accelerator with an
// optimized memory controller.
//
// One run computes a whole convolution layer:
//   out[co][y][x] = pool( relu( bias[co] + sum_{ci,ky,kx}
//                   in[ci][y+ky][x+kx] * w[co][ci][ky][kx] ) )
// with stride 1, no padding, optional ReLU and optional POOL x POOL max
// pooling. The host first loads the input image into the input memory (one
// word per pixel holding all C_IN channels, address y*IMG_W + x), the kernels
// and biases into the weight store, then pulses start. The memory controller
// streams the image once per pass through its line buffer, which turns it
// into K x K x C_IN windows at one per cycle; PAR_OUT processing elements,
// each a fully unrolled, pipelined multiply-add tree, compute PAR_OUT output
// channels of that window in parallel; per lane a ReLU and a streaming max
// pool follow; the results go to the output memory. ceil(C_OUT/PAR_OUT)
// passes cover all output channels.
//
// Output memory: word grp*NOUT + y*OW + x holds, in lane l (bits
// l*ACC_W +: ACC_W), output channel grp*PAR_OUT + l at (y, x); NOUT and OW
// are those of the pooled map when pooling is on, of the convolution
// output otherwise. Reads have one cycle of latency. Memories must not be
// written while busy.
//
// The functions (convolution, ReLU, max pooling, a memory controller that
// avoids redundant reads, parameterization, unrolling, pipelining) follow the
// design description. All sizes, number formats, memory layouts and the
// default layer shape (a 32x32 single-channel image, six 5x5 kernels, 2x2
// pooling, i.e. the first layer of LeNet-5) are this implementation's
// choices.
module cnn_accel_top
  import cnn_pkg::*;
#(
  parameter int IMG_W   = 32,
  parameter int IMG_H   = 32,
  parameter int C_IN    = 1,
  parameter int C_OUT   = 6,
  parameter int K       = 5,
  parameter int POOL    = 2,
  parameter int PAR_OUT = 3,
  // derived sizes
  parameter int OW      = IMG_W - K + 1,
  parameter int OH      = IMG_H - K + 1,
  parameter int NG      = n_groups(C_OUT, PAR_OUT),
  parameter int N       = C_IN * K * K,
  parameter int IAW     = $clog2(IMG_W * IMG_H),
  parameter int OAW     = $clog2(NG * OW * OH),
  parameter int WAW     = $clog2(C_OUT * N),
  parameter int BAW     = (C_OUT > 1) ? $clog2(C_OUT) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // input image load
  input  logic                     img_we,
  input  logic [IAW-1:0]           img_waddr,
  input  logic [C_IN*DATA_W-1:0]   img_wdata,
  // kernel and bias load
  input  logic                     w_we,
  input  logic [WAW-1:0]           w_addr,
  input  data_t                    w_wdata,
  input  logic                     b_we,
  input  logic [BAW-1:0]           b_addr,
  input  acc_t                     b_wdata,
  // run control
  input  layer_cfg_t               cfg,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  // result read-back
  input  logic [OAW-1:0]           out_raddr,
  output logic [PAR_OUT*ACC_W-1:0] out_rdata,
  // statistics
  output logic [31:0]              cycle_count,
  output logic [31:0]              pass_count,
  output logic [31:0]              rd_count
);

  localparam int GW = 8;

  layer_cfg_t             cfg_q;
  logic [GW-1:0]          grp;
  logic                   mc_start, mc_busy, mc_done, dp_clear;
  logic [IAW-1:0]         img_raddr;
  logic [C_IN*DATA_W-1:0] img_rdata;
  logic                   win_valid;
  data_t                  win [N];
  data_t                  wgt [PAR_OUT][N];
  acc_t                   bias [PAR_OUT];
  logic                   pe_valid [PAR_OUT], act_valid [PAR_OUT], pool_valid [PAR_OUT];
  acc_t                   pe_out [PAR_OUT], act_out [PAR_OUT], pool_out [PAR_OUT];
  logic [PAR_OUT*ACC_W-1:0] out_wdata;
  logic                   out_we;
  logic [OAW-1:0]         out_waddr;

  feature_mem #(.WIDTH(C_IN*DATA_W), .DEPTH(IMG_W*IMG_H), .AW(IAW)) u_in_mem (
    .clk, .we(img_we), .waddr(img_waddr), .wdata(img_wdata),
    .raddr(img_raddr), .rdata(img_rdata)
  );

  weight_mem #(.C_OUT(C_OUT), .N(N), .PAR(PAR_OUT), .WAW(WAW), .BAW(BAW), .GW(GW)) u_wmem (
    .clk, .w_we, .w_addr, .w_wdata, .b_we, .b_addr, .b_wdata,
    .grp, .wgt, .bias
  );

  mem_ctrl #(.IMG_W(IMG_W), .IMG_H(IMG_H), .C(C_IN), .K(K), .AW(IAW)) u_mc (
    .clk, .rst_n, .start(mc_start), .busy(mc_busy), .done(mc_done),
    .mem_raddr(img_raddr), .mem_rdata(img_rdata),
    .win_valid, .win, .rd_count
  );

  for (genvar l = 0; l < PAR_OUT; l++) begin : g_lane
    conv_pe #(.N(N)) u_pe (
      .clk, .rst_n, .in_valid(win_valid), .win, .wgt(wgt[l]), .bias(bias[l]),
      .out_valid(pe_valid[l]), .out(pe_out[l])
    );
    relu u_relu (
      .clk, .rst_n, .en(cfg_q.relu_en), .in_valid(pe_valid[l]), .in(pe_out[l]),
      .out_valid(act_valid[l]), .out(act_out[l])
    );
    max_pool #(.IN_W(OW), .IN_H(OH), .P(POOL)) u_pool (
      .clk, .rst_n, .clear(dp_clear), .en(cfg_q.pool_en),
      .in_valid(act_valid[l]), .in(act_out[l]),
      .out_valid(pool_valid[l]), .out(pool_out[l])
    );
    assign out_wdata[l*ACC_W +: ACC_W] = pool_out[l];
  end

  accel_ctrl #(.C_OUT(C_OUT), .PAR(PAR_OUT), .NOUT_FULL(OW*OH),
               .NOUT_POOL((OW/POOL)*(OH/POOL)), .OAW(OAW), .GW(GW)) u_ctrl (
    .clk, .rst_n, .start, .cfg_in(cfg), .cfg(cfg_q), .busy, .done, .grp,
    .mc_start, .mc_busy, .mc_done, .dp_clear,
    .res_valid(pool_valid[0]), .out_we, .out_waddr,
    .cycle_count, .pass_count
  );

  feature_mem #(.WIDTH(PAR_OUT*ACC_W), .DEPTH(NG*OW*OH), .AW(OAW)) u_out_mem (
    .clk, .we(out_we), .waddr(out_waddr), .wdata(out_wdata),
    .raddr(out_raddr), .rdata(out_rdata)
  );

endmodule
