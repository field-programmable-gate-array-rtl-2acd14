// tb_weight_mem: self-checking test of the kernel and bias store. Random
// kernels and biases for 5 output channels are written; then for each group
// of 2 channels every weight and bias presented to each lane is compared with
// what was written, and lanes beyond the last channel must read zero.
module tb_weight_mem;
  import cnn_pkg::*;
  localparam int C_OUT = 5, N = 12, PAR = 2, WAW = $clog2(C_OUT * N), BAW = $clog2(C_OUT);
  logic clk = 0, w_we = 0, b_we = 0;
  logic [WAW-1:0] w_addr = '0;
  logic [BAW-1:0] b_addr = '0;
  data_t w_wdata = '0;
  acc_t  b_wdata = '0;
  logic [7:0] grp = '0;
  data_t wgt [PAR][N];
  acc_t  bias [PAR];
  data_t wm [C_OUT][N];
  acc_t  bm [C_OUT];
  int checks = 0, failures = 0;

  weight_mem #(.C_OUT(C_OUT), .N(N), .PAR(PAR)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int co = 0; co < C_OUT; co++) begin
      for (int i = 0; i < N; i++) begin
        @(negedge clk);
        w_we = 1; w_addr = WAW'(co * N + i); w_wdata = data_t'($urandom); wm[co][i] = w_wdata;
      end
      @(negedge clk);
      w_we = 0; b_we = 1; b_addr = BAW'(co); b_wdata = acc_t'($urandom); bm[co] = b_wdata;
    end
    @(negedge clk); b_we = 0;
    for (int g = 0; g < (C_OUT + PAR - 1) / PAR; g++) begin
      grp = 8'(g);
      #1;
      for (int l = 0; l < PAR; l++) begin
        automatic int co = g * PAR + l;
        for (int i = 0; i < N; i++) begin
          checks++;
          if (wgt[l][i] !== ((co < C_OUT) ? wm[co][i] : data_t'(0))) begin
            failures++; $display("grp %0d lane %0d w%0d wrong", g, l, i);
          end
        end
        checks++;
        if (bias[l] !== ((co < C_OUT) ? bm[co] : acc_t'(0))) begin
          failures++; $display("grp %0d lane %0d bias wrong", g, l);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
