// tb_cnn_accel_top: end-to-end test of the convolution-layer accelerator at a reduced size with several input channels (11 x 9 x 3 image, five 3 x 3 kernels, 2 channels per pass, so the last pass uses one lane).
//
// Random image, kernel and bias data are loaded through the host ports and
// three layers are run: ReLU + max pooling, neither (plain convolution), and
// ReLU without pooling. After each run every output word is read back and
// compared lane by lane with an integer reference computed here from the
// same data. The test also checks the pass count (ceil(C_OUT/PAR_OUT)), that
// each pass reads every input pixel exactly once, and that a run takes no
// more than IMG_W*IMG_H + 16 cycles per pass (one window per cycle). It
// counts how often each mechanism occurred (multi-pass run, ReLU clamping a
// negative sum, a negative sum passed with ReLU off, pooling, pooling bypass,
// a partly used channel group) and fails if one it expects never happened.
module tb_cnn_accel_top;
  import cnn_pkg::*;
  localparam int IMG_W = 11, IMG_H = 9, C_IN = 3, C_OUT = 5;
  localparam int K = 3, POOL = 2, PAR_OUT = 2;
  localparam int OW = IMG_W - K + 1, OH = IMG_H - K + 1;
  localparam int PW = OW / POOL, PH = OH / POOL;
  localparam int NG = (C_OUT + PAR_OUT - 1) / PAR_OUT, N = C_IN * K * K;
  localparam int IAW = $clog2(IMG_W * IMG_H), OAW = $clog2(NG * OW * OH);
  localparam int WAW = $clog2(C_OUT * N), BAW = (C_OUT > 1) ? $clog2(C_OUT) : 1;
  localparam bit EXPECT_PARTIAL = (C_OUT % PAR_OUT) != 0;

  logic clk = 0, rst_n = 0;
  logic img_we = 0, w_we = 0, b_we = 0, start = 0, busy, done;
  logic [IAW-1:0] img_waddr = '0;
  logic [C_IN*DATA_W-1:0] img_wdata = '0;
  logic [WAW-1:0] w_addr = '0;
  data_t w_wdata = '0;
  logic [BAW-1:0] b_addr = '0;
  acc_t b_wdata = '0;
  layer_cfg_t cfg = '0;
  logic [OAW-1:0] out_raddr = '0;
  logic [PAR_OUT*ACC_W-1:0] out_rdata;
  logic [31:0] cycle_count, pass_count, rd_count;

  data_t img [C_IN][IMG_H][IMG_W];
  data_t wt  [C_OUT][C_IN][K][K];
  acc_t  bs  [C_OUT];
  acc_t  conv [C_OUT][OH][OW];

  int checks = 0, failures = 0;
  int n_multipass = 0, n_relu_clamp = 0, n_neg_pass = 0, n_pool = 0, n_bypass = 0, n_partial = 0;

  cnn_accel_top #(.IMG_W(IMG_W), .IMG_H(IMG_H), .C_IN(C_IN), .C_OUT(C_OUT), .K(K), .POOL(POOL), .PAR_OUT(PAR_OUT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_data();
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        @(negedge clk);
        img_we = 1; img_waddr = IAW'(y * IMG_W + x);
        for (int ci = 0; ci < C_IN; ci++) begin
          img[ci][y][x] = data_t'($urandom);
          img_wdata[ci*DATA_W +: DATA_W] = img[ci][y][x];
        end
      end
    @(negedge clk); img_we = 0;
    for (int co = 0; co < C_OUT; co++)
      for (int ci = 0; ci < C_IN; ci++)
        for (int ky = 0; ky < K; ky++)
          for (int kx = 0; kx < K; kx++) begin
            @(negedge clk);
            w_we = 1; w_addr = WAW'(((co * C_IN + ci) * K + ky) * K + kx);
            wt[co][ci][ky][kx] = data_t'($urandom);
            w_wdata = wt[co][ci][ky][kx];
          end
    @(negedge clk); w_we = 0;
    for (int co = 0; co < C_OUT; co++) begin
      @(negedge clk);
      b_we = 1; b_addr = BAW'(co);
      bs[co] = acc_t'($signed($urandom_range(4000)) - 2000);
      b_wdata = bs[co];
    end
    @(negedge clk); b_we = 0;
    // reference convolution
    for (int co = 0; co < C_OUT; co++)
      for (int y = 0; y < OH; y++)
        for (int x = 0; x < OW; x++) begin
          automatic longint s = bs[co];
          for (int ci = 0; ci < C_IN; ci++)
            for (int ky = 0; ky < K; ky++)
              for (int kx = 0; kx < K; kx++)
                s += longint'(img[ci][y+ky][x+kx]) * longint'(wt[co][ci][ky][kx]);
          conv[co][y][x] = acc_t'(s);
        end
  endtask

  function automatic acc_t act(acc_t v, logic relu_en);
    return (relu_en && v < 0) ? acc_t'(0) : v;
  endfunction

  task automatic run_and_check(logic relu_en, logic pool_en);
    automatic int ow = pool_en ? PW : OW, oh = pool_en ? PH : OH;
    automatic int bad = 0;
    @(negedge clk);
    cfg.relu_en = relu_en; cfg.pool_en = pool_en; start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    checks += 3;
    if (pass_count != NG) begin failures++; $display("pass_count %0d", pass_count); end
    if (rd_count != IMG_W * IMG_H) begin failures++; $display("rd_count %0d", rd_count); end
    if (cycle_count > NG * (IMG_W * IMG_H + 16) || cycle_count < NG * IMG_W * IMG_H) begin
      failures++; $display("cycle_count %0d", cycle_count);
    end
    if (NG > 1) n_multipass++;
    if (pool_en) n_pool++; else n_bypass++;
    if (EXPECT_PARTIAL) n_partial++;
    for (int g = 0; g < NG; g++)
      for (int y = 0; y < oh; y++)
        for (int x = 0; x < ow; x++) begin
          out_raddr = OAW'(g * ow * oh + y * ow + x);
          @(negedge clk);
          for (int l = 0; l < PAR_OUT; l++) begin
            automatic int co = g * PAR_OUT + l;
            automatic acc_t want, got;
            if (co >= C_OUT) continue;
            if (pool_en) begin
              want = act(conv[co][y*POOL][x*POOL], relu_en);
              for (int dy = 0; dy < POOL; dy++)
                for (int dx = 0; dx < POOL; dx++)
                  if (act(conv[co][y*POOL+dy][x*POOL+dx], relu_en) > want)
                    want = act(conv[co][y*POOL+dy][x*POOL+dx], relu_en);
            end else begin
              want = act(conv[co][y][x], relu_en);
              if (conv[co][y][x] < 0) begin
                if (relu_en) n_relu_clamp++; else n_neg_pass++;
              end
            end
            got = out_rdata[l*ACC_W +: ACC_W];
            checks++;
            if (got !== want) begin
              failures++;
              if (bad++ < 10) $display("relu=%0b pool=%0b co=%0d (%0d,%0d): got %0d want %0d",
                                       relu_en, pool_en, co, y, x, got, want);
            end
          end
        end
    $display("run relu=%0b pool=%0b: %0d cycles, %0d passes, %0d input reads per pass",
             relu_en, pool_en, cycle_count, pass_count, rd_count);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_data();
    run_and_check(1'b1, 1'b1);
    run_and_check(1'b0, 1'b0);
    load_data();
    run_and_check(1'b1, 1'b0);
    $display("mechanisms: multipass=%0d relu_clamp=%0d neg_pass=%0d pool=%0d bypass=%0d partial_group=%0d",
             n_multipass, n_relu_clamp, n_neg_pass, n_pool, n_bypass, n_partial);
    checks += 5;
    if (n_multipass == 0)  begin failures++; $display("no multi-pass run"); end
    if (n_relu_clamp == 0) begin failures++; $display("ReLU never clamped"); end
    if (n_neg_pass == 0)   begin failures++; $display("no negative value with ReLU off"); end
    if (n_pool == 0)       begin failures++; $display("pooling never used"); end
    if (n_bypass == 0)     begin failures++; $display("pooling bypass never used"); end
    if (EXPECT_PARTIAL) begin
      checks++;
      if (n_partial == 0) begin failures++; $display("partial group never run"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
