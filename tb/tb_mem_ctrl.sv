// tb_mem_ctrl: self-checking test of the memory controller with a feature
// memory behind it. A random 6 x 5 image with 3 channels is loaded, and two
// passes are run. Each pass must read every pixel exactly once (rd_count =
// W*H, where fetching each window directly would take K*K reads per window), emit
// the (H-K+1)*(W-K+1) windows in raster order with the right contents, give
// the first window (K-1)*W + K-1 + 3 cycles after the start edge, and pulse
// done W*H + 2 cycles after it.
module tb_mem_ctrl;
  import cnn_pkg::*;
  localparam int W = 6, H = 5, C = 3, K = 3, AW = $clog2(W * H);
  logic clk = 0, rst_n = 0, start = 0, busy, done, win_valid;
  logic we = 0;
  logic [AW-1:0] waddr = '0, mem_raddr;
  logic [C*DATA_W-1:0] wdata = '0, mem_rdata;
  data_t win [C*K*K];
  logic [31:0] rd_count;
  data_t img [C][H][W];
  int checks = 0, failures = 0, nwin = 0, cyc = 0, t_start = 0, t_first = -1, t_done = -1;

  feature_mem #(.WIDTH(C*DATA_W), .DEPTH(W*H)) u_mem (
    .clk, .we, .waddr, .wdata, .raddr(mem_raddr), .rdata(mem_rdata));
  mem_ctrl #(.IMG_W(W), .IMG_H(H), .C(C), .K(K)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n && win_valid) begin
      automatic int oy = nwin / (W - K + 1), ox = nwin % (W - K + 1), bad = 0;
      if (t_first < 0) t_first = cyc - t_start;
      for (int ci = 0; ci < C; ci++)
        for (int ky = 0; ky < K; ky++)
          for (int kx = 0; kx < K; kx++)
            if (win[ci*K*K + ky*K + kx] !== img[ci][oy+ky][ox+kx]) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("window %0d: %0d taps wrong", nwin, bad); end
      nwin++;
    end
    if (rst_n && done) t_done = cyc - t_start;
  end

  initial begin
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        we = 1; waddr = AW'(r * W + c);
        for (int ci = 0; ci < C; ci++) begin
          img[ci][r][c] = data_t'($urandom);
          wdata[ci*DATA_W +: DATA_W] = img[ci][r][c];
        end
      end
    @(negedge clk); we = 0; rst_n = 1;
    for (int p = 0; p < 2; p++) begin
      nwin = 0; t_first = -1; t_done = -1;
      @(negedge clk); start = 1; t_start = cyc + 1;
      @(negedge clk); start = 0;
      wait (done);
      repeat (3) @(negedge clk);
      checks += 4;
      if (nwin != (H - K + 1) * (W - K + 1)) begin failures++; $display("%0d windows", nwin); end
      if (rd_count != W * H) begin failures++; $display("rd_count %0d", rd_count); end
      if (t_first != (K - 1) * W + K - 1 + 3) begin failures++; $display("first window after %0d", t_first); end
      if (t_done != W * H + 2) begin failures++; $display("done after %0d", t_done); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
