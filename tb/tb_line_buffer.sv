// tb_line_buffer: self-checking test of the sliding-window line buffer.
// Two random frames of a 7 x 6 image with 2 channels are streamed with random
// idle cycles (and a clear between frames); every window produced must match
// the K x K x C block of the image whose bottom-right corner is the pixel fed
// in the cycle before, and the number of windows per frame must be
// (H-K+1)*(W-K+1).
module tb_line_buffer;
  import cnn_pkg::*;
  localparam int W = 7, H = 6, C = 2, K = 3;
  logic clk = 0, rst_n = 0, clear = 0, pix_valid = 0, win_valid;
  logic [C*DATA_W-1:0] pix = '0;
  data_t win [C*K*K];
  data_t img [C][H][W];
  int checks = 0, failures = 0, nwin = 0;
  int last_r = 0, last_c = 0;   // pixel accepted at the previous edge
  int cur_r = 0, cur_c = 0;     // pixel being presented

  line_buffer #(.IMG_W(W), .C(C), .K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    automatic int bad = 0;
    if (win_valid) begin
    nwin++;
    for (int ci = 0; ci < C; ci++)
      for (int ky = 0; ky < K; ky++)
        for (int kx = 0; kx < K; kx++)
          if (win[ci*K*K + ky*K + kx] !== img[ci][last_r-K+1+ky][last_c-K+1+kx]) bad++;
    checks++;
    if (bad != 0 || last_r < K - 1 || last_c < K - 1) begin
      failures++; $display("window at (%0d,%0d) wrong (%0d taps)", last_r, last_c, bad);
    end
    end
    if (pix_valid) begin last_r = cur_r; last_c = cur_c; end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          for (int ci = 0; ci < C; ci++) img[ci][r][c] = data_t'($urandom);
      nwin = 0;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          while ($urandom_range(3) == 0) begin pix_valid = 0; @(negedge clk); end
          for (int ci = 0; ci < C; ci++) pix[ci*DATA_W +: DATA_W] = img[ci][r][c];
          pix_valid = 1; cur_r = r; cur_c = c;
          @(negedge clk);
          pix_valid = 0;
        end
      repeat (3) @(negedge clk);
      checks++;
      if (nwin != (H - K + 1) * (W - K + 1)) begin
        failures++; $display("frame %0d: %0d windows", f, nwin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
