// tb_max_pool: self-checking test of the streaming max pool. Random 7 x 5
// maps (so a column and a row are left over and must be dropped) are streamed
// with idle cycles; with pooling on, the 3 x 2 block maxima must come out in
// raster order, each one cycle after the block's last value; with pooling off
// (bypass) every value must come out unchanged one cycle later.
module tb_max_pool;
  import cnn_pkg::*;
  localparam int W = 7, H = 5, P = 2;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, in_valid = 0, out_valid;
  acc_t in = '0, out;
  acc_t m [H][W];
  acc_t exp_q [$];
  int checks = 0, failures = 0;
  int cyc = 0, t_exp [$];

  max_pool #(.IN_W(W), .IN_H(H), .P(P)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("unexpected output %0d", out);
    end else begin
      automatic acc_t e = exp_q.pop_front();
      automatic int t = t_exp.pop_front();
      if (out !== e || cyc != t) begin
        failures++; $display("got %0d want %0d (cycle %0d want %0d)", out, e, cyc, t);
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      en = f[0] == 0;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) m[r][c] = acc_t'($signed($urandom_range(2000)) - 1000);
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          while ($urandom_range(3) == 0) begin in_valid = 0; @(negedge clk); end
          in = m[r][c]; in_valid = 1;
          if (!en) begin
            exp_q.push_back(in); t_exp.push_back(cyc + 2);
          end else if (r % P == P - 1 && c % P == P - 1 && r < (H / P) * P && c < (W / P) * P) begin
            automatic acc_t mx = m[r][c];
            for (int dy = 0; dy < P; dy++)
              for (int dx = 0; dx < P; dx++)
                if (m[r-dy][c-dx] > mx) mx = m[r-dy][c-dx];
            exp_q.push_back(mx); t_exp.push_back(cyc + 2);
          end
          @(negedge clk);
          in_valid = 0;
        end
      repeat (3) @(negedge clk);
      checks++;
      if (exp_q.size() != 0) begin failures++; $display("frame %0d: %0d outputs missing", f, exp_q.size()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
