// tb_conv_pe: self-checking test of the unrolled, pipelined processing
// element. A new random window (N = 2*3*3 taps) with random weights and bias
// is presented every cycle, with occasional idle cycles; each result must
// equal bias + sum(win*wgt), computed here in plain integers, exactly two
// cycles after its inputs.
module tb_conv_pe;
  import cnn_pkg::*;
  localparam int N = 18, LAT = 2, NV = 300;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  data_t win [N], wgt [N];
  acc_t bias = '0, out;
  int checks = 0, failures = 0;
  longint exp_q [$];
  int     t_in  [$];
  int     cyc = 0;

  conv_pe #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker: results in order, at the right cycle
  always @(posedge clk) if (rst_n && out_valid) begin
    automatic longint e = exp_q.pop_front();
    automatic int t = t_in.pop_front();
    checks++;
    if (longint'(out) != e || cyc - t != LAT) begin
      failures++; $display("got %0d want %0d latency %0d", out, e, cyc - t);
    end
  end

  initial begin
    foreach (win[i]) begin win[i] = '0; wgt[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < NV; v++) begin
      automatic longint s;
      @(negedge clk);
      if ($urandom_range(5) == 0) begin in_valid = 0; @(negedge clk); end
      bias = acc_t'($signed($urandom_range(20000)) - 10000);
      s = bias;
      for (int i = 0; i < N; i++) begin
        win[i] = data_t'($urandom); wgt[i] = data_t'($urandom);
        if (v == 0) begin win[i] = -128; wgt[i] = -128; end
        s += longint'(win[i]) * longint'(wgt[i]);
      end
      in_valid = 1;
      exp_q.push_back(s);
      t_in.push_back(cyc + 1);
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
