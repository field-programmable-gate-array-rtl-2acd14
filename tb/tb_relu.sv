// tb_relu: self-checking test of the ReLU stage. Random values, some
// negative and some at the extremes, pass with ReLU on and off; the output
// must be max(0,x) (or x in bypass) exactly one cycle later with valid.
module tb_relu;
  import cnn_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, in_valid = 0, out_valid;
  acc_t in = '0, out;
  int checks = 0, failures = 0, clamped = 0;

  relu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      automatic acc_t x, want;
      automatic logic e = i[0] ^ i[5];
      x = (i % 37 == 0) ? acc_t'(32'h8000_0000) : (i % 41 == 0) ? acc_t'(32'h7fff_ffff) : acc_t'($urandom);
      want = (e && x < 0) ? '0 : x;
      @(negedge clk); en = e; in = x; in_valid = 1;
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid || out !== want) begin
        failures++; $display("x=%0d en=%0b got %0d want %0d v=%0b", x, e, out, want, out_valid);
      end
      if (e && x < 0) clamped++;
      checks++;
      @(negedge clk);
      if (out_valid) begin failures++; $display("valid held too long"); end
    end
    checks++;
    if (clamped == 0) begin failures++; $display("no value was clamped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
