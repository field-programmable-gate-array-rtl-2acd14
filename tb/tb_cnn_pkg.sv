// tb_cnn_pkg: self-checking test of the shared package: the pass-count
// function n_groups must equal ceil(c_out/par) for all small sizes, the data
// and accumulator types must have the widths the datapath relies on, and a
// full-scale product of two data values must fit the accumulator exactly.
module tb_cnn_pkg;
  import cnn_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 1; c <= 40; c++)
      for (int p = 1; p <= 12; p++) begin
        automatic int want = c / p + ((c % p) != 0 ? 1 : 0);
        checks++;
        if (n_groups(c, p) != want) begin
          failures++; $display("n_groups(%0d,%0d) = %0d, want %0d", c, p, n_groups(c, p), want);
        end
      end
    checks += 3;
    if ($bits(data_t) != DATA_W || $bits(acc_t) != ACC_W) begin failures++; $display("type widths"); end
    if ($bits(layer_cfg_t) != 2) begin failures++; $display("cfg width"); end
    begin
      automatic data_t a = data_t'(-128);
      automatic acc_t  p = ACC_W'(a) * ACC_W'(a);
      if (p != 16384) begin failures++; $display("product %0d", p); end
    end
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
