// tb_accel_ctrl: self-checking test of the pass sequencer. A stand-in memory
// controller stays busy for 20 cycles after each start and pulses done; a
// stand-in datapath returns the pass's results (12 without pooling, 3 with)
// at random cycles while it is busy. For runs with pooling on and off the
// test checks: ceil(5/2) = 3 passes with grp 0,1,2, one write per result at
// address grp*NOUT + index, the configuration captured at start, a single
// done pulse, and cycle_count equal to the measured run length.
module tb_accel_ctrl;
  import cnn_pkg::*;
  localparam int C_OUT = 5, PAR = 2, NF = 12, NP = 3, NG = 3, BUSY = 20;
  localparam int OAW = $clog2(NG * NF);
  logic clk = 0, rst_n = 0, start = 0, busy, done, mc_start, mc_busy = 0, mc_done = 0;
  logic dp_clear, res_valid = 0, out_we;
  logic [OAW-1:0] out_waddr;
  logic [7:0] grp;
  layer_cfg_t cfg_in = '0, cfg;
  logic [31:0] cycle_count, pass_count;
  int checks = 0, failures = 0, cyc = 0, nwr = 0, passes_seen = 0, ndone = 0;
  int t0, t1;

  accel_ctrl #(.C_OUT(C_OUT), .PAR(PAR), .NOUT_FULL(NF), .NOUT_POOL(NP)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stand-in memory controller and datapath
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && mc_start) begin
        automatic int n = cfg.pool_en ? NP : NF;
        automatic int g = grp;
        automatic int sent = 0;
        passes_seen++;
        checks++;
        if (g != passes_seen - 1) begin failures++; $display("pass %0d has grp %0d", passes_seen, g); end
        @(negedge clk); mc_busy = 1;
        for (int i = 0; i < BUSY; i++) begin
          if (sent < n && ($urandom_range(1) == 0 || BUSY - i <= n - sent)) begin
            res_valid = 1; sent++;
          end else res_valid = 0;
          if (i == BUSY - 1) begin mc_done = 1; mc_busy = 0; end
          @(negedge clk);
          res_valid = 0; mc_done = 0;
        end
      end
    end
  end

  // write checker
  always @(posedge clk) if (rst_n) begin
    if (out_we) begin
      automatic int n = cfg.pool_en ? NP : NF;
      checks++;
      if (int'(out_waddr) != (nwr / n) * n + (nwr % n)) begin
        failures++; $display("write %0d at %0d", nwr, out_waddr);
      end
      nwr++;
    end
    if (res_valid != out_we) begin failures++; $display("result not written"); end
    if (done) begin ndone++; t1 = cyc; end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      automatic int n = run == 0 ? NF : NP;
      nwr = 0; passes_seen = 0; ndone = 0;
      cfg_in.pool_en = (run == 1); cfg_in.relu_en = (run == 0);
      @(negedge clk); start = 1; t0 = cyc + 1;
      @(negedge clk); start = 0; cfg_in = '0;
      wait (done);
      @(negedge clk);
      repeat (3) @(negedge clk);
      checks += 6;
      if (nwr != NG * n) begin failures++; $display("%0d writes", nwr); end
      if (passes_seen != NG || pass_count != NG) begin failures++; $display("%0d passes", passes_seen); end
      if (ndone != 1) begin failures++; $display("%0d done pulses", ndone); end
      if (cfg.pool_en != (run == 1) || cfg.relu_en != (run == 0)) begin failures++; $display("cfg not held"); end
      if (busy) begin failures++; $display("still busy"); end
      if (int'(cycle_count) != t1 - t0) begin failures++; $display("cycle_count %0d measured %0d", cycle_count, t1 - t0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
