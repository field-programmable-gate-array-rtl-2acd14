// tb_feature_mem: self-checking test of the dual-port feature memory.
// Fills the memory with random words, then reads addresses in random order
// and checks each word one cycle after its address (read latency 1), and
// that a read in the same cycle as a write to that address returns the old
// word.
module tb_feature_mem;
  localparam int WIDTH = 24, DEPTH = 40, AW = $clog2(DEPTH);
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  feature_mem #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = WIDTH'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 200; i++) begin
      automatic int a = $urandom_range(DEPTH - 1);
      @(negedge clk); raddr = AW'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin
        failures++; $display("read %0d: got %h want %h", a, rdata, model[a]);
      end
    end
    // read-during-write returns the old word
    @(negedge clk);
    raddr = 5; waddr = 5; we = 1; wdata = ~model[5];
    @(negedge clk);
    we = 0;
    checks++;
    if (rdata !== model[5]) begin failures++; $display("read-during-write wrong"); end
    model[5] = ~model[5];
    @(negedge clk);
    checks++;
    if (rdata !== model[5]) begin failures++; $display("write not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
