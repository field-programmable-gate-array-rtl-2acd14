// feature_mem: simple dual-port block RAM (one write port, one read port).
//
// Holds a feature map: the input image (one word = all input channels of one
// pixel) or the layer output (one word = one value per parallel output
// channel). Writes happen on the clock edge when we is high. Reads are
// synchronous: rdata shows mem[raddr] one cycle after raddr is presented, as
// in an FPGA block RAM. A read and a write to the same address in one cycle
// return the old contents. The on-chip BRAM storage follows the design
// description; the port arrangement is this implementation's choice.
module feature_mem #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 1024,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr] <= wdata;
    rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end

endmodule
