// mem_ctrl: optimized memory controller for the input feature map.
//
// On start it reads the IMG_H x IMG_W input image from the feature memory in
// raster order, one address per cycle, and feeds the words (one word = all C
// channels of a pixel) into a line_buffer that forms the K x K x C
// convolution windows. Each pixel is therefore fetched exactly once per pass
// instead of once per window it belongs to (K*K times). rd_count counts the
// reads of the current pass so the saving can be observed.
//
// Timing: mem_raddr is issued in the cycle after start and every cycle after
// that for IMG_W*IMG_H cycles; the memory answers one cycle later; a window
// leaves one cycle after its last pixel arrives (win_valid). done pulses for
// one cycle after the last read data has entered the line buffer. The first
// window is valid ((K-1)*IMG_W + K - 1) + 3 cycles after start, and from then
// on one window per cycle except during the K-1 column wrap cycles of each row.
// Reducing redundant reads follows the design description; raster order and
// the line-buffer structure are this implementation's choice.
module mem_ctrl
  import cnn_pkg::*;
#(
  parameter int IMG_W = 32,
  parameter int IMG_H = 32,
  parameter int C     = 1,
  parameter int K     = 5,
  parameter int AW    = $clog2(IMG_W * IMG_H)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  output logic                done,
  // read port of the input feature memory (one-cycle read latency)
  output logic [AW-1:0]       mem_raddr,
  input  logic [C*DATA_W-1:0] mem_rdata,
  // window stream
  output logic                win_valid,
  output data_t               win [C*K*K],
  output logic [31:0]         rd_count
);

  localparam int NPIX = IMG_W * IMG_H;

  logic        reading;    // an address is being issued this cycle
  logic        rd_q;       // read data arrives this cycle
  logic [31:0] addr;

  assign mem_raddr = AW'(addr);
  assign busy      = reading || rd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading  <= 1'b0;
      rd_q     <= 1'b0;
      addr     <= '0;
      done     <= 1'b0;
      rd_count <= '0;
    end else begin
      rd_q <= reading;
      done <= rd_q && !reading;
      if (start && !busy) begin
        reading  <= 1'b1;
        addr     <= '0;
        rd_count <= '0;
      end else if (reading) begin
        rd_count <= rd_count + 1;
        if (addr == 32'(NPIX - 1)) reading <= 1'b0;
        else                       addr    <= addr + 1;
      end
    end
  end

  line_buffer #(.IMG_W(IMG_W), .C(C), .K(K)) u_lb (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (start && !busy),
    .pix_valid(rd_q),
    .pix      (mem_rdata),
    .win_valid(win_valid),
    .win      (win)
  );

  // A new pass may only begin once the previous one has drained.
  a_no_restart: assert property (@(posedge clk) disable iff (!rst_n)
                                 start |-> !busy);

endmodule
