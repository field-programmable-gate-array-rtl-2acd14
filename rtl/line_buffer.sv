// line_buffer: sliding-window generator at the heart of the memory controller.
//
// Pixels of an IMG_W-wide image arrive in raster order, one per cycle when
// pix_valid is high, each carrying all C input channels. The block keeps the
// last K-1 image rows in on-chip row memories and a K x K window register per
// channel, so every pixel is read from the feature memory once and then reused
// by all K*K windows that contain it; this removal of redundant memory reads
// is what the design description asks of its memory controller. The row
// memories and window registers are this implementation's choice of how.
//
// Timing: one cycle after the pixel at (row r, column c) is accepted, win
// holds the window whose bottom-right corner is that pixel, and win_valid is
// high if the window lies wholly inside the image (r >= K-1 and c >= K-1).
// Stride 1, no padding. win[ci*K*K + ky*K + kx] is channel ci, window row ky
// (0 = top), window column kx (0 = left). clear (or reset) restarts the
// row/column counters for a new frame.
module line_buffer
  import cnn_pkg::*;
#(
  parameter int IMG_W = 32,
  parameter int C     = 1,
  parameter int K     = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                pix_valid,
  input  logic [C*DATA_W-1:0] pix,
  output logic                win_valid,
  output data_t               win [C*K*K]
);

  localparam int NL = (K > 1) ? K - 1 : 1;
  localparam int CW = (IMG_W > 1) ? $clog2(IMG_W) : 1;

  logic [C*DATA_W-1:0] lines [NL][IMG_W];   // lines[i] holds image row r-1-i
  logic [C*DATA_W-1:0] taps  [K];           // column entering the window, taps[ky]
  data_t               wreg  [C][K][K];
  logic [CW-1:0]       col;
  logic [31:0]         row;

  always_comb begin
    taps[K-1] = pix;
    for (int ky = 0; ky < K - 1; ky++) taps[ky] = lines[K-2-ky][col];
  end

  always_ff @(posedge clk) begin
    if (pix_valid) begin
      if (K > 1) begin
        lines[0][col] <= pix;
        for (int i = 1; i < K - 1; i++) lines[i][col] <= lines[i-1][col];
      end
      for (int ci = 0; ci < C; ci++)
        for (int ky = 0; ky < K; ky++) begin
          for (int kx = 0; kx < K - 1; kx++) wreg[ci][ky][kx] <= wreg[ci][ky][kx+1];
          wreg[ci][ky][K-1] <= taps[ky][ci*DATA_W +: DATA_W];
        end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      win_valid <= 1'b0;
    end else if (clear) begin
      col       <= '0;
      row       <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= pix_valid && (row >= 32'(K - 1)) && (32'(col) >= 32'(K - 1));
      if (pix_valid) begin
        if (32'(col) == 32'(IMG_W - 1)) begin
          col <= '0;
          row <= row + 1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

  always_comb
    for (int ci = 0; ci < C; ci++)
      for (int ky = 0; ky < K; ky++)
        for (int kx = 0; kx < K; kx++)
          win[ci*K*K + ky*K + kx] = wreg[ci][ky][kx];

endmodule
