// max_pool: streaming P x P max pooling, stride P, of one feature map.
//
// Values of an IN_H x IN_W map arrive in raster order (in_valid). A register
// keeps the running maximum across the P columns of the current block, and a
// row memory of IN_W/P entries keeps the running maximum of each block over
// the rows seen so far, so no value has to be stored twice or re-read. When
// the last value of a block arrives, its maximum is emitted. Rows and
// columns beyond the last whole block are dropped (floor). Output order is
// raster over the (IN_H/P) x (IN_W/P) result.
//
// Timing: the block maximum leaves with out_valid one cycle after the
// block's last value. With en low every input is passed on unchanged, also
// with one cycle of latency. clear (or reset) restarts the counters for a new
// map; en must be held for the whole map. Max pooling as the only pooling
// mode follows the design description; the streaming row memory, the bypass
// and the floor rule are this implementation's choices.
module max_pool
  import cnn_pkg::*;
#(
  parameter int IN_W = 28,
  parameter int IN_H = 28,
  parameter int P    = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic en,
  input  logic in_valid,
  input  acc_t in,
  output logic out_valid,
  output acc_t out
);

  localparam int OW = IN_W / P;
  localparam int OH = IN_H / P;
  localparam int BW = (OW > 1) ? $clog2(OW) : 1;

  acc_t          rowmax [OW > 0 ? OW : 1];
  acc_t          hmax;              // running max inside the current block row
  logic [31:0]   col, row;          // position of the incoming value
  logic [31:0]   cp, rp;            // position inside the block
  logic [BW-1:0] blk;               // block column
  logic          in_blk;
  acc_t          h_new, v_new;

  assign in_blk = (col < 32'(OW * P)) && (row < 32'(OH * P));

  always_comb begin
    h_new = (cp == 0) ? in : ((in > hmax) ? in : hmax);
    v_new = (rp == 0) ? h_new : ((h_new > rowmax[blk]) ? h_new : rowmax[blk]);
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_blk) begin
      hmax <= h_new;
      if (cp == 32'(P - 1) && rp != 32'(P - 1)) rowmax[blk] <= v_new;
    end
    out <= en ? v_new : in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0; row <= '0; cp <= '0; rp <= '0; blk <= '0;
      out_valid <= 1'b0;
    end else if (clear) begin
      col <= '0; row <= '0; cp <= '0; rp <= '0; blk <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (!en || (in_blk && cp == 32'(P - 1) && rp == 32'(P - 1)));
      if (in_valid) begin
        if (col == 32'(IN_W - 1)) begin
          col <= '0;
          cp  <= '0;
          blk <= '0;
          row <= row + 1;
          rp  <= (rp == 32'(P - 1)) ? '0 : rp + 1;
        end else begin
          col <= col + 1;
          if (cp == 32'(P - 1)) begin
            cp  <= '0;
            blk <= blk + 1'b1;
          end else begin
            cp <= cp + 1;
          end
        end
      end
    end
  end

endmodule
