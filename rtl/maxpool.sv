// maxpool -- streaming 2 x 2 max pooling, stride 2, of one feature map.
//
// Takes a W x H map as a raster stream (one pixel per in_valid cycle, gaps
// allowed) and produces the (W/2) x (H/2) map of the maxima of non-overlapping
// 2 x 2 blocks, in raster order. A small control state machine counts row and
// column. On an even column the pixel is held in max_1a; on the following odd
// column a comparator keeps the larger of max_1a and the new pixel (max_1b). On
// an even row max_1b is stored in a row buffer of W/2 words; on an odd row it is
// compared with the stored maximum of the row above (max_2) and the result is the
// output pixel. A trailing odd row or column is dropped.
//
// Timing: dout_valid is high for one cycle, the cycle after the pixel that
// completes a 2 x 2 block (bottom-right corner). Counters wrap after H x W pixels.
// Synchronous, active-low reset.
module maxpool
  import cnn_pkg::*;
#(
  parameter int W = 24,
  parameter int H = 24
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t din,
  output logic  dout_valid,
  output data_t dout
);
  localparam int WO = W / 2;

  data_t                 rowbuf [WO];
  data_t                 max_1a, max_1b, max_2;
  logic [$clog2(H)-1:0]  row;
  logic [$clog2(W)-1:0]  col;
  logic                  in_block;  // pixel lies inside a complete 2 x 2 block

  always_comb begin
    in_block = (int'(col) < 2 * WO) && (int'(row) < 2 * (H / 2));
    max_1b   = (din > max_1a) ? din : max_1a;
    max_2    = (max_1b > rowbuf[col[$clog2(W)-1:1]]) ? max_1b : rowbuf[col[$clog2(W)-1:1]];
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_block && col[0]) begin
      if (!row[0]) rowbuf[col[$clog2(W)-1:1]] <= max_1b;
    end
    if (in_valid && !col[0]) max_1a <= din;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row        <= '0;
      col        <= '0;
      dout_valid <= 1'b0;
      dout       <= '0;
    end else begin
      dout_valid <= in_valid && in_block && col[0] && row[0];
      if (in_valid && in_block && col[0] && row[0]) dout <= max_2;
      if (in_valid) begin
        if (int'(col) == W - 1) begin
          col <= '0;
          row <= (int'(row) == H - 1) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end
endmodule
