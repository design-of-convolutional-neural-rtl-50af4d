// line_window -- input buffer of a convolution layer: line buffer plus K x K window.
//
// Takes one feature map as a raster stream (row by row, one pixel per cycle when
// in_valid is high, pixels may have gaps between them) and presents, after each
// pixel, the K x K neighbourhood whose bottom-right corner is that pixel. The
// previous K-1 rows are kept in K-1 line memories of W words, addressed by the
// column; the window itself is a K x K register array shifted left by one column
// per pixel, the new column being {K-1 stored pixels, new pixel}. Only the width
// W of the map changes the size of the buffer, which is what distinguishes the
// two convolution layers.
//
// Interface: in_valid/in_pix the stream; win is the window (row 0 the oldest row,
// column K-1 the newest pixel); win_valid is high for one cycle when win holds a
// complete window lying inside the map (row >= K-1 and column >= K-1), which is
// the cycle after the pixel that completes it. After H x W pixels
// the position counters wrap, so frames may follow back to back. Synchronous,
// active-low reset clears the counters.
module line_window
  import cnn_pkg::*;
#(
  parameter int W = 28,
  parameter int H = 28,
  parameter int K = 5
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  data_t                 in_pix,
  output data_t                 win [K][K],
  output logic                  win_valid
);
  // lines[0] holds the previous row, lines[K-2] the oldest one.
  data_t lines [K-1][W];
  logic [$clog2(H)-1:0] row;
  logic [$clog2(W)-1:0] col;
  data_t                new_col [K];

  always_comb begin
    for (int r = 0; r < K - 1; r++) new_col[r] = lines[K-2-r][col];
    new_col[K-1] = in_pix;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lines[0][col] <= in_pix;
      for (int r = 1; r < K - 1; r++) lines[r][col] <= lines[r-1][col];
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K - 1; c++) win[r][c] <= win[r][c+1];
        win[r][K-1] <= new_col[r];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row       <= '0;
      col       <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= in_valid && (int'(row) >= K - 1) && (int'(col) >= K - 1);
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
