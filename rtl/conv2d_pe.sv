// conv2d_pe -- K x K array of multiply-add processing elements.
//
// Computes the dot product of one K x K window of an input feature map with one
// K x K kernel. The PEs are arranged as in a row-chained array: in each row every
// PE multiplies a window pixel by its kernel weight and adds the product to the
// partial sum arriving from its left neighbour; the last PE of a row hands its
// sum to the first PE of the next row, and the last PE of the last row gives the
// result. The chain is combinational and the result is registered (one cycle of
// latency), so a new window can be accepted every clock.
//
// Interface: win[r][c] is the window (row 0 the oldest row, column K-1 the newest
// pixel), kern[r][c] the kernel with the same indexing, ce enables the output
// register, dout the ACC_W-bit signed sum. Synchronous, active-low reset.
module conv2d_pe
  import cnn_pkg::*;
#(
  parameter int K     = 5,
  parameter int ACC_W = acc_width(K * K)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  data_t                   win  [K][K],
  input  wgt_t                    kern [K][K],
  output logic signed [ACC_W-1:0] dout
);
  // chain carries the partial sum from PE to PE: along a row, then on to the
  // first PE of the next row.
  logic signed [ACC_W-1:0] chain;

  always_comb begin
    chain = '0;
    for (int r = 0; r < K; r++) begin
      for (int c = 0; c < K; c++) begin
        logic signed [ACC_W-1:0] prod;
        prod  = win[r][c] * kern[r][c];
        chain = chain + prod;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  dout <= '0;
    else if (ce) dout <= chain;
  end
endmodule
