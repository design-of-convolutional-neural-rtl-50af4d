// adder_tree -- sums the partial convolutions of all input maps and the bias.
//
// One output feature map of a convolution layer is the sum, over the M input
// maps, of the K x K convolution of each input map with its own kernel, plus the
// bias of that output map. This block adds the M partial sums and the bias in a
// balanced binary tree of adders (depth ceil(log2(M+1))), combinational, and
// registers the total when ce is high: one cycle of latency, one result per cycle.
//
// Interface: din[m] partial sums (IN_W bits, signed), bias (BIAS_W bits, signed,
// in the same units), dout (OUT_W bits, signed). Synchronous, active-low reset.
module adder_tree
  import cnn_pkg::*;
#(
  parameter int M     = 16,
  parameter int IN_W  = acc_width(25),
  parameter int OUT_W = IN_W + $clog2(M + 1) + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  logic signed [IN_W-1:0]  din [M],
  input  bias_t                   bias,
  output logic signed [OUT_W-1:0] dout
);
  // Leaves: the M inputs followed by the bias, padded with zeros to a power of two.
  localparam int LEAVES = 1 << $clog2(M + 1);

  logic signed [OUT_W-1:0] node [2*LEAVES];

  always_comb begin
    for (int i = 0; i < LEAVES; i++) begin
      if (i < M)       node[LEAVES+i] = OUT_W'(din[i]);
      else if (i == M) node[LEAVES+i] = OUT_W'(bias);
      else             node[LEAVES+i] = '0;
    end
    for (int i = LEAVES - 1; i >= 1; i--) node[i] = node[2*i] + node[2*i+1];
    node[0] = '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  dout <= '0;
    else if (ce) dout <= node[1];
  end
endmodule
