// relu -- rectified linear unit, f(x) = x for x > 0, else 0.
//
// A two-way multiplexer selected by the sign bit of the two's complement input:
// a non-negative word passes through, a negative word is replaced by zero (zero
// itself passes as zero, which is the same result). Purely combinational; the
// register in front of it belongs to the adder tree of the convolution layer.
//
// Interface: din, dout are DATA_W-bit signed words; clipped flags a negative input.
module relu
  import cnn_pkg::*;
#(
  parameter int W = DATA_W
) (
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout,
  output logic                clipped
);
  always_comb begin
    clipped = din[W-1];
    dout    = clipped ? '0 : din;
  end
endmodule
