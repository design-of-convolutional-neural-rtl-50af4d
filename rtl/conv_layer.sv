// conv_layer -- streaming convolution layer followed by ReLU.
//
// Computes G[n][x][y] = ReLU( requant( sum_m sum_i sum_j C[m][x+i][y+j]*Kn,m[i][j]
// + b[n] ) ) for N output maps from M input maps of W x H pixels with a K x K
// kernel, stride 1 and no padding, so the output maps are (W-K+1) x (H-K+1).
//
// The M input maps arrive in parallel as raster streams, one pixel of every map
// per in_valid cycle. Each input map has its own line_window (the input buffer);
// for every pair (output map n, input map m) a conv2d_pe array multiplies that
// window by the kernel Kn,m, and for every output map an adder_tree sums the M
// partial results and the bias. The sum is shifted right by SHIFT, saturated to
// 9 bits (requant) and passed through relu. The kernel ROM is constant: its words
// come from cnn_pkg::conv_weight/conv_bias for layer LAYER.
//
// Timing: out_valid follows the in_valid of the pixel that completes a window by
// three cycles (window register, PE array register, adder tree register); one
// output pixel of every output map per cycle at most. Outputs appear in raster
// order of the output map. sat_evt/relu_evt flag, per output map, that the value
// presented with out_valid was clipped by saturation or by the ReLU.
module conv_layer
  import cnn_pkg::*;
#(
  parameter int LAYER = 1,
  parameter int W     = 28,
  parameter int H     = 28,
  parameter int K     = 5,
  parameter int M     = 1,
  parameter int N     = 16,
  parameter int SHIFT = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  data_t         in_pix   [M],
  output logic          out_valid,
  output data_t         out_pix  [N],
  output logic [N-1:0]  sat_evt,
  output logic [N-1:0]  relu_evt
);
  localparam int PW = acc_width(K * K);              // width of one PE array sum
  localparam int SW = PW + $clog2(M + 1) + 1;        // width of the adder tree sum

  data_t                win [M][K][K];
  logic  [M-1:0]        win_valid;
  wgt_t                 kern [N][M][K][K];
  logic signed [PW-1:0] part [N][M];
  logic signed [SW-1:0] sum  [N];
  logic                 pe_valid;

  for (genvar m = 0; m < M; m++) begin : input_map_gen
    line_window #(.W(W), .H(H), .K(K)) u_win (
      .clk, .rst_n, .in_valid, .in_pix(in_pix[m]),
      .win(win[m]), .win_valid(win_valid[m])
    );
  end

  for (genvar n = 0; n < N; n++) begin : output_map_gen
    for (genvar m = 0; m < M; m++) begin : pe_gen
      for (genvar i = 0; i < K; i++) begin : krow
        for (genvar j = 0; j < K; j++) begin : kcol
          assign kern[n][m][i][j] = conv_weight(LAYER, n, m, i, j);
        end
      end
      conv2d_pe #(.K(K), .ACC_W(PW)) u_pe (
        .clk, .rst_n, .ce(win_valid[0]), .win(win[m]), .kern(kern[n][m]),
        .dout(part[n][m])
      );
    end

    adder_tree #(.M(M), .IN_W(PW), .OUT_W(SW)) u_tree (
      .clk, .rst_n, .ce(pe_valid), .din(part[n]), .bias(conv_bias(LAYER, n)),
      .dout(sum[n])
    );

    data_t q;
    always_comb q = requant(longint'(sum[n]), SHIFT);

    relu u_relu (.din(q), .dout(out_pix[n]), .clipped(relu_evt[n]));
    assign sat_evt[n] = saturates(longint'(sum[n]), SHIFT);
  end

  // All input maps share one stream timing, so their windows complete together.
  assert property (@(posedge clk) disable iff (!rst_n) (win_valid == '0) || (win_valid == '1))
    else $error("conv_layer: input maps out of step");

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pe_valid  <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      pe_valid  <= win_valid[0];
      out_valid <= pe_valid;
    end
  end
endmodule
