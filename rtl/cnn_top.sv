// cnn_top -- streaming CNN accelerator for two-class image classification.
//
// The network is input 28x28 -> CONV1 5x5 + ReLU (16 maps, 24x24) -> 2x2 max
// pool (12x12) -> CONV2 5x5 + ReLU (4 maps, 8x8) -> 2x2 max pool (4x4) -> fully
// connected layer + ReLU (2 neurons) -> soft-max (class number and probabilities).
// All layers are hardware stages working concurrently on a pixel stream: the
// image_loader reads the image from an external memory one pixel per cycle,
// every convolution and pooling stage consumes and produces raster streams with
// valid strobes, all maps of a layer are processed in parallel, and the fully
// connected layer buffers the last maps in RAMs and evaluates its neurons one by
// one. Data are 9-bit two's complement words, weights 5-bit two's complement.
//
// Interface: start (pulse, accepted when busy is low) begins one image; img_rd /
// img_addr / img_data are the read port of the external image memory (data one
// cycle after the strobe); result_valid pulses when result_class and
// result_score (the winning neuron's value) are ready; then prob_valid pulses once
// per class with its soft-max probability prob (Q0.8, 255 = 1.0) and number
// prob_idx; busy is high from start to the last probability. Event outputs (per
// cycle) expose saturation and ReLU clipping for observation. Synchronous,
// active-low reset.
module cnn_top
  import cnn_pkg::*;
#(
  parameter int IMG_W    = 28,
  parameter int IMG_H    = 28,
  parameter int K        = 5,
  parameter int N1       = 16,
  parameter int N2       = 4,
  parameter int NCLASS   = 2,
  parameter int SHIFT1   = 6,
  parameter int SHIFT2   = 8,
  parameter int SHIFT_FC = 6,
  parameter int AW       = $clog2(IMG_W * IMG_H),
  parameter int CW       = (NCLASS > 1) ? $clog2(NCLASS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          img_rd,
  output logic [AW-1:0] img_addr,
  input  data_t         img_data,
  output logic          result_valid,
  output logic [CW-1:0] result_class,
  output data_t         result_score,
  output logic          prob_valid,
  output logic [CW-1:0] prob_idx,
  output logic [7:0]    prob,
  output logic          sat_event,
  output logic          relu_event
);
  // Map sizes along the pipeline.
  localparam int C1_W = IMG_W - K + 1, C1_H = IMG_H - K + 1;
  localparam int P1_W = C1_W / 2,      P1_H = C1_H / 2;
  localparam int C2_W = P1_W - K + 1,  C2_H = P1_H - K + 1;
  localparam int P2_W = C2_W / 2,      P2_H = C2_H / 2;

  logic             ld_busy;
  logic             pix_valid;
  data_t            pix [1];
  logic             c1_valid, c2_valid;
  data_t            c1_pix [N1];
  data_t            c2_pix [N2];
  logic [N1-1:0]    c1_sat, c1_relu, p1_valid;
  logic [N2-1:0]    c2_sat, c2_relu, p2_valid;
  data_t            p1_pix [N1];
  data_t            p2_pix [N2];
  logic             fc_busy, fc_valid, fc_sat, fc_relu;
  logic [CW-1:0]    fc_idx;
  data_t            fc_data;
  logic             in_flight;
  logic             cls_busy;

  image_loader #(.W(IMG_W), .H(IMG_H), .RD_LAT(1), .AW(AW)) u_loader (
    .clk, .rst_n, .start(start && !busy), .busy(ld_busy),
    .mem_rd(img_rd), .mem_addr(img_addr), .mem_data(img_data),
    .pix_valid, .pix(pix[0])
  );

  conv_layer #(.LAYER(1), .W(IMG_W), .H(IMG_H), .K(K), .M(1), .N(N1), .SHIFT(SHIFT1)) u_conv1 (
    .clk, .rst_n, .in_valid(pix_valid), .in_pix(pix),
    .out_valid(c1_valid), .out_pix(c1_pix), .sat_evt(c1_sat), .relu_evt(c1_relu)
  );

  for (genvar n = 0; n < N1; n++) begin : pool1_gen
    maxpool #(.W(C1_W), .H(C1_H)) u_pool (
      .clk, .rst_n, .in_valid(c1_valid), .din(c1_pix[n]),
      .dout_valid(p1_valid[n]), .dout(p1_pix[n])
    );
  end

  conv_layer #(.LAYER(2), .W(P1_W), .H(P1_H), .K(K), .M(N1), .N(N2), .SHIFT(SHIFT2)) u_conv2 (
    .clk, .rst_n, .in_valid(p1_valid[0]), .in_pix(p1_pix),
    .out_valid(c2_valid), .out_pix(c2_pix), .sat_evt(c2_sat), .relu_evt(c2_relu)
  );

  for (genvar n = 0; n < N2; n++) begin : pool2_gen
    maxpool #(.W(C2_W), .H(C2_H)) u_pool (
      .clk, .rst_n, .in_valid(c2_valid), .din(c2_pix[n]),
      .dout_valid(p2_valid[n]), .dout(p2_pix[n])
    );
  end

  fc_layer #(.NMAPS(N2), .NPIX(P2_W * P2_H), .NOUT(NCLASS), .SHIFT(SHIFT_FC)) u_fc (
    .clk, .rst_n, .in_valid(p2_valid[0]), .in_pix(p2_pix), .busy(fc_busy),
    .out_valid(fc_valid), .out_idx(fc_idx), .out_data(fc_data),
    .sat_evt(fc_sat), .relu_evt(fc_relu)
  );

  classifier #(.NCLASS(NCLASS), .IW(CW)) u_cls (
    .clk, .rst_n, .in_valid(fc_valid), .in_idx(fc_idx), .in_data(fc_data),
    .out_valid(result_valid), .out_class(result_class), .out_score(result_score),
    .busy(cls_busy), .prob_valid, .prob_idx, .prob
  );

  // The parallel pooling units of a layer run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n) (p1_valid == '0) || (p1_valid == '1))
    else $error("cnn_top: pool1 units out of step");
  assert property (@(posedge clk) disable iff (!rst_n) (p2_valid == '0) || (p2_valid == '1))
    else $error("cnn_top: pool2 units out of step");

  // One image at a time: busy from the accepted start until its result.
  always_ff @(posedge clk) begin
    if (!rst_n)            in_flight <= 1'b0;
    else if (start)        in_flight <= 1'b1;
    else if (result_valid) in_flight <= 1'b0;
  end

  assign busy       = in_flight || ld_busy || fc_busy || cls_busy;
  assign sat_event  = (c1_valid && |c1_sat) || (c2_valid && |c2_sat) || fc_sat;
  assign relu_event = (c1_valid && |c1_relu) || (c2_valid && |c2_relu) || fc_relu;
endmodule
