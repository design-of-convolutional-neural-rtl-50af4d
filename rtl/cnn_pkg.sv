// cnn_pkg -- types, sizes and fixed-point helpers shared by the CNN accelerator.
//
// Data between layers is 9-bit two's complement (pixels of the input image are
// 9 bits; the layers pass 9-bit maps). Kernel and fully connected weights are
// 5-bit two's complement. Sums are kept at full width and brought back to 9 bits
// by an arithmetic right shift followed by saturation (requant).
//
// The learned parameters of the network are not part of the hardware
// description, so the ROM contents are produced by the functions below: a small
// integer hash of the (layer, output, input, row, column) coordinates mapped
// onto the 5-bit weight range. Replace conv_weight, conv_bias, fc_weight and
// fc_bias with trained values to run a real network; nothing else changes.
package cnn_pkg;

  localparam int DATA_W = 9;   // pixel / feature-map word
  localparam int WGT_W  = 5;   // kernel and FC weight word
  localparam int BIAS_W = 12;  // bias word, in accumulator units

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [WGT_W-1:0]  wgt_t;
  typedef logic signed [BIAS_W-1:0] bias_t;

  // Bits needed to hold the sum of n products of a data word and a weight.
  function automatic int acc_width(input int n);
    return DATA_W + WGT_W + $clog2(n + 1) + 1;
  endfunction

  // Arithmetic right shift by sh, then saturate to a DATA_W-bit signed word.
  function automatic data_t requant(input longint acc, input int sh);
    longint s;
    s = acc >>> sh;
    if (s > longint'(2 ** (DATA_W - 1) - 1)) return data_t'(2 ** (DATA_W - 1) - 1);
    if (s < -longint'(2 ** (DATA_W - 1)))    return data_t'(-(2 ** (DATA_W - 1)));
    return data_t'(s);
  endfunction

  // True when requant(acc, sh) clips.
  function automatic bit saturates(input longint acc, input int sh);
    longint s;
    s = acc >>> sh;
    return (s > longint'(2 ** (DATA_W - 1) - 1)) || (s < -longint'(2 ** (DATA_W - 1)));
  endfunction

  // Integer hash used to fill the ROMs.
  function automatic int unsigned mix(input int unsigned a);
    int unsigned x;
    x = a * 32'h9E3779B1;
    x = x ^ (x >> 15);
    x = x * 32'h85EBCA77;
    x = x ^ (x >> 13);
    return x;
  endfunction

  // Kernel ROM content: weight of output map n, input map m, row i, column j.
  function automatic wgt_t conv_weight(input int layer, input int n, input int m,
                                       input int i, input int j);
    int unsigned h;
    h = mix(32'(layer * 1000003 + n * 7919 + m * 211 + i * 17 + j + 1));
    return wgt_t'(int'(h % 31) - 15);
  endfunction

  // Bias of output map n, in accumulator units.
  function automatic bias_t conv_bias(input int layer, input int n);
    int unsigned h;
    h = mix(32'(layer * 7777 + n * 131 + 5));
    return bias_t'(int'(h % 401) - 200);
  endfunction

  // FC weight ROM content: weight of output neuron k, feature map m, element a.
  // Neurons come in pairs (2i, 2i+1) with opposite weights and biases, so that
  // in the two-class network the two scores are the two signs of one sum.
  function automatic wgt_t fc_weight(input int k, input int m, input int a);
    int unsigned h;
    int v;
    h = mix(32'(9000001 + (k / 2) * 4099 + m * 257 + a));
    v = int'(h % 31) - 15;
    return wgt_t'((k % 2 == 1) ? -v : v);
  endfunction

  function automatic bias_t fc_bias(input int k);
    int unsigned h;
    int v;
    h = mix(32'(424243 + (k / 2) * 31));
    v = int'(h % 401) - 200;
    return bias_t'((k % 2 == 1) ? -v : v);
  endfunction

endpackage
