// cnn_ref_pkg -- reference model of the CNN layers for the testbenches.
//
// Plain integer arithmetic on flat arrays: a map set of C maps of W x H pixels
// is stored as a[c*W*H + y*W + x]. Only the weight and bias values are taken from
// cnn_pkg (they are the ROM contents); shifting, saturation, ReLU, pooling and the
// sums are computed here independently of the RTL.
package cnn_ref_pkg;
  import cnn_pkg::conv_weight, cnn_pkg::conv_bias, cnn_pkg::fc_weight, cnn_pkg::fc_bias;

  typedef int arr_t[];

  // Shift right (floor) and clamp to the 9-bit range [-256, 255].
  function automatic int shift_sat(longint v, int sh);
    longint q;
    q = v / (longint'(1) << sh);
    if (q * (longint'(1) << sh) > v) q = q - 1;   // floor for negative values
    if (q > 255)  return 255;
    if (q < -256) return -256;
    return int'(q);
  endfunction

  function automatic bit clips(longint v, int sh);
    longint q;
    q = v / (longint'(1) << sh);
    if (q * (longint'(1) << sh) > v) q = q - 1;
    return (q > 255) || (q < -256);
  endfunction

  function automatic int relu(int v);
    return (v > 0) ? v : 0;
  endfunction

  // Pre-activation sum of output map n at output pixel (x, y).
  function automatic longint conv_sum(const ref arr_t in, input int layer, int M, int W, int H,
                                      int K, int n, int x, int y);
    longint s;
    s = longint'(conv_bias(layer, n));
    for (int m = 0; m < M; m++)
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++)
          s += longint'(in[m*W*H + (y+i)*W + (x+j)]) * longint'(conv_weight(layer, n, m, i, j));
    return s;
  endfunction

  function automatic arr_t conv(const ref arr_t in, input int layer, int M, int W, int H, int K,
                                int N, int sh);
    arr_t o;
    int wo, ho;
    wo = W - K + 1;
    ho = H - K + 1;
    o = new[N * wo * ho];
    for (int n = 0; n < N; n++)
      for (int y = 0; y < ho; y++)
        for (int x = 0; x < wo; x++)
          o[n*wo*ho + y*wo + x] = relu(shift_sat(conv_sum(in, layer, M, W, H, K, n, x, y), sh));
    return o;
  endfunction

  function automatic arr_t pool(const ref arr_t in, input int C, int W, int H);
    arr_t o;
    int wo, ho;
    wo = W / 2;
    ho = H / 2;
    o = new[C * wo * ho];
    for (int c = 0; c < C; c++)
      for (int y = 0; y < ho; y++)
        for (int x = 0; x < wo; x++) begin
          int b;
          b = in[c*W*H + 2*y*W + 2*x];
          if (in[c*W*H + 2*y*W + 2*x + 1] > b)     b = in[c*W*H + 2*y*W + 2*x + 1];
          if (in[c*W*H + (2*y+1)*W + 2*x] > b)     b = in[c*W*H + (2*y+1)*W + 2*x];
          if (in[c*W*H + (2*y+1)*W + 2*x + 1] > b) b = in[c*W*H + (2*y+1)*W + 2*x + 1];
          o[c*wo*ho + y*wo + x] = b;
        end
    return o;
  endfunction

  function automatic longint fc_sum(const ref arr_t in, input int NMAPS, int NPIX, int k);
    longint s;
    s = longint'(fc_bias(k));
    for (int m = 0; m < NMAPS; m++)
      for (int a = 0; a < NPIX; a++)
        s += longint'(in[m*NPIX + a]) * longint'(fc_weight(k, m, a));
    return s;
  endfunction

  function automatic arr_t fc(const ref arr_t in, input int NMAPS, int NPIX, int NOUT, int sh);
    arr_t o;
    o = new[NOUT];
    for (int k = 0; k < NOUT; k++) o[k] = relu(shift_sat(fc_sum(in, NMAPS, NPIX, k), sh));
    return o;
  endfunction

  // Index of the largest value; the lowest index wins a tie.
  function automatic int argmax(const ref arr_t v);
    int b;
    b = 0;
    for (int i = 1; i < v.size(); i++) if (v[i] > v[b]) b = i;
    return b;
  endfunction
endpackage
