// conv_layer_tb -- a 5x5 convolution layer with 2 input maps and 3 output maps
// on 9x8 frames. Random pixels (positive and negative) stream in with random
// gaps for two frames; every output pixel of every output map is compared with
// the reference model (sum, bias, shift, saturation, ReLU), must arrive in raster
// order exactly three cycles after the pixel that completes its window, and must
// carry the right saturation and ReLU flags. A third frame of large pixels forces
// saturation; the test fails if saturation or clipping was never seen.
module conv_layer_tb;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  localparam int LAYER = 2, W = 9, H = 8, K = 5, M = 2, N = 3, SHIFT = 4, FRAMES = 3;
  localparam int WO = W - K + 1, HO = H - K + 1;
  localparam int LAT = 3;

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  data_t in_pix [M];
  logic  out_valid;
  data_t out_pix [N];
  logic [N-1:0] sat_evt, relu_evt;
  int checks = 0, failures = 0;

  conv_layer #(.LAYER(LAYER), .W(W), .H(H), .K(K), .M(M), .N(N), .SHIFT(SHIFT)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { int due; int f; int x; int y; } exp_t;
  exp_t q [$];
  int step = 0, nsat = 0, nrelu = 0, nout = 0;
  arr_t img [FRAMES];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick();
    @(negedge clk);
    step++;
    if (q.size() > 0 && q[0].due == step) begin
      exp_t e;
      e = q.pop_front();
      check(out_valid, $sformatf("no output for frame %0d (%0d,%0d) at its cycle", e.f, e.x, e.y));
      if (out_valid) begin
        nout++;
        for (int n = 0; n < N; n++) begin
          longint s;
          int v;
          s = conv_sum(img[e.f], LAYER, M, W, H, K, n, e.x, e.y);
          v = relu(shift_sat(s, SHIFT));
          check(int'(out_pix[n]) == v, $sformatf("f%0d map %0d (%0d,%0d) = %0d expected %0d",
                                                 e.f, n, e.x, e.y, out_pix[n], v));
          check(sat_evt[n] == clips(s, SHIFT), "saturation flag");
          check(relu_evt[n] == (shift_sat(s, SHIFT) < 0), "relu flag");
          if (sat_evt[n]) nsat++;
          if (relu_evt[n]) nrelu++;
        end
      end
    end else begin
      check(!out_valid, $sformatf("unexpected output at step %0d", step));
    end
  endtask

  initial begin
    foreach (in_pix[m]) in_pix[m] = '0;
    for (int f = 0; f < FRAMES; f++) begin
      img[f] = new[M*W*H];
      foreach (img[f][i]) img[f][i] = (f == FRAMES - 1) ? 255 : int'($urandom_range(511, 0)) - 256;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          while ($urandom_range(3, 0) == 0) begin
            in_valid = 1'b0;
            tick();
          end
          in_valid = 1'b1;
          for (int m = 0; m < M; m++) in_pix[m] = data_t'(img[f][m*W*H + y*W + x]);
          if (y >= K - 1 && x >= K - 1) q.push_back('{step + LAT, f, x - K + 1, y - K + 1});
          tick();
        end
    in_valid = 1'b0;
    repeat (LAT + 2) tick();
    check(nout == FRAMES * WO * HO, $sformatf("%0d outputs", nout));
    check(nsat > 0, "saturation never happened");
    check(nrelu > 0, "relu clipping never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
