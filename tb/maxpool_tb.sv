// maxpool_tb -- two 24x24 frames of random signed pixels with random gaps through
// the 2x2 max pool. Each output is compared with the maximum of its block, must
// arrive in raster order one cycle after the block's bottom-right pixel, and each
// frame must give exactly 12x12 outputs.
module maxpool_tb;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  localparam int W = 24, H = 24, FRAMES = 2;

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  data_t din = '0, dout;
  logic  dout_valid;
  int checks = 0, failures = 0;

  maxpool #(.W(W), .H(H)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { int due; int f; int idx; } exp_t;
  exp_t q [$];
  int step = 0, nout = 0;
  arr_t img [FRAMES];
  arr_t ref_out [FRAMES];

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
      check(dout_valid && int'(dout) == ref_out[e.f][e.idx],
            $sformatf("f%0d out %0d: valid %0b value %0d expected %0d", e.f, e.idx, dout_valid, dout,
                      ref_out[e.f][e.idx]));
      nout++;
    end else begin
      check(!dout_valid, $sformatf("unexpected output at step %0d", step));
    end
  endtask

  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      img[f] = new[W*H];
      foreach (img[f][i]) img[f][i] = int'($urandom_range(511, 0)) - 256;
      ref_out[f] = pool(img[f], 1, W, H);
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          while ($urandom_range(3, 0) == 0) begin
            in_valid = 1'b0;
            din = data_t'($urandom);
            tick();
          end
          in_valid = 1'b1;
          din = data_t'(img[f][y*W + x]);
          if (y % 2 == 1 && x % 2 == 1) q.push_back('{step + 1, f, (y / 2) * (W / 2) + x / 2});
          tick();
        end
    in_valid = 1'b0;
    repeat (3) tick();
    check(nout == FRAMES * (W / 2) * (H / 2), $sformatf("%0d outputs", nout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
