// cnn_top_tb -- end-to-end test of the CNN accelerator at its default sizes.
//
// Models the external image memory (one-cycle read), loads a series of 28x28
// test images of different kinds (noise, dark blob on light skin, light blob,
// gradient, constant), runs each through the design and compares every output
// neuron of the fully connected layer, the class and the score with the
// reference model in cnn_ref_pkg, and the two soft-max probabilities with a
// floating-point computation (within 2 LSB). Also checks: the image is read at
// one pixel per cycle in raster order; each pooling layer emits the expected number of pixels;
// the start-to-result latency is the same for every image; a start pulse given
// while busy is ignored. Counts how often saturation, ReLU clipping and each
// class decision happened, and fails if any of them never happened.
module cnn_top_tb;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;

  localparam int IMG_W = 28, IMG_H = 28, K = 5, N1 = 16, N2 = 4, NCLASS = 2;
  localparam int SHIFT1 = 6, SHIFT2 = 8, SHIFT_FC = 6;
  localparam int NIMG = 8;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start = 1'b0;
  logic        busy, img_rd, result_valid, sat_event, relu_event;
  logic [9:0]  img_addr;
  data_t       img_data;
  logic [0:0]  result_class, prob_idx;
  data_t       result_score;
  logic        prob_valid;
  logic [7:0]  prob;

  int checks = 0, failures = 0;
  longint cycle = 0;

  cnn_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // External image memory, read data one cycle after the strobe.
  data_t mem [IMG_W*IMG_H];
  always_ff @(posedge clk) if (img_rd) img_data <= mem[img_addr];

  // Monitors.
  int rd_count, rd_expect_addr, rd_gap_errors, p1_count, p2_count;
  int sat_count = 0, relu_count = 0, ignored_starts = 0;
  int class_count [NCLASS];
  int fc_seen [$], prob_seen [$], prob_idx_seen [$];
  logic rd_prev = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (img_rd) begin
        if (int'(img_addr) != rd_expect_addr) rd_gap_errors++;
        rd_expect_addr++;
        rd_count++;
      end
      if (rd_prev && !img_rd && rd_count != IMG_W*IMG_H) rd_gap_errors++;
      rd_prev <= img_rd;
      if (dut.p1_valid[0]) p1_count++;
      if (dut.p2_valid[0]) p2_count++;
      if (sat_event)  sat_count++;
      if (relu_event) relu_count++;
      if (dut.fc_valid) fc_seen.push_back(int'(dut.fc_data));
      if (prob_valid) begin
        prob_seen.push_back(int'(prob));
        prob_idx_seen.push_back(int'(prob_idx));
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int make_pixel(int kind, int x, int y);
    int dx, dy;
    dx = x - 14;
    dy = y - 13;
    case (kind % 5)
      0: return int'($urandom_range(255, 0));
      1: return (dx*dx + dy*dy < 64) ? 40 + int'($urandom_range(30, 0)) : 200 + int'($urandom_range(40, 0));
      2: return (dx*dx + dy*dy < 36) ? 230 : 60 + int'($urandom_range(20, 0));
      3: return (x * 9 + y * 2) % 256;
      default: return 128;
    endcase
  endfunction

  arr_t img, c1, p1, c2, p2, y;
  longint latency, first_latency;

  initial begin
    foreach (class_count[i]) class_count[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < NIMG; n++) begin
      longint t0;
      int exp_class;
      img = new[IMG_W*IMG_H];
      for (int yy = 0; yy < IMG_H; yy++)
        for (int xx = 0; xx < IMG_W; xx++) begin
          img[yy*IMG_W + xx] = make_pixel(n, xx, yy);
          mem[yy*IMG_W + xx] = data_t'(img[yy*IMG_W + xx]);
        end
      c1 = conv(img, 1, 1, IMG_W, IMG_H, K, N1, SHIFT1);
      p1 = pool(c1, N1, 24, 24);
      c2 = conv(p1, 2, N1, 12, 12, K, N2, SHIFT2);
      p2 = pool(c2, N2, 8, 8);
      y  = fc(p2, N2, 16, NCLASS, SHIFT_FC);
      exp_class = argmax(y);

      rd_count = 0; rd_expect_addr = 0; rd_gap_errors = 0; p1_count = 0; p2_count = 0;
      fc_seen.delete();
      prob_seen.delete();
      prob_idx_seen.delete();
      start <= 1'b1;
      @(posedge clk);
      t0 = cycle;
      start <= 1'b0;
      // A second start while the image is in flight must be ignored.
      repeat (100) @(posedge clk);
      check(busy, "busy while an image is in flight");
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      ignored_starts++;
      while (!result_valid) @(posedge clk);
      latency = cycle - t0;
      if (n == 0) first_latency = latency;
      check(latency == first_latency, $sformatf("image %0d latency %0d, first %0d", n, latency, first_latency));
      check(int'(result_class) == exp_class,
            $sformatf("image %0d class %0d expected %0d", n, result_class, exp_class));
      check(int'(result_score) == y[exp_class],
            $sformatf("image %0d score %0d expected %0d", n, result_score, y[exp_class]));
      class_count[result_class]++;
      @(posedge clk);
      check(fc_seen.size() == NCLASS, $sformatf("image %0d: %0d FC outputs", n, fc_seen.size()));
      for (int k = 0; k < NCLASS && k < fc_seen.size(); k++)
        check(fc_seen[k] == y[k], $sformatf("image %0d neuron %0d = %0d expected %0d", n, k, fc_seen[k], y[k]));
      check(rd_count == IMG_W*IMG_H && rd_gap_errors == 0,
            $sformatf("image %0d: %0d reads, %0d ordering errors (second start not ignored?)", n, rd_count, rd_gap_errors));
      check(p1_count == 12*12, $sformatf("image %0d: pool1 emitted %0d", n, p1_count));
      check(p2_count == 4*4, $sformatf("image %0d: pool2 emitted %0d", n, p2_count));
      for (int w = 0; w < 20 && busy; w++) @(posedge clk);
      check(!busy, "idle after the probabilities");
      @(posedge clk);
      check(prob_seen.size() == NCLASS, $sformatf("image %0d: %0d probabilities", n, prob_seen.size()));
      for (int k = 0; k < NCLASS && k < prob_seen.size(); k++) begin
        real den, pr;
        int e;
        den = 0.0;
        for (int j = 0; j < NCLASS; j++) den += $exp(real'(y[j] - y[exp_class]) / 16.0);
        pr = $exp(real'(y[k] - y[exp_class]) / 16.0) / den * 256.0;
        e  = (pr >= 255.0) ? 255 : int'($floor(pr));
        check(prob_idx_seen[k] == k && prob_seen[k] >= e - 2 && prob_seen[k] <= e + 2,
              $sformatf("image %0d p[%0d] = %0d expected %0d", n, k, prob_seen[k], e));
      end
      $display("image %0d: class %0d score %0d (neurons %0d %0d, probabilities %0d %0d /256), latency %0d cycles",
               n, result_class, result_score, y[0], y[1], prob_seen[0], prob_seen[1], latency);
    end
    $display("events: saturation %0d cycles, relu clipping %0d cycles, ignored starts %0d, class0 %0d, class1 %0d",
             sat_count, relu_count, ignored_starts, class_count[0], class_count[1]);
    check(sat_count > 0, "saturation never happened");
    check(relu_count > 0, "relu clipping never happened");
    check(ignored_starts > 0, "busy start never exercised");
    for (int c = 0; c < NCLASS; c++) check(class_count[c] > 0, $sformatf("class %0d never decided", c));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
