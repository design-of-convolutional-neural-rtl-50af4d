// ph2_batch_tb -- batch run shaped like the PH2 dermoscopy set: 200 images, of
// which 80 resemble common nevi, 80 atypical nevi and 40 melanomas, already
// scaled to the 28x28 grey-level input. The images are synthetic (a lesion drawn
// on lighter skin: small, round and even for a common nevus; larger with a ragged
// border for an atypical one; large, ragged and mottled for a melanoma), since no
// image data is bundled. Each image is started as soon as the accelerator is
// free; every class and score is compared with the reference model, each image
// must give one probability per class, and the start-to-start time per image is
// reported and must be the same for all images. The class counts show what the
// placeholder weights make of the batch; they say nothing about accuracy.
module ph2_batch_tb;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;

  localparam int IMG_W = 28, IMG_H = 28, K = 5, N1 = 16, N2 = 4, NCLASS = 2;
  localparam int SHIFT1 = 6, SHIFT2 = 8, SHIFT_FC = 6;
  localparam int N_COMMON = 80, N_ATYPICAL = 80, N_MELANOMA = 40;
  localparam int NIMG = N_COMMON + N_ATYPICAL + N_MELANOMA;

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
  int          nprob = 0;

  int checks = 0, failures = 0;
  longint cycle = 0;

  cnn_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (prob_valid) nprob++;

  data_t mem [IMG_W*IMG_H];
  always_ff @(posedge clk) if (img_rd) img_data <= mem[img_addr];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // kind 0: common nevus, 1: atypical nevus, 2: melanoma.
  function automatic int lesion_pixel(int kind, int x, int y, int cx, int cy, int r0);
    int dx, dy, d2, r, v;
    dx = x - cx;
    dy = y - cy;
    d2 = dx * dx + dy * dy;
    r  = r0;
    if (kind > 0) r = r0 + int'($urandom_range(3, 0)) - 1;        // ragged border
    v  = 190 + int'($urandom_range(30, 0));                        // skin
    if (d2 < r * r) begin
      case (kind)
        0: v = 100 + int'($urandom_range(10, 0));
        1: v = 80 + int'($urandom_range(50, 0));
        default: v = 20 + int'($urandom_range(110, 0));           // mottled
      endcase
    end
    return v;
  endfunction

  arr_t img, c1, p1, c2, p2, y;
  int class_count [3][NCLASS];

  initial begin
    longint t_prev, period, first_period;
    foreach (class_count[i, j]) class_count[i][j] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    t_prev = 0;
    first_period = 0;
    for (int n = 0; n < NIMG; n++) begin
      int kind, cx, cy, r0, exp_class;
      kind = (n < N_COMMON) ? 0 : (n < N_COMMON + N_ATYPICAL) ? 1 : 2;
      cx = 12 + int'($urandom_range(4, 0));
      cy = 12 + int'($urandom_range(4, 0));
      r0 = (kind == 0) ? 5 + int'($urandom_range(2, 0)) : 8 + int'($urandom_range(3, 0));
      img = new[IMG_W*IMG_H];
      for (int yy = 0; yy < IMG_H; yy++)
        for (int xx = 0; xx < IMG_W; xx++) begin
          img[yy*IMG_W + xx] = lesion_pixel(kind, xx, yy, cx, cy, r0);
          mem[yy*IMG_W + xx] = data_t'(img[yy*IMG_W + xx]);
        end
      c1 = conv(img, 1, 1, IMG_W, IMG_H, K, N1, SHIFT1);
      p1 = pool(c1, N1, 24, 24);
      c2 = conv(p1, 2, N1, 12, 12, K, N2, SHIFT2);
      p2 = pool(c2, N2, 8, 8);
      y  = fc(p2, N2, 16, NCLASS, SHIFT_FC);
      exp_class = argmax(y);

      // Start as soon as the accelerator is free.
      while (busy) @(posedge clk);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      if (n > 0) begin
        period = cycle - t_prev;
        if (n == 1) first_period = period;
        check(period == first_period, $sformatf("image %0d: %0d cycles since the previous start", n, period));
      end
      t_prev = cycle;
      while (!result_valid) @(posedge clk);
      check(int'(result_class) == exp_class && int'(result_score) == y[exp_class],
            $sformatf("image %0d: class %0d score %0d, expected %0d / %0d", n, result_class, result_score,
                      exp_class, y[exp_class]));
      class_count[kind][result_class]++;
      @(posedge clk);
    end
    // let the last image's probabilities come out
    while (busy) @(posedge clk);
    @(posedge clk);
    check(nprob == NCLASS * NIMG, $sformatf("%0d probabilities for %0d images", nprob, NIMG));
    $display("cycles from one start to the next: %0d", first_period);
    $display("common nevi: class0 %0d class1 %0d", class_count[0][0], class_count[0][1]);
    $display("atypical nevi: class0 %0d class1 %0d", class_count[1][0], class_count[1][1]);
    $display("melanomas: class0 %0d class1 %0d", class_count[2][0], class_count[2][1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
