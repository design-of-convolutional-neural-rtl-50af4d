// line_window_tb -- streams three 7x6 frames with random gaps through a 3x3
// window buffer and, at every win_valid, compares the window with the pixels of
// the frame at the expected position. Also checks that win_valid comes exactly
// once per in-map window position, one cycle after the completing pixel.
module line_window_tb;
  import cnn_pkg::*;
  localparam int W = 7, H = 6, K = 3, FRAMES = 3;

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  data_t in_pix = '0;
  data_t win [K][K];
  logic  win_valid;
  int checks = 0, failures = 0;

  line_window #(.W(W), .H(H), .K(K)) dut (.*);
  always #5 clk = ~clk;

  int img [FRAMES][H][W];
  int exp_r, exp_c, exp_f;
  bit pending = 1'b0;
  int nvalid = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Compare the outputs produced by the previous clock edge.
  task automatic check_outputs();
    check(win_valid == pending, $sformatf("win_valid %0b expected %0b", win_valid, pending));
    if (win_valid && pending) begin
      nvalid++;
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K; j++)
          check(int'(win[i][j]) == img[exp_f][exp_r-K+1+i][exp_c-K+1+j],
                $sformatf("frame %0d (%0d,%0d) win[%0d][%0d]=%0d", exp_f, exp_r, exp_c, i, j, win[i][j]));
    end
  endtask

  initial begin
    foreach (img[f, r, c]) img[f][r][c] = int'($urandom_range(511, 0)) - 256;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          // random idle cycles between pixels
          while ($urandom_range(2, 0) == 0) begin
            in_valid = 1'b0;
            in_pix   = data_t'($urandom);
            pending  = 1'b0;
            @(negedge clk);
            check_outputs();
          end
          in_valid = 1'b1;
          in_pix   = data_t'(img[f][r][c]);
          pending  = (r >= K - 1) && (c >= K - 1);
          exp_f = f; exp_r = r; exp_c = c;
          @(negedge clk);
          check_outputs();
        end
    in_valid = 1'b0;
    pending  = 1'b0;
    @(negedge clk);
    check_outputs();
    check(nvalid == FRAMES * (W - K + 1) * (H - K + 1), $sformatf("%0d windows", nvalid));
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
