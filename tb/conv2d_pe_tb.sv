// conv2d_pe_tb -- random windows and kernels through the 5x5 PE array; checks the
// registered dot product one cycle later, that ce low holds the result, and the
// extreme values (all -256 times all -16, the largest product sum).
module conv2d_pe_tb;
  import cnn_pkg::*;
  localparam int K = 5;
  localparam int ACC_W = acc_width(K * K);

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  data_t win  [K][K];
  wgt_t  kern [K][K];
  logic signed [ACC_W-1:0] dout;
  int checks = 0, failures = 0;

  conv2d_pe #(.K(K)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint expect_v;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      expect_v = 0;
      for (int r = 0; r < K; r++)
        for (int c = 0; c < K; c++) begin
          int a, b;
          if (t == 0) begin a = -256; b = -16; end
          else if (t == 1) begin a = 255; b = -16; end
          else begin a = int'($urandom_range(511, 0)) - 256; b = int'($urandom_range(31, 0)) - 16; end
          win[r][c]  = data_t'(a);
          kern[r][c] = wgt_t'(b);
          expect_v += longint'(a) * longint'(b);
        end
      ce = 1'b1;
      @(negedge clk);
      check(longint'(dout) == expect_v, $sformatf("t=%0d dout %0d expected %0d", t, dout, expect_v));
      // With ce low the register keeps its value whatever the window does.
      ce = 1'b0;
      win[0][0] = data_t'(win[0][0] + 1);
      @(negedge clk);
      check(longint'(dout) == expect_v, $sformatf("t=%0d hold failed", t));
    end
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
