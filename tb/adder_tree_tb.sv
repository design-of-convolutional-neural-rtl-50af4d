// adder_tree_tb -- random partial sums and biases into the 16-input adder tree;
// checks the registered total, that ce low holds it, and synchronous reset.
module adder_tree_tb;
  import cnn_pkg::*;
  localparam int M = 16;
  localparam int IN_W = acc_width(25);
  localparam int OUT_W = IN_W + $clog2(M + 1) + 1;

  logic clk = 1'b0, rst_n = 1'b0, ce = 1'b0;
  logic signed [IN_W-1:0] din [M];
  bias_t bias;
  logic signed [OUT_W-1:0] dout;
  int checks = 0, failures = 0;

  adder_tree #(.M(M)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint e;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      e = 0;
      for (int m = 0; m < M; m++) begin
        longint v;
        v = (t == 0) ? -(longint'(1) << (IN_W - 1)) : longint'($urandom_range(200000, 0)) - 100000;
        din[m] = IN_W'(v);
        e += v;
      end
      bias = bias_t'(int'($urandom_range(4095, 0)) - 2048);
      e += longint'(bias);
      ce = 1'b1;
      @(negedge clk);
      check(longint'(dout) == e, $sformatf("t=%0d dout %0d expected %0d", t, dout, e));
      ce = 1'b0;
      bias = bias + 1;
      @(negedge clk);
      check(longint'(dout) == e, $sformatf("t=%0d hold", t));
    end
    rst_n = 1'b0;
    @(negedge clk);
    check(dout == '0, "reset clears the sum");
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
