// classifier_tb -- random score sets (including ties, negative values and large
// gaps) for a 2-class and a 5-class soft-max unit, sent with random gaps. Checks
// class and score one cycle after the last neuron, that no result appears at
// other times, and each probability against exp/sum computed in floating point
// (within 2 LSB of Q0.8), in class order, NCLASS+2+j cycles after the last neuron.
module classifier_tb;
  import cnn_pkg::*;
  localparam int FRAC = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic       v2 = 1'b0, ov2, b2, pv2;
  logic [0:0] i2 = '0, c2, pi2;
  data_t      d2 = '0, s2;
  logic [7:0] p2;
  logic       v5 = 1'b0, ov5, b5, pv5;
  logic [2:0] i5 = '0, c5, pi5;
  data_t      d5 = '0, s5;
  logic [7:0] p5;

  classifier #(.NCLASS(2)) dut2 (.clk, .rst_n, .in_valid(v2), .in_idx(i2), .in_data(d2),
                                 .out_valid(ov2), .out_class(c2), .out_score(s2),
                                 .busy(b2), .prob_valid(pv2), .prob_idx(pi2), .prob(p2));
  classifier #(.NCLASS(5)) dut5 (.clk, .rst_n, .in_valid(v5), .in_idx(i5), .in_data(d5),
                                 .out_valid(ov5), .out_class(c5), .out_score(s5),
                                 .busy(b5), .prob_valid(pv5), .prob_idx(pi5), .prob(p5));
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Sends n scores to the unit selected by n (2 or 5) and checks its results.
  task automatic run(input int n, input int t);
    int s [5];
    int b;
    real den;
    for (int k = 0; k < n; k++) begin
      case (t % 4)
        0: s[k] = 7;
        1: s[k] = int'($urandom_range(40, 0)) - 20;
        default: s[k] = int'($urandom_range(511, 0)) - 256;
      endcase
    end
    b = 0;
    for (int k = 1; k < n; k++) if (s[k] > s[b]) b = k;
    den = 0.0;
    for (int k = 0; k < n; k++) den += $exp(real'(s[k] - s[b]) / real'(1 << FRAC));
    for (int k = 0; k < n; k++) begin
      while ($urandom_range(2, 0) == 0) begin
        v2 = 1'b0; v5 = 1'b0;
        @(negedge clk);
        check(!ov2 && !ov5 && !pv2 && !pv5, "output while idle");
      end
      if (n == 2) begin v2 = 1'b1; i2 = k[0];  d2 = data_t'(s[k]); end
      else        begin v5 = 1'b1; i5 = 3'(k); d5 = data_t'(s[k]); end
      @(negedge clk);
      if (k < n - 1) check(!ov2 && !ov5, "result before the last neuron");
    end
    v2 = 1'b0; v5 = 1'b0;
    if (n == 2) check(ov2 && int'(c2) == b && int'(s2) == s[b], $sformatf("2-class: %0d/%0d got %0d/%0d", b, s[b], c2, s2));
    else        check(ov5 && int'(c5) == b && int'(s5) == s[b], $sformatf("5-class: %0d/%0d got %0d/%0d", b, s[b], c5, s5));
    check((n == 2) ? b2 : b5, "busy after the decision");
    // probabilities: class j at NCLASS + 2 + j cycles after the last neuron
    for (int c = 2; c <= 2 * n + 1; c++) begin
      logic pv;
      int pi, pval, e;
      @(negedge clk);
      pv   = (n == 2) ? pv2 : pv5;
      pi   = (n == 2) ? int'(pi2) : int'(pi5);
      pval = (n == 2) ? int'(p2) : int'(p5);
      if (c >= n + 2) begin
        int jj;
        real pr;
        jj = c - n - 2;
        pr = $exp(real'(s[jj] - s[b]) / real'(1 << FRAC)) / den * 256.0;
        e  = (pr >= 255.0) ? 255 : int'($floor(pr));
        check(pv && pi == jj && pval >= e - 2 && pval <= e + 2,
              $sformatf("n=%0d p[%0d]: valid %0b idx %0d value %0d expected %0d", n, jj, pv, pi, pval, e));
      end else begin
        check(!pv, "probability too early");
      end
    end
    @(negedge clk);
    check(!pv2 && !pv5 && !b2 && !b5, "idle after the last probability");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) run(2, t);
    for (int t = 0; t < 200; t++) run(5, t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
