// fc_layer_tb -- the fully connected layer at its default size (4 maps of 16
// elements, 2 neurons). Several frames of random and of extreme inputs stream in
// with random gaps; each neuron's output is compared with the reference model
// and must appear NPIX*(k+1)+1 cycles after the clock edge that stores the last
// input element; busy must cover the computation, and saturation and ReLU
// clipping must each be seen.
module fc_layer_tb;
  import cnn_pkg::*;
  import cnn_ref_pkg::*;
  localparam int NMAPS = 4, NPIX = 16, NOUT = 2, SHIFT = 5, FRAMES = 6;

  logic  clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  data_t in_pix [NMAPS];
  logic  busy, out_valid, sat_evt, relu_evt;
  logic [0:0] out_idx;
  data_t out_data;
  int checks = 0, failures = 0;

  fc_layer #(.NMAPS(NMAPS), .NPIX(NPIX), .NOUT(NOUT), .SHIFT(SHIFT)) dut (.*);
  always #5 clk = ~clk;

  int step = 0, nsat = 0, nrelu = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    arr_t x, y;
    foreach (in_pix[m]) in_pix[m] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      int t_last;
      x = new[NMAPS*NPIX];
      foreach (x[i]) begin
        case (f)
          0: x[i] = 255;
          1: x[i] = -256;
          default: x[i] = int'($urandom_range(511, 0)) - 256;
        endcase
      end
      y = fc(x, NMAPS, NPIX, NOUT, SHIFT);
      for (int a = 0; a < NPIX; a++) begin
        while ($urandom_range(3, 0) == 0) begin
          in_valid = 1'b0;
          @(negedge clk); step++;
          check(!out_valid, "output while loading");
        end
        in_valid = 1'b1;
        for (int m = 0; m < NMAPS; m++) in_pix[m] = data_t'(x[m*NPIX + a]);
        @(negedge clk); step++;
        check(!out_valid, "output while loading");
      end
      t_last = step;
      in_valid = 1'b0;
      for (int k = 0; k < NOUT; k++) begin
        while (!out_valid && step < t_last + 200) begin
          check(busy, "busy while computing");
          @(negedge clk); step++;
        end
        check(step - t_last == NPIX * (k + 1) + 1,
              $sformatf("frame %0d neuron %0d after %0d cycles", f, k, step - t_last));
        check(out_idx == k[0] && int'(out_data) == y[k],
              $sformatf("frame %0d neuron %0d: idx %0d value %0d expected %0d", f, k, out_idx, out_data, y[k]));
        check(sat_evt == clips(fc_sum(x, NMAPS, NPIX, k), SHIFT), "saturation flag");
        if (sat_evt) nsat++;
        if (relu_evt) nrelu++;
        @(negedge clk); step++;
      end
      check(!busy, "idle after the last neuron");
    end
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
