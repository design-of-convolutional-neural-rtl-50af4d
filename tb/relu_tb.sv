// relu_tb -- exhaustive test of the ReLU multiplexer over all 512 9-bit inputs.
module relu_tb;
  import cnn_pkg::*;
  data_t din, dout;
  logic  clipped;
  int checks = 0, failures = 0;

  relu dut (.din, .dout, .clipped);

  initial begin
    for (int v = -256; v < 256; v++) begin
      din = data_t'(v);
      #1;
      checks++;
      if (int'(dout) != ((v > 0) ? v : 0) || clipped != (v < 0)) begin
        failures++;
        $display("FAIL: relu(%0d) = %0d clipped %0b", v, dout, clipped);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
