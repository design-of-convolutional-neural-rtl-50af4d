// weight_rom_tb -- reads every word of every bank of the FC weight ROMs in random
// order and checks it, one cycle after its address, against W[k][bank][a] with
// address k*NPIX + a.
module weight_rom_tb;
  import cnn_pkg::*;
  localparam int NPIX = 16, NOUT = 2, NB = 4, DEPTH = NPIX * NOUT;

  logic clk = 1'b0;
  logic [$clog2(DEPTH)-1:0] addr = '0;
  wgt_t data [NB];
  int checks = 0, failures = 0;

  for (genvar b = 0; b < NB; b++) begin : bank_gen
    weight_rom #(.BANK(b), .NPIX(NPIX), .NOUT(NOUT)) dut (.clk, .addr, .data(data[b]));
  end
  always #5 clk = ~clk;

  initial begin
    for (int t = 0; t < 4 * DEPTH; t++) begin
      int a;
      a = (t < DEPTH) ? t : int'($urandom_range(DEPTH - 1, 0));
      @(negedge clk);
      addr = a[$clog2(DEPTH)-1:0];
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (data[b] != fc_weight(a / NPIX, b, a % NPIX)) begin
          failures++;
          $display("FAIL: bank %0d addr %0d = %0d", b, a, data[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
