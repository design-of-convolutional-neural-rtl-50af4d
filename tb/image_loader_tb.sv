// image_loader_tb -- the image reader on a 28x28 image held in a one-cycle-latency
// memory model. Checks that the reads cover addresses 0..783 in order on
// consecutive cycles starting the cycle after start, that the pixel stream
// carries the memory words in the same order, one per cycle, that start is
// ignored while busy, and that a second image can follow.
module image_loader_tb;
  import cnn_pkg::*;
  localparam int W = 28, H = 28;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, mem_rd, pix_valid;
  logic [9:0] mem_addr;
  data_t mem_data, pix;
  int checks = 0, failures = 0;

  image_loader #(.W(W), .H(H)) dut (.*);
  always #5 clk = ~clk;

  data_t mem [W*H];
  always_ff @(posedge clk) if (mem_rd) mem_data <= mem[mem_addr];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int img = 0; img < 2; img++) begin
      int nrd, npix;
      foreach (mem[i]) mem[i] = data_t'($urandom);
      nrd = 0; npix = 0;
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      // Reads on every cycle, then the returning pixels one cycle behind.
      for (int c = 0; c <= W * H + 3; c++) begin
        if (c < W * H) check(mem_rd && int'(mem_addr) == c, $sformatf("cycle %0d: rd %0b addr %0d", c, mem_rd, mem_addr));
        else           check(!mem_rd, "read after the last pixel");
        if (c >= 1 && c <= W * H) begin
          check(pix_valid && pix == mem[c-1], $sformatf("pixel %0d: valid %0b value %0d", c - 1, pix_valid, pix));
          npix++;
        end else begin
          check(!pix_valid, $sformatf("cycle %0d: unexpected pixel", c));
        end
        check(busy == (c <= W * H), $sformatf("cycle %0d: busy %0b", c, busy));
        if (c == 100) start = 1'b1;   // ignored: a frame is being read
        if (c == 101) start = 1'b0;
        @(negedge clk);
      end
      check(npix == W * H, "pixel count");
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
