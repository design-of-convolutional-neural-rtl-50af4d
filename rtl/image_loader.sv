// image_loader -- reads the input image from external memory, pixel by pixel.
//
// On start (while idle) the loader issues one read per cycle to the external
// image memory, addresses 0 .. W*H-1 in raster order (address = row*W + column),
// and forwards each returned word as one pixel of the stream that feeds the first
// convolution layer. The memory is assumed to return the data RD_LAT cycles after
// the read strobe; a shift register of strobes marks the returning words valid.
//
// Interface: start (pulse), busy (high while reads are issued or outstanding),
// mem_rd / mem_addr / mem_data to the memory, pix_valid / pix to the network.
// Throughput: one pixel per cycle; the first pixel is out RD_LAT+1 cycles after
// start. Synchronous, active-low reset.
module image_loader
  import cnn_pkg::*;
#(
  parameter int W      = 28,
  parameter int H      = 28,
  parameter int RD_LAT = 1,
  parameter int AW     = $clog2(W * H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          mem_rd,
  output logic [AW-1:0] mem_addr,
  input  data_t         mem_data,
  output logic          pix_valid,
  output data_t         pix
);
  logic          reading;
  logic [RD_LAT-1:0] pending;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reading  <= 1'b0;
      mem_rd   <= 1'b0;
      mem_addr <= '0;
      pending  <= '0;
    end else begin
      pending <= RD_LAT'({pending, mem_rd});
      if (!reading) begin
        mem_rd <= 1'b0;
        if (start && !busy) begin
          reading  <= 1'b1;
          mem_rd   <= 1'b1;
          mem_addr <= '0;
        end
      end else if (int'(mem_addr) == W * H - 1) begin
        reading <= 1'b0;
        mem_rd  <= 1'b0;
      end else begin
        mem_addr <= mem_addr + 1'b1;
      end
    end
  end

  // Data of the read issued RD_LAT cycles ago is on mem_data now.
  always_comb begin
    pix_valid = pending[RD_LAT-1];
    pix       = mem_data;
  end

  assign busy = reading || (|pending);
endmodule
