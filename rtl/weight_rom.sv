// weight_rom -- synchronous read-only weight memory of one feature-map bank of the
// fully connected layer.
//
// Bank BANK holds the weights that multiply the elements of feature map BANK:
// word k*NPIX + a is W[k][BANK][a], the weight between element a of that map and
// output neuron k. The contents are the constants given by cnn_pkg::fc_weight and
// are realised as a table addressed by addr; the word read is registered, so data
// is valid the cycle after the address (block-RAM style read).
//
// Interface: addr (log2(NOUT*NPIX) bits), data (5-bit signed). No reset is needed:
// the output register is loaded on every clock.
module weight_rom
  import cnn_pkg::*;
#(
  parameter int BANK  = 0,
  parameter int NPIX  = 16,
  parameter int NOUT  = 2,
  parameter int DEPTH = NOUT * NPIX,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output wgt_t          data
);
  wgt_t rom [DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : fill
    assign rom[i] = fc_weight(i / NPIX, BANK, i % NPIX);
  end

  always_ff @(posedge clk) data <= rom[addr];
endmodule
