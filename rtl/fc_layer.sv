// fc_layer -- fully connected layer, Y[k] = ReLU( requant( sum_m sum_a X[m][a] *
// W[k][m][a] + b[k] ) ), for NOUT output neurons over NMAPS feature maps of NPIX
// elements each.
//
// The feature maps arrive in parallel as streams (one element of every map per
// in_valid cycle) and are written into NMAPS feature-map RAMs, one per map. When
// the last element has been stored, the controller (SM_fullc) reads the RAMs
// element by element, once per output neuron. Each RAM has a weight ROM beside
// it (weight_rom bank m); every cycle the NMAPS RAM words are multiplied by their
// ROM words in parallel and the products are added together and into the
// accumulator of the current neuron, which starts from the neuron's bias. After
// the last element of a neuron the accumulator is shifted right by SHIFT,
// saturated to 9 bits and passed through ReLU, and the result leaves the layer.
//
// Timing: the neurons are computed one after another, NPIX cycles each; out_valid
// of neuron k rises NPIX*(k+1) + 1 clock edges after the edge that stores the
// last input element. busy is
// high from the last input element until the last neuron is out; new input must
// not arrive while busy. out_idx is the neuron number of out_data. Synchronous,
// active-low reset.
module fc_layer
  import cnn_pkg::*;
#(
  parameter int NMAPS = 4,
  parameter int NPIX  = 16,
  parameter int NOUT  = 2,
  parameter int SHIFT = 5
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  data_t                          in_pix [NMAPS],
  output logic                           busy,
  output logic                           out_valid,
  output logic [((NOUT > 1) ? $clog2(NOUT) : 1)-1:0] out_idx,
  output data_t                          out_data,
  output logic                           sat_evt,
  output logic                           relu_evt
);
  localparam int PA    = $clog2(NPIX);
  localparam int KA    = (NOUT > 1) ? $clog2(NOUT) : 1;
  localparam int RA    = $clog2(NOUT * NPIX);
  localparam int ACC_W = acc_width(NMAPS * NPIX) + BIAS_W;

  typedef enum logic [0:0] {S_LOAD, S_RUN} state_t;

  state_t        state;
  data_t         fmap [NMAPS][NPIX];
  logic [PA-1:0] wr_addr;
  logic [PA-1:0] a;
  logic [KA-1:0] k;
  data_t         fm_q [NMAPS];
  wgt_t          w_q  [NMAPS];
  logic [RA-1:0] rom_addr;

  // Read stage -> accumulate stage
  logic          p_valid, p_first, p_last;
  logic [KA-1:0] p_k;

  logic signed [ACC_W-1:0] acc, acc_next, dot;
  bias_t                   bias_rom [NOUT];

  for (genvar i = 0; i < NOUT; i++) begin : bias_gen
    assign bias_rom[i] = fc_bias(i);
  end

  // Feature-map RAMs: written by the input stream, read by the controller.
  always_ff @(posedge clk) begin
    if (in_valid && state == S_LOAD)
      for (int m = 0; m < NMAPS; m++) fmap[m][wr_addr] <= in_pix[m];
    for (int m = 0; m < NMAPS; m++) fm_q[m] <= fmap[m][a];
  end

  assign rom_addr = RA'(int'(k) * NPIX + int'(a));

  for (genvar m = 0; m < NMAPS; m++) begin : rom_gen
    weight_rom #(.BANK(m), .NPIX(NPIX), .NOUT(NOUT)) u_rom (
      .clk, .addr(rom_addr), .data(w_q[m])
    );
  end

  // Products of the NMAPS banks added together (the adder of the layer).
  always_comb begin
    dot = '0;
    for (int m = 0; m < NMAPS; m++) begin
      logic signed [ACC_W-1:0] prod;
      prod = fm_q[m] * w_q[m];
      dot  = dot + prod;
    end
    acc_next = (p_first ? ACC_W'(bias_rom[p_k]) : acc) + dot;
  end

  // SM_fullc: load the maps, then step through neurons and elements.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_LOAD;
      wr_addr <= '0;
      a       <= '0;
      k       <= '0;
      p_valid <= 1'b0;
      p_first <= 1'b0;
      p_last  <= 1'b0;
      p_k     <= '0;
    end else begin
      p_valid <= (state == S_RUN);
      p_first <= (a == '0);
      p_last  <= (int'(a) == NPIX - 1);
      p_k     <= k;
      case (state)
        S_LOAD: begin
          if (in_valid) begin
            if (int'(wr_addr) == NPIX - 1) begin
              wr_addr <= '0;
              state   <= S_RUN;
            end else begin
              wr_addr <= wr_addr + 1'b1;
            end
          end
        end
        S_RUN: begin
          if (int'(a) == NPIX - 1) begin
            a <= '0;
            if (int'(k) == NOUT - 1) begin
              k     <= '0;
              state <= S_LOAD;
            end else begin
              k <= k + 1'b1;
            end
          end else begin
            a <= a + 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // Accumulator and output register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_data  <= '0;
      sat_evt   <= 1'b0;
      relu_evt  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      sat_evt   <= 1'b0;
      relu_evt  <= 1'b0;
      if (p_valid) begin
        acc <= acc_next;
        if (p_last) begin
          data_t q;
          q         = requant(longint'(acc_next), SHIFT);
          out_valid <= 1'b1;
          out_idx   <= p_k;
          out_data  <= q[DATA_W-1] ? '0 : q;
          sat_evt   <= saturates(longint'(acc_next), SHIFT);
          relu_evt  <= q[DATA_W-1];
        end
      end
    end
  end

  assign busy = (state == S_RUN) || p_valid;

  // New feature maps must not arrive while the layer is computing.
  assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && state == S_RUN))
    else $error("fc_layer: input while busy");
endmodule
