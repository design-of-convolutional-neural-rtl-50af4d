// classifier -- soft-max classification stage of the network.
//
// Soft-max maps the output neurons y[k] to probabilities
//   p[k] = exp(y[k]) / sum_j exp(y[j]) = exp(y[k]-y_max) / sum_j exp(y[j]-y_max).
// The block receives the NCLASS neuron values one per cycle (in_idx numbering
// them), keeps each one and the running maximum, and one cycle after neuron
// NCLASS-1 reports the winning class and its value (out_valid): the largest
// probability belongs to the largest neuron, since exp is monotonic. On equal
// values the lower class number wins. It then computes the probabilities:
// NCLASS cycles add up exp(y[j]-y_max) from a table, and NCLASS more cycles
// divide each term by the sum and send p[j] out (prob_valid, prob_idx, prob).
//
// Fixed-point convention (this design's choice): a neuron value counts in units of
// 2^-FRAC, so y = 16 means 1.0 for FRAC = 4. exp(-d * 2^-FRAC) for a difference d
// of 0 .. 511 is a table of unsigned Q16 words, 65536 being 1.0, built at
// elaboration by repeated multiplication with exp(-2^-FRAC); the constant itself
// comes from a Taylor series, in integer arithmetic only. Probabilities are
// unsigned Q0.PW words, 2^PW - 1 standing for 1.0 as well as for the largest
// fraction below it.
//
// Timing: out_valid one cycle after the last neuron; prob_valid for class j at
// NCLASS + 2 + j cycles after it. New neurons must not arrive while busy.
// Synchronous, active-low reset.
module classifier
  import cnn_pkg::*;
#(
  parameter int NCLASS = 2,
  parameter int IW     = (NCLASS > 1) ? $clog2(NCLASS) : 1,
  parameter int FRAC   = 4,
  parameter int PW     = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [IW-1:0] in_idx,
  input  data_t         in_data,
  output logic          out_valid,
  output logic [IW-1:0] out_class,
  output data_t         out_score,
  output logic          busy,
  output logic          prob_valid,
  output logic [IW-1:0] prob_idx,
  output logic [PW-1:0] prob
);
  localparam int ND    = 2 ** DATA_W;              // differences 0 .. 2^DATA_W - 1
  localparam int EW    = 17;                       // Q16 with room for 1.0
  localparam int SUM_W = EW + $clog2(NCLASS + 1);

  // exp(-d * 2^-FRAC) in Q16 by repeated multiplication (Q30 internally).
  function automatic logic [EW-1:0] exp_q16(input int d);
    longint one, x, c, v;
    one = longint'(1) << 30;
    x   = longint'(1) << (30 - FRAC);
    // exp(-x) = 1 - x + x^2/2 - x^3/6 + x^4/24, x = 2^-FRAC <= 1/2
    c = one - x + ((x * x) >> 30) / 2 - ((((x * x) >> 30) * x) >> 30) / 6
        + ((((((x * x) >> 30) * x) >> 30) * x) >> 30) / 24;
    v = one;
    for (int i = 0; i < d; i++) v = (v * c) >> 30;
    return EW'((v + (longint'(1) << 13)) >> 14);
  endfunction

  typedef enum logic [1:0] {S_IDLE, S_SUM, S_DIV} state_t;

  logic [EW-1:0]    exp_rom [ND];
  data_t            yv [NCLASS];
  data_t            best;
  logic [IW-1:0]    best_idx;
  logic             take;
  state_t           state;
  logic [IW-1:0]    j;
  logic [SUM_W-1:0] sum;
  logic [EW-1:0]    term;
  logic [EW+PW-1:0] quot;

  for (genvar d = 0; d < ND; d++) begin : exp_gen
    assign exp_rom[d] = exp_q16(d);
  end

  assign take = (in_idx == '0) || (in_data > best);

  // exp(y[j] - y_max) for the class being summed or divided.
  always_comb begin
    logic [DATA_W-1:0] diff;
    diff = best - yv[j];   // 0 .. 2^DATA_W - 1, as best >= yv[j]
    term = exp_rom[diff];
    quot = ({term, PW'(0)}) / (EW+PW)'(sum);
  end

  always_ff @(posedge clk) begin
    if (in_valid) yv[in_idx] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      best       <= '0;
      best_idx   <= '0;
      out_valid  <= 1'b0;
      out_class  <= '0;
      out_score  <= '0;
      state      <= S_IDLE;
      j          <= '0;
      sum        <= '0;
      prob_valid <= 1'b0;
      prob_idx   <= '0;
      prob       <= '0;
    end else begin
      out_valid  <= 1'b0;
      prob_valid <= 1'b0;
      if (in_valid) begin
        if (take) begin
          best     <= in_data;
          best_idx <= in_idx;
        end
        if (int'(in_idx) == NCLASS - 1) begin
          out_valid <= 1'b1;
          out_class <= take ? in_idx : best_idx;
          out_score <= take ? in_data : best;
          state     <= S_SUM;
          j         <= '0;
          sum       <= '0;
        end
      end
      case (state)
        S_SUM: begin
          sum <= sum + SUM_W'(term);
          if (int'(j) == NCLASS - 1) begin
            j     <= '0;
            state <= S_DIV;
          end else begin
            j <= j + 1'b1;
          end
        end
        S_DIV: begin
          prob_valid <= 1'b1;
          prob_idx   <= j;
          prob       <= (quot >= (EW+PW)'(2 ** PW)) ? '1 : quot[PW-1:0];
          if (int'(j) == NCLASS - 1) begin
            j     <= '0;
            state <= S_IDLE;
          end else begin
            j <= j + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && busy))
    else $error("classifier: neuron value while computing probabilities");
endmodule
