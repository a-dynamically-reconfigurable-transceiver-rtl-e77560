// modulator: multiplies the I amplitude with the cosine carrier and the Q
// amplitude with the sine carrier, sample by sample, and drives DAC A (I)
// and DAC B (Q). The amplitudes come from the amplitude_mapper inside.
//
// The product of an amplitude (1/16 units) and a carrier sample (full scale
// 2^(CARRIER_W-1)-1) is shifted to the sample format of sdr_pkg (SAMPLE_FRAC
// fractional bits); the largest value, 15 * 1.0, fits in SAMPLE_W bits.
//
// Timing: the carrier sample presented in cycle t (with the symbol that the
// P/S converter puts out in cycle t+1, i.e. the symbol started by the tick
// of cycle t) reaches dac_a / dac_b in cycle t+2. The carrier is registered
// once to line up with the symbol register of the P/S converter, then the
// products are registered.
module modulator
  import sdr_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  symbol_t                     sym,
  input  logic signed [CARRIER_W-1:0] cos_in,
  input  logic signed [CARRIER_W-1:0] sin_in,
  output sample_t                     dac_a,
  output sample_t                     dac_b
);

  localparam int PROD_W = AMP_W + CARRIER_W;
  localparam int SHIFT  = AMP_FRAC + CARRIER_W - 1 - SAMPLE_FRAC;

  amp_t amp_i;
  amp_t amp_q;
  logic signed [CARRIER_W-1:0] cos_d;
  logic signed [CARRIER_W-1:0] sin_d;
  logic signed [PROD_W-1:0]    prod_i;
  logic signed [PROD_W-1:0]    prod_q;

  amplitude_mapper u_map (
    .sym   (sym),
    .amp_i (amp_i),
    .amp_q (amp_q)
  );

  assign prod_i = PROD_W'(amp_i) * PROD_W'(cos_d);
  assign prod_q = PROD_W'(amp_q) * PROD_W'(sin_d);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cos_d <= '0;
      sin_d <= '0;
      dac_a <= '0;
      dac_b <= '0;
    end else begin
      cos_d <= cos_in;
      sin_d <= sin_in;
      dac_a <= SAMPLE_W'(prod_i >>> SHIFT);
      dac_b <= SAMPLE_W'(prod_q >>> SHIFT);
    end
  end

endmodule
