// dds: direct digital synthesizer for the carrier. The transceiver uses a
// pair of them per chain, one giving the cosine (I) and one the sine (Q)
// carrier; PHASE_OFFSET = 2^(ACC_W-2) turns the sine instance into the
// cosine one.
//
// A phase accumulator of ACC_W bits adds FREQ_WORD per enabled clock; its top
// LUT_AW bits address a sine table of 2^LUT_AW entries, computed at
// elaboration as round((2^(OUT_W-1)-1) * sin(2*pi*k / 2^LUT_AW)). With the
// defaults the carrier has exactly 64 samples per cycle, so at an 80 MHz
// sample clock it is the 1.25 MHz carrier (0.8 us period) of the transceiver.
// Accumulator and table sizes are this design's choices.
//
// Timing: while en is high, each clock puts one new sample on wave (a
// register). out_valid marks a valid sample and cycle_start marks the first
// sample of a carrier cycle (accumulator phase 0 .. FREQ_WORD-1, without the
// offset), which is where symbols start.
module dds #(
  parameter int          ACC_W        = 32,
  parameter int          LUT_AW       = 10,
  parameter int          OUT_W        = 16,
  parameter logic [31:0] FREQ_WORD    = 32'h0400_0000,  // 2^32 / 64
  parameter logic [31:0] PHASE_OFFSET = 32'h0000_0000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  output logic signed [OUT_W-1:0] wave,
  output logic                    out_valid,
  output logic                    cycle_start
);

  typedef logic signed [OUT_W-1:0] lut_t [2**LUT_AW];

  function automatic lut_t make_lut();
    lut_t l;
    for (int k = 0; k < 2**LUT_AW; k++)
      l[k] = OUT_W'($rtoi($floor((2.0**(OUT_W-1) - 1.0)
                  * $sin(2.0 * 3.14159265358979 * real'(k) / real'(2**LUT_AW))
                  + 0.5)));
    return l;
  endfunction

  localparam lut_t SINE = make_lut();

  logic [ACC_W-1:0] acc;
  logic [ACC_W-1:0] phase;

  assign phase = acc + ACC_W'(PHASE_OFFSET);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc         <= '0;
      wave        <= '0;
      out_valid   <= 1'b0;
      cycle_start <= 1'b0;
    end else begin
      out_valid   <= en;
      cycle_start <= en && (acc < ACC_W'(FREQ_WORD));
      if (en) begin
        wave <= SINE[phase[ACC_W-1 -: LUT_AW]];
        acc  <= acc + ACC_W'(FREQ_WORD);
      end
    end
  end

endmodule
