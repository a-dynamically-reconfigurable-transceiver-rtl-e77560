// mod_select: the Modulation Select block. It turns the button lines held in
// the custom register into the 2-bit select word that steers the modulator
// multiplexers (MUX4 for the cosine / I channel, MUX5 for the sine / Q
// channel).
//
// Mapping: no button or B1 -> 00 BPSK, B2 -> 01 QPSK, B3 -> 10 16-QAM,
// B4 -> 11 256-QAM. Lines are {B1, B2, B3, B4} from bit 3 down to bit 0.
// If several lines are 1 at once, the highest-numbered button wins; that
// priority is this design's choice. Purely combinational.
module mod_select
  import sdr_pkg::*;
(
  input  logic [3:0] btn_lines,
  output mod_t       mod_sel
);

  always_comb begin
    if (btn_lines[0])      mod_sel = MOD_QAM256;  // B4
    else if (btn_lines[1]) mod_sel = MOD_QAM16;   // B3
    else if (btn_lines[2]) mod_sel = MOD_QPSK;    // B2
    else                   mod_sel = MOD_BPSK;    // B1 or none
  end

endmodule
