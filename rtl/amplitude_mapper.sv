// amplitude_mapper: the slice blocks, amplitude tables and output
// multiplexers (MUX4 for I / cosine, MUX5 for Q / sine) of the modulator.
// For the current symbol and scheme it gives the amplitude that multiplies
// each carrier, in sdr_pkg amplitude units (1/16):
//   BPSK    1 bit:  I = +-0.125 (bit 1 -> +), Q = 0
//   QPSK    2 bits: I = +-0.1875 (upper bit), Q = +-0.1875 (lower bit)
//   16-QAM  4 bits: I from bits 3:2, Q from bits 1:0, levels +-0.3125 and
//                   +-0.875 in 2-bit gray order
//   256-QAM 8 bits: I from the upper 4-bit slice, Q from the lower, levels
//                   -15 .. +15 in the gray order of sdr_pkg::qam256_code
// The levels and the 256-QAM code follow the transceiver's tables; bit
// polarity and the 16-QAM axis code are this design's choices. An inactive
// symbol gives 0 on both channels. Purely combinational.
module amplitude_mapper
  import sdr_pkg::*;
(
  input  symbol_t sym,
  output amp_t    amp_i,
  output amp_t    amp_q
);

  function automatic amp_t qam16_level(logic [1:0] code);
    case (qam16_index(code))
      2'd0:    return -AMP_QAM16_H;
      2'd1:    return -AMP_QAM16_L;
      2'd2:    return  AMP_QAM16_L;
      default: return  AMP_QAM16_H;
    endcase
  endfunction

  function automatic amp_t qam256_level(logic [3:0] code);
    // 16 * (2 * index - 15)
    return amp_t'((signed'({1'b0, qam256_index(code)}) * 2 - 15) * AMP_QAM256);
  endfunction

  always_comb begin
    amp_i = '0;
    amp_q = '0;
    if (sym.active) begin
      case (sym.mode)
        MOD_BPSK: begin
          amp_i = sym.bits[0] ? AMP_BPSK : -AMP_BPSK;
        end
        MOD_QPSK: begin
          amp_i = sym.bits[1] ? AMP_QPSK : -AMP_QPSK;
          amp_q = sym.bits[0] ? AMP_QPSK : -AMP_QPSK;
        end
        MOD_QAM16: begin
          amp_i = qam16_level(sym.bits[3:2]);
          amp_q = qam16_level(sym.bits[1:0]);
        end
        default: begin
          amp_i = qam256_level(sym.bits[7:4]);
          amp_q = qam256_level(sym.bits[3:0]);
        end
      endcase
    end
  end

endmodule
