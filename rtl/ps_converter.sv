// ps_converter: parallel-to-serial converter of the transmit chain. It takes
// a 64-bit interleaved word and hands it to the modulator one symbol per
// carrier cycle, MSB first: 1 bit per symbol for BPSK, 2 for QPSK, 4 for
// 16-QAM and 8 for 256-QAM (the two 4-bit slices of a 256-QAM symbol are the
// upper nibble for I and the lower nibble for Q).
//
// The modulation select is sampled when a word is loaded and kept for the
// whole word, so a button press takes effect at the next word boundary and
// the receiver always sees a word in one scheme. When no word is waiting at
// a word boundary the converter emits an inactive symbol (carrier off) for
// one carrier cycle. Both are this design's choices.
//
// Timing: sym_tick is high for one cycle at the start of every carrier
// cycle (from the transmit DDS). On that cycle a word is taken
// (in_valid && in_ready, in_ready being high only on a tick with no bits
// left) and the new symbol appears on sym on the next cycle, where it stays
// for one carrier cycle.
module ps_converter
  import sdr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sym_tick,
  input  mod_t              mod_sel,
  input  logic [CODE_W-1:0] in_data,
  input  logic              in_valid,
  output logic              in_ready,
  output symbol_t           sym
);

  localparam int CNT_W = $clog2(CODE_W + 1);

  logic [CODE_W-1:0] shreg;
  logic [CNT_W-1:0]  bits_left;
  mod_t              mode_q;

  assign in_ready = sym_tick && (bits_left == '0);

  // Top k bits of a word, right aligned.
  function automatic logic [SYM_W-1:0] head(logic [CODE_W-1:0] w, mod_t m);
    case (m)
      MOD_BPSK:  return {7'b0, w[CODE_W-1]};
      MOD_QPSK:  return {6'b0, w[CODE_W-1 -: 2]};
      MOD_QAM16: return {4'b0, w[CODE_W-1 -: 4]};
      default:   return w[CODE_W-1 -: 8];
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      bits_left <= '0;
      mode_q    <= MOD_BPSK;
      sym       <= '{bits: '0, mode: MOD_BPSK, active: 1'b0};
    end else if (sym_tick) begin
      if (bits_left != '0) begin
        sym.bits   <= head(shreg, mode_q);
        sym.mode   <= mode_q;
        sym.active <= 1'b1;
        shreg      <= shreg << bits_per_symbol(mode_q);
        bits_left  <= bits_left - CNT_W'(bits_per_symbol(mode_q));
      end else if (in_valid) begin
        mode_q     <= mod_sel;
        sym.bits   <= head(in_data, mod_sel);
        sym.mode   <= mod_sel;
        sym.active <= 1'b1;
        shreg      <= in_data << bits_per_symbol(mod_sel);
        bits_left  <= CNT_W'(CODE_W) - CNT_W'(bits_per_symbol(mod_sel));
      end else begin
        sym.bits   <= '0;
        sym.active <= 1'b0;
      end
    end
  end

endmodule
