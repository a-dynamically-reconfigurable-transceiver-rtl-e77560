// sp_converter: serial-to-parallel converter of the receive chain. It shifts
// the bits of each detected symbol (1, 2, 4 or 8, MSB first) into a 64-bit
// word and outputs the word when 64 bits are in. The scheme of a word is the
// scheme detected for its first symbol; it is held in word_mode for the rest
// of the word (in_word is high meanwhile) and sets how many bits each symbol
// adds, so a wrong scheme decision in mid-word cannot shift the framing. The
// detector uses word_mode to slice those symbols. The receiver thus follows
// scheme changes on its own, at word boundaries, which is where the
// transmitter makes them.
//
// Word framing is this design's choice: the transmitter sends a word in one
// scheme and leaves the carrier off between words when it has nothing to
// send, so an inactive symbol clears a partly filled word (counted on
// dropped). If a symbol would overfill the word the word is closed with the
// bits that fit. out_mode is the scheme of the word's last symbol.
//
// Timing: out_valid is a one-cycle pulse in the cycle after the symbol that
// completes the word.
module sp_converter
  import sdr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  symbol_t           sym,
  input  logic              sym_valid,
  output logic [CODE_W-1:0] out_data,
  output logic              out_valid,
  output mod_t              out_mode,
  output logic              dropped,
  output mod_t              word_mode,
  output logic              in_word
);

  localparam int CNT_W = $clog2(CODE_W + 1);

  logic [CODE_W-1:0] shreg, next;
  logic [CNT_W-1:0]  cnt;
  logic [CNT_W:0]    cnt_next;
  logic [3:0]        k;
  mod_t              m;

  assign in_word  = (cnt != '0);
  assign m        = in_word ? word_mode : sym.mode;
  assign k        = bits_per_symbol(m);
  assign cnt_next = (CNT_W + 1)'(cnt) + (CNT_W + 1)'(k);

  always_comb begin
    case (m)
      MOD_BPSK:  next = {shreg[CODE_W-2:0], sym.bits[0]};
      MOD_QPSK:  next = {shreg[CODE_W-3:0], sym.bits[1:0]};
      MOD_QAM16: next = {shreg[CODE_W-5:0], sym.bits[3:0]};
      default:   next = {shreg[CODE_W-9:0], sym.bits[7:0]};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      cnt       <= '0;
      out_data  <= '0;
      out_valid <= 1'b0;
      out_mode  <= MOD_BPSK;
      dropped   <= 1'b0;
      word_mode <= MOD_BPSK;
    end else begin
      out_valid <= 1'b0;
      dropped   <= 1'b0;
      if (sym_valid) begin
        if (!sym.active) begin
          dropped <= (cnt != '0);
          cnt     <= '0;
        end else if (cnt_next >= (CNT_W + 1)'(CODE_W)) begin
          out_data  <= next;
          out_valid <= 1'b1;
          out_mode  <= m;
          cnt       <= '0;
        end else begin
          shreg <= next;
          cnt   <= CNT_W'(cnt_next);
          if (!in_word) word_mode <= sym.mode;
        end
      end
    end
  end

endmodule
