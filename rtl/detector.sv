// detector: turns the demodulated I and Q amplitudes of one symbol into
// symbol bits for the scheme that RECEIVE_SEL picked. Each axis is sliced
// against the midpoints between the transmit levels and the nearest level's
// code is returned, the inverse of the amplitude_mapper:
//   BPSK    I >= 0                          -> 1 bit
//   QPSK    I >= 0, Q >= 0                  -> 2 bits {I, Q}
//   16-QAM  thresholds 0 and +-0.59375      -> 2 gray bits per axis
//   256-QAM nearest odd level -15 .. +15    -> 4 gray bits per axis (Table
//           order of sdr_pkg::qam256_code), I in bits 7:4, Q in bits 3:0
// For 256-QAM the two 4-bit results are concatenated into the 8-bit symbol.
// When carrier is low the symbol is marked inactive.
//
// The scheme is the RECEIVE_SEL decision of the symbol's own window, except
// inside a word (hold high), where the scheme the S/P converter latched for
// the word (hold_mode) is used; overridden pulses when the two differ. That
// hold is this design's choice: it confines a wrong power decision to the
// one symbol it was made on.
//
// Timing: one register stage; sym_valid follows in_valid by one cycle.
module detector
  import sdr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t amp_i,
  input  sample_t amp_q,
  input  mod_t    rx_sel,
  input  logic    carrier,
  input  logic    hold,
  input  mod_t    hold_mode,
  input  logic    in_valid,
  output symbol_t sym,
  output logic    sym_valid,
  output logic    overridden
);

  // 16-QAM decision level between 0.3125 and 0.875, in sample units.
  localparam int TH16  = (int'(AMP_QAM16_L) + int'(AMP_QAM16_H)) <<< (SAMPLE_FRAC - AMP_FRAC - 1);
  localparam int ONE   = 1 <<< SAMPLE_FRAC;

  function automatic logic [1:0] slice16(sample_t a);
    logic [1:0] idx;
    if (a < -sample_t'(TH16))  idx = 2'd0;
    else if (a < 0)            idx = 2'd1;
    else if (a < sample_t'(TH16)) idx = 2'd2;
    else                       idx = 2'd3;
    return qam16_code(idx);
  endfunction

  // Level index k stands for 2k - 15; decision cells are 2.0 wide.
  function automatic logic [3:0] slice256(sample_t a);
    int k;
    k = (int'(a) + 16 * ONE) >>> (SAMPLE_FRAC + 1);
    if (k < 0)  k = 0;
    if (k > 15) k = 15;
    return qam256_code(4'(k));
  endfunction

  logic [SYM_W-1:0] bits;
  mod_t             sel;

  assign sel = hold ? hold_mode : rx_sel;

  always_comb begin
    case (sel)
      MOD_BPSK:  bits = {7'b0, !amp_i[SAMPLE_W-1]};
      MOD_QPSK:  bits = {6'b0, !amp_i[SAMPLE_W-1], !amp_q[SAMPLE_W-1]};
      MOD_QAM16: bits = {4'b0, slice16(amp_i), slice16(amp_q)};
      default:   bits = {slice256(amp_i), slice256(amp_q)};
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym        <= '{bits: '0, mode: MOD_BPSK, active: 1'b0};
      sym_valid  <= 1'b0;
      overridden <= 1'b0;
    end else begin
      sym_valid  <= in_valid;
      overridden <= in_valid && carrier && hold && (rx_sel != hold_mode);
      if (in_valid) begin
        sym.bits   <= carrier ? bits : '0;
        sym.mode   <= sel;
        sym.active <= carrier;
      end
    end
  end

endmodule
