// sdr_backend: baseband back end of a dynamically reconfigurable SDR
// transceiver. The transmitter sends 32-bit data words with one of four
// modulation schemes (BPSK, QPSK, 16-QAM, 256-QAM) chosen by four buttons;
// the receiver works out which scheme arrives from the received power alone
// and switches its demodulator to match, with no side channel.
//
// Transmit chain: custom_register -> mod_select -> block_encoder ((8,4)
// Hamming, 32 -> 64 bits) -> interleaver (8x8) -> ps_converter (symbols of
// 1/2/4/8 bits, one per carrier cycle) -> modulator (amplitude tables,
// multipliers) -> DAC A (I, cosine) and DAC B (Q, sine). Two dds instances
// give the carriers, 64 samples per cycle.
// Receive chain: ADC -> power_select (mean square over 64 samples) and
// demodulator (I/Q correlators over the same 64 samples) -> receive_sel
// (power thresholds) -> detector -> sp_converter (64-bit word) ->
// deinterleaver -> block_decoder -> 32-bit word. The scheme found for the
// first symbol of a word is held for the rest of the word (sp_converter
// feeds it back to the detector).
//
// The DACs, the ADC, the RF stage and the front end processor (audio codec,
// video-port link) are outside this module: their signals are ports. The
// receive carriers come from a second dds pair running on the same clock,
// started RX_DELAY cycles after the transmit pair, so they are in phase with
// the received samples; RX_DELAY covers the two modulator stages, the ADC
// input register and CHANNEL_LATENCY, the cycles between dac_a/dac_b and
// adc outside the chip. That coherent, known-latency receiver is this
// design's choice (the design has no carrier or timing recovery).
//
// Interface: tx_data/tx_valid/tx_ready is a valid/ready stream; rx_data is
// valid for the one cycle rx_valid is high (the receiver cannot stall). One
// sample per clock on dac_a, dac_b and adc (80 MHz for the 1.25 MHz carrier).
module sdr_backend
  import sdr_pkg::*;
#(
  parameter int CHANNEL_LATENCY = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  // front end: button register write
  input  logic               btn_wr_en,
  input  logic [3:0]         btn_wr_data,
  // front end: transmit data
  input  logic [WORD_W-1:0]  tx_data,
  input  logic               tx_valid,
  output logic               tx_ready,
  output mod_t               tx_mode,       // scheme of the symbol on air
  output logic               tx_active,     // a symbol is on air
  // converters
  output sample_t            dac_a,
  output sample_t            dac_b,
  input  sample_t            adc,
  // front end: received data
  output logic [WORD_W-1:0]  rx_data,
  output logic               rx_valid,
  output mod_t               rx_mode,       // scheme of the received word
  output logic [3:0]         rx_corrected,
  output logic               rx_uncorrectable,
  output logic               rx_dropped,    // partly received word dropped
  output logic [POWER_W-1:0] rx_power,
  output logic               rx_power_valid,
  output mod_t               rx_sel,        // scheme of the last window
  output logic               rx_sel_override // a mid-word window's scheme
                                             // differed from its word's
);

  localparam int          RX_DELAY = 3 + CHANNEL_LATENCY;
  localparam logic [31:0] COS_OFFSET = 32'h4000_0000;  // quarter cycle

  // ---------------- transmit ----------------
  logic [3:0] btn_lines;
  mod_t       mod_sel;

  custom_register u_creg (
    .clk, .rst_n,
    .wr_en     (btn_wr_en),
    .wr_data   (btn_wr_data),
    .btn_lines (btn_lines)
  );

  mod_select u_msel (
    .btn_lines (btn_lines),
    .mod_sel   (mod_sel)
  );

  logic [CODE_W-1:0] enc_data, ilv_data;
  logic              enc_valid, enc_ready, ilv_valid, ilv_ready;

  block_encoder u_enc (
    .clk, .rst_n,
    .in_data   (tx_data),
    .in_valid  (tx_valid),
    .in_ready  (tx_ready),
    .out_data  (enc_data),
    .out_valid (enc_valid),
    .out_ready (enc_ready)
  );

  interleaver u_ilv (
    .clk, .rst_n,
    .in_data   (enc_data),
    .in_valid  (enc_valid),
    .in_ready  (enc_ready),
    .out_data  (ilv_data),
    .out_valid (ilv_valid),
    .out_ready (ilv_ready)
  );

  logic                        tx_en;
  logic signed [CARRIER_W-1:0] tx_cos, tx_sin;
  logic                        tx_cos_valid, tx_sin_valid, tx_cos_start, tx_sym_tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tx_en <= 1'b0;
    else        tx_en <= 1'b1;
  end

  dds #(.PHASE_OFFSET(COS_OFFSET)) u_tx_dds_cos (
    .clk, .rst_n, .en(tx_en),
    .wave (tx_cos), .out_valid (tx_cos_valid), .cycle_start (tx_cos_start)
  );

  dds u_tx_dds_sin (
    .clk, .rst_n, .en(tx_en),
    .wave (tx_sin), .out_valid (tx_sin_valid), .cycle_start (tx_sym_tick)
  );

  symbol_t tx_sym;

  ps_converter u_ps (
    .clk, .rst_n,
    .sym_tick (tx_sym_tick),
    .mod_sel  (mod_sel),
    .in_data  (ilv_data),
    .in_valid (ilv_valid),
    .in_ready (ilv_ready),
    .sym      (tx_sym)
  );

  assign tx_mode   = tx_sym.mode;
  assign tx_active = tx_sym.active;

  modulator u_mod (
    .clk, .rst_n,
    .sym    (tx_sym),
    .cos_in (tx_cos),
    .sin_in (tx_sin),
    .dac_a  (dac_a),
    .dac_b  (dac_b)
  );

  // ---------------- receive ----------------
  sample_t             adc_q;
  logic [RX_DELAY-1:0] rx_en_pipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_q      <= '0;
      rx_en_pipe <= '0;
    end else begin
      adc_q      <= adc;
      rx_en_pipe <= {rx_en_pipe[RX_DELAY-2:0], tx_en};
    end
  end

  logic signed [CARRIER_W-1:0] rx_cos, rx_sin;
  logic                        rx_cos_valid, rx_sin_valid, rx_cos_start, rx_first;

  dds #(.PHASE_OFFSET(COS_OFFSET)) u_rx_dds_cos (
    .clk, .rst_n, .en(rx_en_pipe[RX_DELAY-1]),
    .wave (rx_cos), .out_valid (rx_cos_valid), .cycle_start (rx_cos_start)
  );

  dds u_rx_dds_sin (
    .clk, .rst_n, .en(rx_en_pipe[RX_DELAY-1]),
    .wave (rx_sin), .out_valid (rx_sin_valid), .cycle_start (rx_first)
  );

  logic [POWER_W-1:0] power;
  logic               p_valid, a_valid;
  sample_t            amp_i, amp_q;

  power_select u_pwr (
    .clk, .rst_n,
    .x (adc_q), .x_valid (rx_sin_valid), .first (rx_first),
    .power (power), .p_valid (p_valid)
  );

  demodulator u_demod (
    .clk, .rst_n,
    .x (adc_q), .x_valid (rx_sin_valid), .first (rx_first),
    .cos_in (rx_cos), .sin_in (rx_sin),
    .amp_i (amp_i), .amp_q (amp_q), .a_valid (a_valid)
  );

  mod_t sel;
  logic carrier;

  receive_sel u_rsel (
    .power (power), .rx_sel (sel), .carrier (carrier)
  );

  symbol_t rx_sym;
  logic    rx_sym_valid;
  mod_t    word_mode;
  logic    in_word;

  detector u_det (
    .clk, .rst_n,
    .amp_i (amp_i), .amp_q (amp_q),
    .rx_sel (sel), .carrier (carrier),
    .hold (in_word), .hold_mode (word_mode),
    .in_valid (p_valid && a_valid),
    .sym (rx_sym), .sym_valid (rx_sym_valid), .overridden (rx_sel_override)
  );

  logic [CODE_W-1:0] sp_data, dil_data;
  logic              sp_valid, sp_ready, dil_valid;
  mod_t              sp_mode, dil_mode, dec_mode;

  sp_converter u_sp (
    .clk, .rst_n,
    .sym (rx_sym), .sym_valid (rx_sym_valid),
    .out_data (sp_data), .out_valid (sp_valid), .out_mode (sp_mode),
    .dropped (rx_dropped), .word_mode (word_mode), .in_word (in_word)
  );

  deinterleaver u_dil (
    .clk, .rst_n,
    .in_data   (sp_data),
    .in_valid  (sp_valid),
    .in_ready  (sp_ready),
    .out_data  (dil_data),
    .out_valid (dil_valid),
    .out_ready (1'b1)
  );

  block_decoder u_dec (
    .clk, .rst_n,
    .in_data       (dil_data),
    .in_valid      (dil_valid),
    .out_data      (rx_data),
    .out_valid     (rx_valid),
    .corrected     (rx_corrected),
    .uncorrectable (rx_uncorrectable)
  );

  // The scheme tag travels with the word through the two register stages.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dil_mode <= MOD_BPSK;
      dec_mode <= MOD_BPSK;
    end else begin
      if (sp_valid)  dil_mode <= sp_mode;
      if (dil_valid) dec_mode <= dil_mode;
    end
  end

  assign rx_mode        = dec_mode;
  assign rx_power       = power;
  assign rx_power_valid = p_valid;
  assign rx_sel         = sel;

  // The receive chain never stalls, and both estimators close a window
  // together.
  a_no_stall: assert property (@(posedge clk) disable iff (!rst_n) sp_valid |-> sp_ready);
  a_in_step:  assert property (@(posedge clk) disable iff (!rst_n) p_valid == a_valid);

endmodule
