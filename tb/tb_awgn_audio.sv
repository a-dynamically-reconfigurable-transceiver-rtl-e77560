// tb_awgn_audio: the audio transfer workload through an additive white
// Gaussian noise channel, for all four schemes in turn. The data words are
// a stereo test tone: upper 16 bits 8000*sin, lower 16 bits 8000*cos, at
// 48 samples per tone period. 48 words go out in each of BPSK, QPSK and
// 16-QAM, then 192 words in 256-QAM. The full design runs at its default
// parameters, with the DACs summed into the ADC plus Gaussian noise.
//
// Noise is set per scheme (a fixed signal-to-noise ratio for each scheme):
// sigma = 0.015, 0.05, 0.1 and 3.0 in sample units while BPSK, QPSK, 16-QAM
// and 256-QAM are on air, and 0.015 while the carrier is off. For the first
// three schemes the noise stays far below both the decision distances and
// the power-band margins, so every word must arrive exact, in its scheme.
// For 256-QAM, sigma = 3.0 gives a noise of about 0.53 on each demodulated
// amplitude, against a decision distance of 1.0, so symbol errors occur.
// The power band is still never left. There the test counts the raw bit
// errors before decoding (against codewords built here) and the data bit
// errors after it. Decoding must correct errors, leave fewer bit errors
// than it received, and deliver at least 90 % of the words exact.
module tb_awgn_audio;
  import sdr_pkg::*;

  logic clk = 0, rst_n = 0;
  logic btn_wr_en = 0;
  logic [3:0] btn_wr_data = '0;
  logic [31:0] tx_data = '0;
  logic tx_valid = 0, tx_ready;
  mod_t tx_mode;
  logic tx_active;
  sample_t dac_a, dac_b, adc;
  logic [31:0] rx_data;
  logic rx_valid;
  mod_t rx_mode;
  logic [3:0] rx_corrected;
  logic rx_uncorrectable, rx_dropped;
  logic [31:0] rx_power;
  logic rx_power_valid;
  mod_t rx_sel;
  logic rx_sel_override;

  int checks = 0, failures = 0;

  sdr_backend dut (.*);

  always #5 clk = ~clk;

  localparam int NW_LOW = 48;
  localparam int NW_256 = 192;
  localparam int NWORDS = 3 * NW_LOW + NW_256;

  logic [31:0] words[NWORDS];
  mod_t        modes[NWORDS];

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  initial begin
    wait (cycle == 800000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- channel ----------------
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * 3.14159265358979 * u2);
  endfunction

  function automatic real sigma_of(mod_t m, logic act);
    if (!act) return 0.015;
    case (m)
      MOD_BPSK:  return 0.015;
      MOD_QPSK:  return 0.05;
      MOD_QAM16: return 0.1;
      default:   return 3.0;
    endcase
  endfunction

  int noise = 0;
  mod_t mode_d = MOD_BPSK;
  logic act_d = 0;
  always @(posedge clk) begin
    mode_d <= tx_mode;
    act_d  <= tx_active;
    noise  <= int'($floor(1024.0 * sigma_of(mode_d, act_d) * gauss() + 0.5));
  end

  always_comb begin
    int s;
    s = int'(dac_a) + int'(dac_b) + noise;
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    adc = sample_t'(s);
  end

  // ---------------- reference code ----------------
  function automatic logic [7:0] enc(logic [3:0] d);
    logic [7:0] c;
    c = '0;
    {c[7], c[6], c[5], c[3]} = d;
    c[1] = c[3] ^ c[5] ^ c[7];
    c[2] = c[3] ^ c[6] ^ c[7];
    c[4] = c[5] ^ c[6] ^ c[7];
    c[0] = ^c[7:1];
    return c;
  endfunction

  function automatic logic [63:0] encode(logic [31:0] w);
    logic [63:0] cw;
    for (int n = 0; n < 8; n++) cw[8*n +: 8] = enc(w[4*n +: 4]);
    return cw;
  endfunction

  // ---------------- monitors ----------------
  int loads = 0;
  always @(posedge clk) if (rst_n && dut.tx_sym_tick && dut.ilv_valid && dut.ilv_ready) loads++;

  int n_coded = 0;
  int raw_err[4] = '{0, 0, 0, 0};
  int post_err[4] = '{0, 0, 0, 0};
  int bad_words[4] = '{0, 0, 0, 0};
  int n_corr[4] = '{0, 0, 0, 0};
  int n_words[4] = '{0, 0, 0, 0};
  int got = 0;

  // raw errors: the deinterleaved word against the codewords sent
  always @(posedge clk) if (rst_n && dut.dil_valid) begin
    if (n_coded < NWORDS)
      raw_err[modes[n_coded]] += $countones(dut.dil_data ^ encode(words[n_coded]));
    n_coded++;
  end

  always @(posedge clk) if (rst_n && rx_valid) begin
    int w, e;
    w = got;
    got++;
    checks++;
    if (w >= NWORDS) begin
      failures++;
      $display("FAIL extra word");
    end else begin
      if (rx_mode !== modes[w]) begin
        failures++;
        $display("FAIL word %0d received as scheme %0d, sent %0d", w, rx_mode, modes[w]);
      end
      e = $countones(rx_data ^ words[w]);
      post_err[modes[w]] += e;
      n_corr[modes[w]] += int'(rx_corrected);
      n_words[modes[w]]++;
      if (e != 0) bad_words[modes[w]]++;
      if (modes[w] != MOD_QAM256) begin
        checks++;
        if (e != 0) begin
          failures++;
          $display("FAIL word %0d (scheme %0d): got %h want %h", w, modes[w], rx_data, words[w]);
        end
      end
    end
  end

  // ---------------- stimulus ----------------
  initial begin
    for (int i = 0; i < NWORDS; i++) begin
      int l, r;
      l = int'($floor(8000.0 * $sin(2.0 * 3.14159265358979 * i / 48.0) + 0.5));
      r = int'($floor(8000.0 * $cos(2.0 * 3.14159265358979 * i / 48.0) + 0.5));
      words[i] = {16'(l), 16'(r)};
      modes[i] = (i < NW_LOW) ? MOD_BPSK : (i < 2 * NW_LOW) ? MOD_QPSK
               : (i < 3 * NW_LOW) ? MOD_QAM16 : MOD_QAM256;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < NWORDS; i++) begin
      wait (loads == i);
      @(negedge clk);
      btn_wr_en = 1;
      case (modes[i])
        MOD_BPSK:  btn_wr_data = 4'b1000;
        MOD_QPSK:  btn_wr_data = 4'b0100;
        MOD_QAM16: btn_wr_data = 4'b0010;
        default:   btn_wr_data = 4'b0001;
      endcase
      @(negedge clk);
      btn_wr_en = 0;
      tx_valid = 1;
      tx_data = words[i];
      @(posedge clk);
      while (!tx_ready) @(posedge clk);
      @(negedge clk);
      tx_valid = 0;
    end
    wait (got == NWORDS);
    repeat (600) @(posedge clk);

    for (int m = 0; m < 4; m++)
      $display("scheme %0d: %0d words, raw bit errors %0d of %0d, corrected %0d, data bit errors %0d, bad words %0d",
               m, n_words[m], raw_err[m], 64 * n_words[m], n_corr[m], post_err[m], bad_words[m]);
    checks++;
    if (got != NWORDS) failures++;
    checks += 4;
    if (raw_err[3] == 0) begin failures++; $display("FAIL no channel errors at 256-QAM"); end
    if (n_corr[3] == 0) begin failures++; $display("FAIL nothing corrected"); end
    if (post_err[3] >= raw_err[3]) begin failures++; $display("FAIL decoding did not reduce errors"); end
    if (bad_words[3] * 10 > NW_256) begin failures++; $display("FAIL too many bad 256-QAM words"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
