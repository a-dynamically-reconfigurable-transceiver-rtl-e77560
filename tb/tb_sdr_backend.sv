// tb_sdr_backend: end-to-end test of the transceiver back end at its default
// parameters. DAC A and DAC B are looped back to the ADC through a channel
// model (adc = dac_a + dac_b, which can invert the signal for chosen symbols
// to force bit errors). The test writes the button register and sends a
// sequence of data words:
//   - BPSK with no button, clean, with one bit error, with an 8-symbol
//     burst error and with two errors in one codeword
//   - BPSK with B1, QPSK with B2, 16-QAM with B3, 256-QAM with B4, then back
//     to QPSK and to BPSK with no button, with a carrier-off gap once
//   - one QPSK symbol received 1.35 times too strong, so that its power
//     falls in the 16-QAM band: the word's held scheme must override that
//     decision and the word must arrive intact
// The receiver must deliver every word in order, in the scheme it was sent
// with, found from the received power alone; single errors and the burst
// must be corrected and counted, the double error flagged. Words sent back
// to back must arrive 64 / (bits per symbol) carrier cycles of 64 samples
// apart, and the delay from taking a word to receiving it must be
// (symbols per word) * 64 plus one fixed pipeline delay for all words.
// Each mechanism (every scheme, scheme switch, carrier-off gap, correction,
// burst correction, double-error flag, scheme override) is counted and must
// occur.
module tb_sdr_backend;
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

  localparam int NWORDS = 15;
  typedef enum int {ERR_NONE, ERR_ONE, ERR_BURST, ERR_TWO, ERR_LOUD} err_t;
  typedef struct {
    logic [3:0] btn;
    mod_t       mode;
    err_t       err;
    bit         gap_before;  // wait for the previous word to arrive first
  } plan_t;

  plan_t plan[NWORDS] = '{
    '{4'b0000, MOD_BPSK,   ERR_NONE,  0},
    '{4'b0000, MOD_BPSK,   ERR_ONE,   0},
    '{4'b0000, MOD_BPSK,   ERR_BURST, 0},
    '{4'b0000, MOD_BPSK,   ERR_TWO,   0},
    '{4'b1000, MOD_BPSK,   ERR_NONE,  0},
    '{4'b0100, MOD_QPSK,   ERR_NONE,  0},
    '{4'b0100, MOD_QPSK,   ERR_LOUD,  0},
    '{4'b0010, MOD_QAM16,  ERR_NONE,  1},
    '{4'b0010, MOD_QAM16,  ERR_NONE,  0},
    '{4'b0001, MOD_QAM256, ERR_NONE,  0},
    '{4'b0001, MOD_QAM256, ERR_NONE,  0},
    '{4'b0001, MOD_QAM256, ERR_NONE,  0},
    '{4'b0100, MOD_QPSK,   ERR_NONE,  0},
    '{4'b0000, MOD_BPSK,   ERR_NONE,  0},
    '{4'b0001, MOD_QAM256, ERR_NONE,  0}
  };
  logic [31:0] words[NWORDS];

  // ---------------- watchdog ----------------
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  initial begin
    wait (cycle == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- channel ----------------
  // A symbol flagged for corruption has its samples inverted on the way to
  // the ADC, which flips a BPSK bit. The flag follows the transmit symbol
  // timing: the P/S converter loads on a tick, its new symbol reaches the
  // DACs one cycle later.
  int loads = 0, sym_idx = 0;
  int load_cycle[NWORDS];
  bit corrupt_ps = 0, corrupt = 0, loud_ps = 0, loud = 0;

  function automatic bit hit(int w, int s);
    if (w < 0 || w >= NWORDS) return 0;
    case (plan[w].err)
      ERR_ONE:   return s == 3;                 // one bit, codeword 4
      ERR_BURST: return s >= 10 && s < 18;      // 8 bits, 8 codewords
      ERR_TWO:   return s == 0 || s == 8;       // two bits of codeword 7
      ERR_LOUD:  return s == 5;                 // scaled, see below
      default:   return 0;
    endcase
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (dut.tx_sym_tick) begin
      if (dut.ilv_valid && dut.ilv_ready) begin
        load_cycle[loads] = cycle;
        corrupt_ps <= hit(loads, 0);
        loud_ps <= (plan[loads].err == ERR_LOUD);
        sym_idx = 1;
        loads++;
      end else begin
        corrupt_ps <= hit(loads - 1, sym_idx);
        loud_ps <= (loads > 0) && (plan[loads - 1].err == ERR_LOUD);
        sym_idx++;
      end
    end
    corrupt <= corrupt_ps;
    loud    <= loud_ps;
  end

  always_comb begin
    int s;
    s = int'(dac_a) + int'(dac_b);
    if (corrupt && loud) s = (s * 135) / 100;
    else if (corrupt) s = -s;
    if (s > 32767) s = 32767;
    if (s < -32768) s = -32768;
    adc = sample_t'(s);
  end

  // ---------------- mechanism counters ----------------
  int n_mode[4] = '{0, 0, 0, 0};
  int n_switch = 0, n_gap = 0, n_corr = 0, n_burst = 0, n_dbl = 0, got = 0, n_ovr = 0;
  always @(posedge clk) if (rst_n && rx_sel_override) n_ovr++;
  int rx_cycle[NWORDS];
  bit started = 0;

  always @(posedge clk) if (rst_n) begin
    if (tx_active) started <= 1;
    if (started && !tx_active && dut.tx_sym_tick) n_gap++;
  end

  // ---------------- receiver check ----------------
  always @(posedge clk) if (rst_n && rx_valid) begin
    int w;
    w = got;
    got++;
    if (w >= NWORDS) begin
      checks++;
      failures++;
      $display("FAIL extra word %h", rx_data);
    end else begin
      rx_cycle[w] = cycle;
      checks++;
      if (rx_mode !== plan[w].mode) begin
        failures++;
        $display("FAIL word %0d: mode %0d, sent %0d", w, rx_mode, plan[w].mode);
      end
      n_mode[rx_mode]++;
      if (w > 0 && rx_mode != plan[w - 1].mode) n_switch++;
      checks++;
      case (plan[w].err)
        ERR_TWO: begin
          if (!rx_uncorrectable) begin
            failures++;
            $display("FAIL word %0d: double error not flagged", w);
          end else n_dbl++;
        end
        ERR_ONE: begin
          if (rx_data !== words[w] || rx_corrected != 4'd1 || rx_uncorrectable) begin
            failures++;
            $display("FAIL word %0d: single error, got %h corr %0d", w, rx_data, rx_corrected);
          end else n_corr++;
        end
        ERR_BURST: begin
          if (rx_data !== words[w] || rx_corrected != 4'd8 || rx_uncorrectable) begin
            failures++;
            $display("FAIL word %0d: burst, got %h corr %0d", w, rx_data, rx_corrected);
          end else n_burst++;
        end
        default: begin
          if (rx_data !== words[w] || rx_corrected != 4'd0 || rx_uncorrectable) begin
            failures++;
            $display("FAIL word %0d: got %h want %h corr %0d unc %b", w, rx_data, words[w], rx_corrected, rx_uncorrectable);
          end
        end
      endcase
    end
  end

  // Power seen for each scheme must lie in its constellation's range. The
  // one too-strong QPSK symbol (0.0352 * 1.35^2 = 0.064) is counted apart.
  int n_loud_p = 0;
  always @(posedge clk) if (rst_n && rx_power_valid && rx_power >= 32'd4096) begin
    real p;
    p = real'(rx_power) / 1048576.0;
    checks++;
    case (rx_sel)
      MOD_BPSK:  if (p < 0.0070 || p > 0.0086) begin failures++; $display("FAIL BPSK power %f", p); end
      MOD_QPSK:  if (p < 0.0340 || p > 0.0360) begin failures++; $display("FAIL QPSK power %f", p); end
      MOD_QAM16: if (p > 0.0600 && p < 0.0680) n_loud_p++;
                 else if (p < 0.0960 || p > 0.7700) begin failures++; $display("FAIL 16-QAM power %f", p); end
      default:   if (p < 0.99   || p > 225.1)  begin failures++; $display("FAIL 256-QAM power %f", p); end
    endcase
  end

  function automatic int nsym(mod_t m);
    return 64 / int'(bits_per_symbol(m));
  endfunction

  // ---------------- stimulus ----------------
  initial begin
    for (int i = 0; i < NWORDS; i++) words[i] = $urandom;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < NWORDS; i++) begin
      // the previous word must be on air before the buttons change
      wait (loads == i);
      if (plan[i].gap_before) wait (got == i);
      @(negedge clk);
      btn_wr_en = 1;
      btn_wr_data = plan[i].btn;
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

    // timing: fixed delay after the last symbol, back-to-back word spacing
    begin
      int d0;
      d0 = rx_cycle[0] - load_cycle[0] - 64 * nsym(plan[0].mode);
      $display("pipeline delay after the last symbol: %0d cycles", d0);
      for (int i = 0; i < NWORDS; i++) begin
        checks++;
        if (rx_cycle[i] - load_cycle[i] - 64 * nsym(plan[i].mode) != d0) begin
          failures++;
          $display("FAIL word %0d latency", i);
        end
        if (i > 0 && !plan[i].gap_before) begin
          checks++;
          if (rx_cycle[i] - rx_cycle[i - 1] != 64 * nsym(plan[i].mode)) begin
            failures++;
            $display("FAIL word %0d spacing %0d", i, rx_cycle[i] - rx_cycle[i - 1]);
          end
        end
      end
    end

    $display("words %0d; BPSK %0d QPSK %0d 16-QAM %0d 256-QAM %0d; switches %0d; gaps %0d; corrected %0d; bursts %0d; double %0d; overrides %0d",
             got, n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_switch, n_gap, n_corr, n_burst, n_dbl, n_ovr);
    checks++;
    if (n_ovr != 1 || n_loud_p != 1) begin
      failures++;
      $display("FAIL %0d scheme overrides and %0d loud windows, expected 1", n_ovr, n_loud_p);
    end
    checks++;
    if (got != NWORDS) failures++;
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (n_mode[m] == 0) begin failures++; $display("FAIL scheme %0d never received", m); end
    end
    checks += 5;
    if (n_switch == 0) begin failures++; $display("FAIL no scheme switch"); end
    if (n_gap == 0)    begin failures++; $display("FAIL no carrier-off gap"); end
    if (n_corr == 0)   begin failures++; $display("FAIL no single correction"); end
    if (n_burst == 0)  begin failures++; $display("FAIL no burst correction"); end
    if (n_dbl == 0)    begin failures++; $display("FAIL no double-error flag"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
