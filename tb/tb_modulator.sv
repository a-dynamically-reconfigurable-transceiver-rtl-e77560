// tb_modulator: drives random symbols of every scheme and random carrier
// samples. DAC A must carry the I amplitude times the cosine sample and
// DAC B the Q amplitude times the sine sample, in the 10-fractional-bit
// sample format, two cycles after the carrier sample and one after the
// symbol. The expected levels come from the constellation tables.
module tb_modulator;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0;
  symbol_t sym;
  logic signed [15:0] cos_in = 0, sin_in = 0;
  sample_t dac_a, dac_b;
  int checks = 0, failures = 0;

  modulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lvl256[16] = '{-13, -15, -11, -9, -3, -1, -5, -7, 13, 15, 11, 9, 3, 1, 5, 7};
  int lvl16[4]   = '{-14, -5, 14, 5};

  // amplitude (1/16 units) of each channel for a symbol
  function automatic void levels(symbol_t s, output int ai, output int aq);
    ai = 0; aq = 0;
    if (s.active)
      case (s.mode)
        MOD_BPSK:  ai = s.bits[0] ? 2 : -2;
        MOD_QPSK:  begin ai = s.bits[1] ? 3 : -3; aq = s.bits[0] ? 3 : -3; end
        MOD_QAM16: begin ai = lvl16[s.bits[3:2]]; aq = lvl16[s.bits[1:0]]; end
        default:   begin ai = 16 * lvl256[s.bits[7:4]]; aq = 16 * lvl256[s.bits[3:0]]; end
      endcase
  endfunction

  initial begin
    int ci[$], si[$];
    sym = '{bits: 0, mode: MOD_BPSK, active: 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // carrier for cycle t, symbol for cycle t+1
      ci.push_back(int'(cos_in));
      si.push_back(int'(sin_in));
      cos_in = 16'($urandom);
      sin_in = 16'($urandom);
      if (t % 5 == 0) sym = '{bits: 8'($urandom), mode: mod_t'($urandom), active: ($urandom % 8 != 0)};
      @(posedge clk);
      #1;
      if (t >= 2) begin
        int ai, aq, c, s, wa, wb;
        levels(sym, ai, aq);
        c = ci[ci.size() - 1];
        s = si[si.size() - 1];
        wa = (ai * c) >>> 9;
        wb = (aq * s) >>> 9;
        checks++;
        if (int'(dac_a) != wa || int'(dac_b) != wb) begin
          failures++;
          $display("FAIL t=%0d got %0d/%0d want %0d/%0d", t, dac_a, dac_b, wa, wb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
