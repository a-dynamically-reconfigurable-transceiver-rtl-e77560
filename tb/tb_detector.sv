// tb_detector: for every symbol of every scheme it presents the
// constellation amplitudes (from the level tables here) plus random noise
// below half the level spacing, and checks the detected bits, the scheme
// tag and the one-cycle latency. A window flagged as carrier-off must give
// an inactive symbol. Inside a word (hold high) the held scheme must be
// used instead of the window's own decision, and the override flagged.
module tb_detector;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0, carrier = 1, in_valid = 0;
  sample_t amp_i = 0, amp_q = 0;
  mod_t rx_sel = MOD_BPSK;
  logic hold = 0;
  mod_t hold_mode = MOD_BPSK;
  symbol_t sym;
  logic sym_valid, overridden;
  int checks = 0, failures = 0;

  detector dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // level (in units of 1/1024) per code
  int lvl256[16] = '{-13, -15, -11, -9, -3, -1, -5, -7, 13, 15, 11, 9, 3, 1, 5, 7};
  real lvl16[4]  = '{-0.875, -0.3125, 0.875, 0.3125};

  function automatic int noisy(real a, real spread);
    return int'($floor(a * 1024.0 + 0.5)) + int'($urandom % (2 * int'(spread * 1024.0) + 1)) - int'(spread * 1024.0);
  endfunction

  task automatic apply(mod_t m, real ai, real aq, real spread, logic [7:0] want, bit c);
    @(negedge clk);
    rx_sel = m;
    amp_i = sample_t'(noisy(ai, spread));
    amp_q = sample_t'(noisy(aq, spread));
    carrier = c;
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!sym_valid || sym.active !== c || (c && (sym.bits !== want || sym.mode !== m))) begin
      failures++;
      $display("FAIL mode %0d A=%0d B=%0d got %b act %b want %b", m, amp_i, amp_q, sym.bits, sym.active, want);
    end
  endtask

  task automatic apply_held(mod_t decided, real ai, real aq, logic [7:0] want, mod_t want_mode, bit want_ovr);
    @(negedge clk);
    rx_sel = decided;
    amp_i = sample_t'(noisy(ai, 0.05));
    amp_q = sample_t'(noisy(aq, 0.05));
    carrier = 1;
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!sym_valid || sym.bits !== want || sym.mode !== want_mode || overridden !== want_ovr) begin
      failures++;
      $display("FAIL held: got %b mode %0d ovr %b, want %b mode %0d ovr %b", sym.bits, sym.mode, overridden, want, want_mode, want_ovr);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 4; rep++) begin
      for (int b = 0; b < 2; b++) apply(MOD_BPSK, b ? 0.125 : -0.125, 0.0, 0.1, 8'(b), 1);
      for (int b = 0; b < 4; b++) apply(MOD_QPSK, b[1] ? 0.1875 : -0.1875, b[0] ? 0.1875 : -0.1875, 0.15, 8'(b), 1);
      for (int b = 0; b < 16; b++) apply(MOD_QAM16, lvl16[b[3:2]], lvl16[b[1:0]], 0.25, 8'(b), 1);
      for (int b = 0; b < 256; b++) apply(MOD_QAM256, real'(lvl256[b[7:4]]), real'(lvl256[b[3:0]]), 0.9, 8'(b), 1);
    end
    // beyond the outer levels the outermost code is kept
    apply(MOD_QAM256, 20.0, -19.0, 0.1, 8'b1001_0001, 1);
    apply(MOD_QAM16, 2.0, -2.0, 0.1, 8'b0000_1000, 1);
    apply(MOD_BPSK, 0.125, 0.0, 0.0, 8'h00, 0);
    // held scheme: a 16-QAM point decided as 16-QAM, held as QPSK -> signs
    hold = 1;
    hold_mode = MOD_QPSK;
    apply_held(MOD_QAM16, 0.3125, -0.875, 8'b10, MOD_QPSK, 1);
    apply_held(MOD_QPSK, 0.1875, 0.1875, 8'b11, MOD_QPSK, 0);
    hold_mode = MOD_QAM256;
    apply_held(MOD_BPSK, 7.0, -1.0, 8'b1111_0101, MOD_QAM256, 1);
    hold = 0;
    apply_held(MOD_QAM16, 0.875, 0.875, 8'b1010, MOD_QAM16, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
