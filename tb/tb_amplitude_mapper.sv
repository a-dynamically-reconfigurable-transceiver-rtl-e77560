// tb_amplitude_mapper: applies every symbol of every scheme and compares the
// I and Q amplitudes with the constellation levels, written here as plain
// tables: BPSK +-0.125, QPSK +-0.1875, 16-QAM +-0.3125/+-0.875 (2-bit gray
// per axis) and the 256-QAM slice-to-amplitude table (0001 -> -15, 0000 ->
// -13, .., 1001 -> +15). Amplitudes are in 1/16 units. An inactive symbol
// must give zero.
module tb_amplitude_mapper;
  import sdr_pkg::*;
  symbol_t sym;
  amp_t amp_i, amp_q;
  int checks = 0, failures = 0;

  amplitude_mapper dut (.*);

  // 256-QAM: amplitude for each 4-bit slice value
  int lvl256[16];
  int lvl16[4];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_amp(int wi, int wq, string what);
    #1;
    checks++;
    if (int'(amp_i) != wi || int'(amp_q) != wq) begin
      failures++;
      $display("FAIL %s bits=%b: got %0d/%0d want %0d/%0d", what, sym.bits, amp_i, amp_q, wi, wq);
    end
  endtask

  initial begin
    lvl256[4'b0001] = -15; lvl256[4'b0000] = -13; lvl256[4'b0010] = -11; lvl256[4'b0011] = -9;
    lvl256[4'b0111] = -7;  lvl256[4'b0110] = -5;  lvl256[4'b0100] = -3;  lvl256[4'b0101] = -1;
    lvl256[4'b1101] = 1;   lvl256[4'b1100] = 3;   lvl256[4'b1110] = 5;   lvl256[4'b1111] = 7;
    lvl256[4'b1011] = 9;   lvl256[4'b1010] = 11;  lvl256[4'b1000] = 13;  lvl256[4'b1001] = 15;
    lvl16[2'b00] = -14; lvl16[2'b01] = -5; lvl16[2'b11] = 5; lvl16[2'b10] = 14;
    sym.active = 1;
    sym.mode = MOD_BPSK;
    for (int b = 0; b < 2; b++) begin
      sym.bits = 8'(b);
      expect_amp(b ? 2 : -2, 0, "BPSK");
    end
    sym.mode = MOD_QPSK;
    for (int b = 0; b < 4; b++) begin
      sym.bits = 8'(b);
      expect_amp(b[1] ? 3 : -3, b[0] ? 3 : -3, "QPSK");
    end
    sym.mode = MOD_QAM16;
    for (int b = 0; b < 16; b++) begin
      sym.bits = 8'(b);
      expect_amp(lvl16[b[3:2]], lvl16[b[1:0]], "16-QAM");
    end
    sym.mode = MOD_QAM256;
    for (int b = 0; b < 256; b++) begin
      sym.bits = 8'(b);
      expect_amp(16 * lvl256[b[7:4]], 16 * lvl256[b[3:0]], "256-QAM");
    end
    sym.active = 0;
    for (int m = 0; m < 4; m++) begin
      sym.mode = mod_t'(m);
      sym.bits = 8'hA5;
      expect_amp(0, 0, "inactive");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
