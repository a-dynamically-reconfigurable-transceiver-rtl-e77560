// tb_sp_converter: random 64-bit words are cut here into symbols of a random
// scheme per word (MSB first, 1/2/4/8 bits) and fed in with inactive
// symbols between some words. Every word must come back whole with its
// scheme, one cycle after its last symbol. A word broken off by an inactive
// symbol must be dropped and flagged, and the next word must still be
// assembled correctly. A symbol tagged with another scheme in mid-word must
// add the bits of the word's own scheme (the word's first symbol sets it).
module tb_sp_converter;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0, sym_valid = 0;
  symbol_t sym = '{bits: 0, mode: MOD_BPSK, active: 0};
  logic [63:0] out_data;
  logic out_valid, dropped, in_word;
  mod_t out_mode, word_mode;
  int checks = 0, failures = 0;

  sp_converter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_out = 0, n_drop = 0;
  always @(posedge clk) begin
    if (out_valid) n_out++;
    if (dropped) n_drop++;
  end

  task automatic send_sym(logic [7:0] b, mod_t m, bit act);
    @(negedge clk);
    sym = '{bits: b, mode: m, active: act};
    sym_valid = 1;
    @(negedge clk);
    sym_valid = 0;
    repeat ($urandom % 3) @(negedge clk);
  endtask

  task automatic send_word(logic [63:0] w, mod_t m, int stop_after);
    int k, nsym, n_prev;
    k = (m == MOD_BPSK) ? 1 : (m == MOD_QPSK) ? 2 : (m == MOD_QAM16) ? 4 : 8;
    nsym = 64 / k;
    n_prev = n_out;
    for (int s = 0; s < nsym && s < stop_after; s++) begin
      logic [7:0] b;
      b = 8'((w >> (64 - k * (s + 1))) & ((64'd1 << k) - 1));
      if (s == nsym - 1) begin
        @(negedge clk);
        sym = '{bits: b, mode: m, active: 1'b1};
        sym_valid = 1;
        @(negedge clk);
        sym_valid = 0;
        checks++;
        if (!out_valid || out_data !== w || out_mode !== m) begin
          failures++;
          $display("FAIL word %h mode %0d got %h mode %0d valid %b", w, m, out_data, out_mode, out_valid);
        end
      end else begin
        send_sym(b, m, 1);
      end
    end
    if (stop_after < nsym) begin
      checks++;
      if (n_out != n_prev) begin
        failures++;
        $display("FAIL partial word emitted");
      end
    end
  endtask

  initial begin
    int drops_before;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 80; i++) begin
      send_word({$urandom, $urandom}, mod_t'(i % 4), 99);
      if ($urandom % 3 == 0) send_sym(8'h00, MOD_BPSK, 0);
    end
    drops_before = n_drop;
    send_word({$urandom, $urandom}, MOD_QAM16, 5);
    send_sym(8'h00, MOD_BPSK, 0);
    repeat (2) @(negedge clk);
    checks++;
    if (n_drop != drops_before + 1) begin
      failures++;
      $display("FAIL drop not flagged");
    end
    send_word({$urandom, $urandom}, MOD_QPSK, 99);
    send_word(64'hDEAD_BEEF_0123_4567, MOD_QAM256, 99);
    // a QPSK word whose 5th symbol arrives tagged 16-QAM: still 2 bits
    begin
      logic [63:0] w;
      w = {$urandom, $urandom};
      for (int s = 0; s < 32; s++) begin
        logic [7:0] b;
        b = 8'((w >> (62 - 2 * s)) & 64'd3);
        @(negedge clk);
        sym = '{bits: (s == 4) ? (b | 8'hF0) : b, mode: (s == 4) ? MOD_QAM16 : MOD_QPSK, active: 1'b1};
        sym_valid = 1;
        @(negedge clk);
        sym_valid = 0;
        if (s > 0 && s < 31) begin
          checks++;
          if (!in_word || word_mode !== MOD_QPSK) begin
            failures++;
            $display("FAIL word scheme not held");
          end
        end
      end
      checks++;
      if (!out_valid || out_data !== w || out_mode !== MOD_QPSK) begin
        failures++;
        $display("FAIL held-scheme word %h got %h", w, out_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
