// tb_ps_converter: feeds random 64-bit words while the modulation select
// changes at random, with a symbol tick every TICK cycles. The symbols
// coming out are reassembled MSB first: each word must come back whole, in
// the scheme selected when it was taken, with 1/2/4/8 bits per symbol, so
// it takes 64, 32, 16 or 8 ticks. Symbols must be stable between ticks,
// and with no word waiting the output must go inactive.
module tb_ps_converter;
  import sdr_pkg::*;
  localparam int TICK = 8;
  logic clk = 0, rst_n = 0, sym_tick = 0;
  mod_t mod_sel = MOD_BPSK;
  logic [63:0] in_data = '0;
  logic in_valid = 0, in_ready;
  symbol_t sym;
  int checks = 0, failures = 0;

  ps_converter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    sym_tick <= ((cyc + 1) % TICK == 0);
    mod_sel <= mod_t'($urandom);
  end

  typedef struct { logic [63:0] w; mod_t m; } item_t;
  item_t q[$];
  int sent = 0, got = 0, idle_seen = 0, gap = 0;

  // source: offers a word most of the time, pauses now and then
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      q.push_back('{in_data, mod_sel});
      sent++;
      in_valid <= 1'b0;
      gap <= $urandom % 3;
    end else if (!in_valid) begin
      if (gap > 0) gap <= gap - (sym_tick ? 1 : 0);
      else begin
        in_valid <= sent < 60;
        in_data  <= {$urandom, $urandom};
      end
    end
  end

  // sink
  logic [63:0] acc;
  int nbits = 0, ticks_in_word = 0;
  symbol_t last;
  logic tick_d = 0;
  bit have_last = 0;
  always @(posedge clk) if (rst_n) begin
    tick_d <= sym_tick;
    #1;
    if (!tick_d && have_last) begin
      checks++;
      if (sym != last) begin
        failures++;
        $display("FAIL symbol changed between ticks");
      end
    end
    last = sym;
    have_last = 1;
    if (tick_d) begin
      if (!sym.active) begin
        idle_seen++;
        checks++;
        if (nbits != 0) begin
          failures++;
          $display("FAIL idle in mid word");
        end
      end else begin
        int k;
        k = int'(bits_per_symbol(sym.mode));
        for (int b = k - 1; b >= 0; b--) acc = {acc[62:0], sym.bits[b]};
        nbits += k;
        ticks_in_word++;
        if (nbits >= 64) begin
          item_t it;
          it = q.pop_front();
          got++;
          checks++;
          if (acc !== it.w || sym.mode !== it.m || nbits != 64 || ticks_in_word != 64 / k) begin
            failures++;
            $display("FAIL word %h mode %0d: got %h mode %0d bits %0d ticks %0d", it.w, it.m, acc, sym.mode, nbits, ticks_in_word);
          end
          nbits = 0;
          ticks_in_word = 0;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got == 60);
    repeat (3 * TICK) @(posedge clk);
    checks++;
    if (idle_seen == 0) begin
      failures++;
      $display("FAIL never idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
