// tb_block_decoder: random data words are encoded here with the extended
// (8,4) Hamming code (parity positions 1, 2, 4, overall parity in bit 0)
// and sent with no error, one flipped bit in some codewords, or two flipped
// bits in one codeword. One error per codeword must be corrected and
// counted, two must raise the uncorrectable flag, and the result must come
// one cycle after the input.
module tb_block_decoder;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [63:0] in_data = '0;
  logic [31:0] out_data;
  logic out_valid, uncorrectable;
  logic [3:0] corrected;
  int checks = 0, failures = 0;

  block_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] enc(logic [3:0] d);
    logic [7:0] c;
    c = '0;
    {c[7], c[6], c[5], c[3]} = d;
    for (int pos = 1; pos < 8; pos++)
      if (pos != 1 && pos != 2 && pos != 4) begin
        if (c[pos]) begin
          if (pos & 1) c[1] ^= 1'b1;
          if (pos & 2) c[2] ^= 1'b1;
          if (pos & 4) c[4] ^= 1'b1;
        end
      end
    c[0] = ^c[7:1];
    return c;
  endfunction

  task automatic send(logic [31:0] w, int nerr_words, bit dbl);
    logic [63:0] cw;
    int want_corr;
    for (int n = 0; n < 8; n++) cw[8*n +: 8] = enc(w[4*n +: 4]);
    want_corr = 0;
    for (int n = 0; n < nerr_words; n++) begin
      int pos;
      pos = 8 * n + int'($urandom % 8);
      cw[pos] = !cw[pos];
      want_corr++;
    end
    if (dbl) begin
      int a, b;
      a = $urandom % 8;
      b = (a + 1 + $urandom % 7) % 8;
      cw[56 + a] = !cw[56 + a];
      cw[56 + b] = !cw[56 + b];
    end
    @(negedge clk);
    in_data = cw;
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || corrected != 4'(want_corr) || uncorrectable != dbl
        || (!dbl && out_data !== w)) begin
      failures++;
      $display("FAIL w=%h errs=%0d dbl=%0d got %h corr=%0d unc=%b", w, nerr_words, dbl, out_data, corrected, uncorrectable);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) send($urandom, 0, 0);
    for (int i = 0; i < 600; i++) send($urandom, 1 + $urandom % 8, 0);
    for (int i = 0; i < 200; i++) send($urandom, $urandom % 7, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
