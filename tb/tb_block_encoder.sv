// tb_block_encoder: sends random 32-bit words through the encoder with
// random back-pressure. Every output byte must be a valid extended Hamming
// codeword (all three parity checks and the overall parity even) carrying
// its nibble at positions 3, 5, 6, 7; all 16 codewords must be at least 4
// bits apart; words must come out in order, one cycle after being taken,
// and stay put while the output is stalled.
module tb_block_encoder;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] in_data = '0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [63:0] out_data;
  int checks = 0, failures = 0;
  logic [31:0] q[$];

  block_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit codeword_ok(logic [7:0] c, logic [3:0] d);
    return ((c[1] ^ c[3] ^ c[5] ^ c[7]) == 0) && ((c[2] ^ c[3] ^ c[6] ^ c[7]) == 0)
        && ((c[4] ^ c[5] ^ c[6] ^ c[7]) == 0) && ((^c) == 0)
        && ({c[7], c[6], c[5], c[3]} == d);
  endfunction

  int sent = 0, got = 0;

  // driver
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      q.push_back(in_data);
      sent++;
    end
    if (!in_valid || in_ready) begin
      in_valid <= (sent < 300) && ($urandom % 4 != 0);
      in_data  <= $urandom;
    end
    out_ready <= ($urandom % 3 != 0);
  end

  // monitor
  logic [63:0] held;
  logic        stalled = 0;
  always @(posedge clk) if (rst_n) begin
    if (stalled) begin
      checks++;
      if (!out_valid || out_data !== held) begin
        failures++;
        $display("FAIL output changed while stalled");
      end
    end
    stalled <= out_valid && !out_ready;
    held    <= out_data;
    if (out_valid && out_ready) begin
      logic [31:0] w;
      w = q.pop_front();
      got++;
      for (int n = 0; n < 8; n++) begin
        checks++;
        if (!codeword_ok(out_data[8*n +: 8], w[4*n +: 4])) begin
          failures++;
          $display("FAIL word %h byte %0d = %b", w, n, out_data[8*n +: 8]);
        end
      end
    end
  end

  // latency: a word taken at an edge is on offer right after it
  always @(posedge clk) if (rst_n && in_valid && in_ready) begin
    logic [31:0] w;
    w = in_data;
    #1;
    checks++;
    if (!out_valid || !codeword_ok(out_data[7:0], w[3:0]) || !codeword_ok(out_data[63:56], w[31:28])) begin
      failures++;
      $display("FAIL latency for %h", w);
    end
  end

  initial begin
    // distance of the code, through the encoder in isolation
    logic [7:0] cw[16];
    repeat (2) @(posedge clk);
    for (int d = 0; d < 16; d++) cw[d] = hamming84_encode(4'(d));
    for (int a = 0; a < 16; a++)
      for (int b = a + 1; b < 16; b++) begin
        checks++;
        if ($countones(cw[a] ^ cw[b]) < 4) begin
          failures++;
          $display("FAIL distance %0d %0d", a, b);
        end
      end
    rst_n = 1;
    wait (got == 300);
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
