// block_decoder: forward error correction of the receive chain. The 64-bit
// deinterleaved word holds eight extended (8,4) Hamming codewords (byte n
// carries data nibble n, layout of sdr_pkg::hamming84_encode). For each
// codeword the 3-bit syndrome names the Hamming position in error and the
// overall parity tells one error from two:
//   syndrome 0, parity ok      -> no error
//   parity wrong               -> one error: the named bit (or the parity
//                                 bit itself) is flipped, data corrected
//   syndrome != 0, parity ok   -> two errors: flagged, data passed as is
// The 32 redundant bits are dropped, leaving the 32-bit data word. The
// double-error flag is this design's addition.
//
// Timing: one register stage; out_valid follows in_valid by one cycle.
// corrected counts the codewords of the word with a corrected error (0..8),
// uncorrectable is high if any codeword had two errors.
module block_decoder
  import sdr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CODE_W-1:0] in_data,
  input  logic              in_valid,
  output logic [WORD_W-1:0] out_data,
  output logic              out_valid,
  output logic [3:0]        corrected,
  output logic              uncorrectable
);

  logic [WORD_W-1:0] data;
  logic [3:0]        n_corr;
  logic              dbl;

  always_comb begin
    logic [7:0] c;
    logic [2:0] s;
    logic       p;
    data   = '0;
    n_corr = '0;
    dbl    = 1'b0;
    for (int n = 0; n < WORD_W / 4; n++) begin
      c    = in_data[8*n +: 8];
      s[0] = c[1] ^ c[3] ^ c[5] ^ c[7];
      s[1] = c[2] ^ c[3] ^ c[6] ^ c[7];
      s[2] = c[4] ^ c[5] ^ c[6] ^ c[7];
      p    = ^c;
      if (p) begin
        c[s] = !c[s];   // s == 0 flips the overall parity bit
        n_corr = n_corr + 4'd1;
      end else if (s != 3'd0) begin
        dbl = 1'b1;
      end
      data[4*n +: 4] = {c[7], c[6], c[5], c[3]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_data      <= '0;
      out_valid     <= 1'b0;
      corrected     <= '0;
      uncorrectable <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data      <= data;
        corrected     <= n_corr;
        uncorrectable <= dbl;
      end
    end
  end

endmodule
