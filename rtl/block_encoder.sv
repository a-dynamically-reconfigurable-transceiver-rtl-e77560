// block_encoder: forward error correction of the transmit chain. A 32-bit
// data word is cut into eight 4-bit nibbles and each nibble is coded with
// the extended (8,4) Hamming code, giving a 64-bit word: nibble n
// (bits 4n+3 .. 4n) becomes codeword byte n (bits 8n+7 .. 8n). The code can
// correct one bit error per 4 data bits. The codeword bit layout (see
// sdr_pkg::hamming84_encode) is this design's choice.
//
// Interface: valid/ready stream on both sides, one register stage. A word is
// taken when in_valid && in_ready and appears at the output on the next
// cycle; in_ready is high while the stage is empty or being emptied.
module block_encoder
  import sdr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [WORD_W-1:0] in_data,
  input  logic              in_valid,
  output logic              in_ready,
  output logic [CODE_W-1:0] out_data,
  output logic              out_valid,
  input  logic              out_ready
);

  logic [CODE_W-1:0] coded;

  always_comb begin
    for (int n = 0; n < WORD_W / 4; n++)
      coded[8*n +: 8] = hamming84_encode(in_data[4*n +: 4]);
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_data <= coded;
    end
  end

  // A word on offer stays on offer, unchanged, until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
