// interleaver: ROWS x COLS block interleaver (8 x 8 by default) on the
// coded 64-bit word. The word is written into the matrix row by row, row r
// being codeword byte r (bits r*COLS+COLS-1 .. r*COLS), and read out column
// by column: output bit c*ROWS+r is input bit r*COLS+c. Because the word is
// later sent MSB first, a burst of up to ROWS consecutive channel bit errors
// lands in ROWS different codewords, one error each, which the (8,4) decoder
// corrects. Row-in / column-out order is this design's reading of "8x8
// interleaver"; the deinterleaver applies the inverse permutation.
//
// Interface: valid/ready stream, one register stage (data out one cycle
// after it is taken); in_ready is high while the stage is empty or emptied.
module interleaver #(
  parameter int ROWS = 8,
  parameter int COLS = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [ROWS*COLS-1:0] in_data,
  input  logic                 in_valid,
  output logic                 in_ready,
  output logic [ROWS*COLS-1:0] out_data,
  output logic                 out_valid,
  input  logic                 out_ready
);

  logic [ROWS*COLS-1:0] permuted;

  always_comb begin
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        permuted[c*ROWS + r] = in_data[r*COLS + c];
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_data <= permuted;
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
