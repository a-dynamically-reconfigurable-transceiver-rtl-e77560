// deinterleaver: inverse of the ROWS x COLS block interleaver (8 x 8 by
// default). The received 64-bit word was read out of the interleaver matrix
// column by column; this block writes it back column by column and reads it
// row by row, so output bit r*COLS+c is input bit c*ROWS+r and output byte r
// is again codeword r.
//
// Interface: valid/ready stream, one register stage (data out one cycle
// after it is taken); in_ready is high while the stage is empty or emptied.
module deinterleaver #(
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
        permuted[r*COLS + c] = in_data[c*ROWS + r];
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
