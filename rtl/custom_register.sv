// custom_register: the register through which the front end tells the back
// end which modulation button is pressed.
//
// The front end writes the four button lines (B1 in bit 3 .. B4 in bit 0, so
// a pressed B1 reads 1000 and a pressed B2 reads 0100); a pressed button
// drives its line to 1 and leaves the others at 0, and 0000 means no button.
// The value is held until the next write, so a selection stays in force
// after the button is released; that hold, the write strobe and the reset
// value 0000 (BPSK) are this design's choices. A write takes effect on the
// next rising clock edge; btn_lines is a register output.
module custom_register (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr_en,     // write strobe from the front end
  input  logic [3:0] wr_data,   // button lines {B1, B2, B3, B4}
  output logic [3:0] btn_lines  // held button lines
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     btn_lines <= 4'b0000;
    else if (wr_en) btn_lines <= wr_data;
  end

endmodule
