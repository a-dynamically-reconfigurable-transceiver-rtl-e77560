// tb_mod_select: applies all 16 button-line patterns. The one-hot and
// all-zero patterns are checked against the select table (none/B1 -> 00,
// B2 -> 01, B3 -> 10, B4 -> 11); patterns with several buttons must follow
// the highest-numbered button.
module tb_mod_select;
  import sdr_pkg::*;
  logic [3:0] btn_lines;
  mod_t mod_sel;
  int checks = 0, failures = 0;

  mod_select dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] want;
    for (int v = 0; v < 16; v++) begin
      btn_lines = 4'(v);
      case (btn_lines)
        4'b0000: want = 2'b00;
        4'b1000: want = 2'b00;
        4'b0100: want = 2'b01;
        4'b0010: want = 2'b10;
        4'b0001: want = 2'b11;
        default: want = btn_lines[0] ? 2'b11 : btn_lines[1] ? 2'b10 : btn_lines[2] ? 2'b01 : 2'b00;
      endcase
      #1;
      checks++;
      if (mod_sel !== mod_t'(want)) begin
        failures++;
        $display("FAIL lines=%b got %b want %b", btn_lines, mod_sel, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
