// tb_receive_sel: checks the power-to-scheme table at and around each
// threshold (0.01, 0.05, 0.9, in units of 2^-20) and at the powers of the
// four transmit constellations: BPSK 0.0078125, QPSK 0.03515625, 16-QAM
// 0.09766 .. 0.7656, 256-QAM 1.0 .. 225. Below half the BPSK power the
// carrier flag must drop.
module tb_receive_sel;
  import sdr_pkg::*;
  logic [31:0] power;
  mod_t rx_sel;
  logic carrier;
  int checks = 0, failures = 0;

  receive_sel dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_sel(real p, logic [1:0] want, bit want_carrier);
    power = 32'($rtoi(p * 1048576.0));
    #1;
    checks++;
    if (rx_sel !== mod_t'(want) || carrier !== want_carrier) begin
      failures++;
      $display("FAIL P=%f got %b/%b want %b/%b", p, rx_sel, carrier, want, want_carrier);
    end
  endtask

  initial begin
    expect_sel(0.0, 2'b00, 0);
    expect_sel(0.003, 2'b00, 0);
    expect_sel(0.0078125, 2'b00, 1);
    expect_sel(0.0099, 2'b00, 1);
    expect_sel(0.0101, 2'b01, 1);
    expect_sel(0.03515625, 2'b01, 1);
    expect_sel(0.0499, 2'b01, 1);
    expect_sel(0.0501, 2'b10, 1);
    expect_sel(0.09766, 2'b10, 1);
    expect_sel(0.7656, 2'b10, 1);
    expect_sel(0.8999, 2'b10, 1);
    expect_sel(0.9001, 2'b11, 1);
    expect_sel(1.0, 2'b11, 1);
    expect_sel(225.0, 2'b11, 1);
    expect_sel(4095.0, 2'b11, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
