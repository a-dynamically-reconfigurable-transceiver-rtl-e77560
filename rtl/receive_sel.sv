// receive_sel: the RECEIVE_SEL block. It compares the power measured over
// one carrier cycle with fixed thresholds and selects the demodulator:
//   P < 0.01          -> 00 BPSK
//   0.01 <= P < 0.05  -> 01 QPSK
//   0.05 <= P < 0.9   -> 10 16-QAM
//   P >= 0.9          -> 11 256-QAM
// The thresholds are parameters in the power format of sdr_pkg (1.0 = 2^20).
// The transmit levels give 0.0078 (BPSK), 0.035 (QPSK), 0.098 .. 0.77
// (16-QAM) and 1 .. 225 (256-QAM), so each scheme falls in its own band.
// carrier is low when P is below TH_CARRIER (half the BPSK power by
// default): that window held no symbol. This carrier-off test is this
// design's addition, used to frame words. Purely combinational.
module receive_sel
  import sdr_pkg::*;
#(
  parameter logic [POWER_W-1:0] TH_CARRIER = 32'd4096,    // 0.0039
  parameter logic [POWER_W-1:0] TH_QPSK    = 32'd10486,   // 0.01
  parameter logic [POWER_W-1:0] TH_QAM16   = 32'd52429,   // 0.05
  parameter logic [POWER_W-1:0] TH_QAM256  = 32'd943718   // 0.9
) (
  input  logic [POWER_W-1:0] power,
  output mod_t               rx_sel,
  output logic               carrier
);

  always_comb begin
    if (power >= TH_QAM256)     rx_sel = MOD_QAM256;
    else if (power >= TH_QAM16) rx_sel = MOD_QAM16;
    else if (power >= TH_QPSK)  rx_sel = MOD_QPSK;
    else                        rx_sel = MOD_BPSK;
    carrier = (power >= TH_CARRIER);
  end

endmodule
