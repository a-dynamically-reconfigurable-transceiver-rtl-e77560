// sdr_pkg: types, number formats and small functions shared by the transmit
// and receive chains of the reconfigurable BPSK / QPSK / 16-QAM / 256-QAM
// transceiver back end.
//
// Modulation codes are the 2-bit select words of the transceiver (00 BPSK,
// 01 QPSK, 10 16-QAM, 11 256-QAM). The amplitude levels are those of the
// constellation table: BPSK +-0.125, QPSK +-0.1875 on I and Q, 16-QAM
// +-0.3125 / +-0.875, 256-QAM the odd integers +-1 .. +-15.
//
// Number formats chosen for this design (the levels above are exact in them):
//   amplitude : signed AMP_W bits, AMP_FRAC fractional bits (1/16 steps)
//   carrier   : signed CARRIER_W bits, full scale 2^(CARRIER_W-1)-1 = 1.0
//   sample    : signed SAMPLE_W bits, SAMPLE_FRAC fractional bits (DAC/ADC)
//   power     : unsigned, 2*SAMPLE_FRAC fractional bits
//
// 256-QAM gray code: the 4-bit code for level index k (k = 0 .. 15 for the
// levels -15, -13, .. +15) is gray(k) ^ 4'b0001 with gray(k) = k ^ (k >> 1).
// This gives 0001 for -15, 0000 for -13, .. 1000 for +13, 1001 for +15.
// 16-QAM uses the plain 2-bit gray code per axis: 00 -0.875, 01 -0.3125,
// 11 +0.3125, 10 +0.875 (the axis mapping is this design's choice).
package sdr_pkg;

  typedef enum logic [1:0] {
    MOD_BPSK   = 2'b00,
    MOD_QPSK   = 2'b01,
    MOD_QAM16  = 2'b10,
    MOD_QAM256 = 2'b11
  } mod_t;

  localparam int WORD_W      = 32;  // data word from / to the front end
  localparam int CODE_W      = 64;  // coded, interleaved word
  localparam int SYM_W       = 8;   // widest symbol (256-QAM)
  localparam int AMP_W       = 9;
  localparam int AMP_FRAC    = 4;
  localparam int CARRIER_W   = 16;
  localparam int SAMPLE_W    = 16;
  localparam int SAMPLE_FRAC = 10;
  localparam int POWER_W     = 2 * SAMPLE_W;
  localparam int SPS         = 64;  // samples per carrier cycle = per symbol

  typedef logic signed [AMP_W-1:0]    amp_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Amplitude levels in 1/16 units.
  localparam amp_t AMP_BPSK    = amp_t'(2);   // 0.125
  localparam amp_t AMP_QPSK    = amp_t'(3);   // 0.1875
  localparam amp_t AMP_QAM16_L = amp_t'(5);   // 0.3125
  localparam amp_t AMP_QAM16_H = amp_t'(14);  // 0.875
  localparam amp_t AMP_QAM256  = amp_t'(16);  // 1.0, times the odd level

  typedef struct packed {
    logic [SYM_W-1:0] bits;   // symbol bits, right aligned, MSB sent first
    mod_t             mode;
    logic             active; // 0: no symbol (carrier off)
  } symbol_t;

  function automatic logic [3:0] bits_per_symbol(mod_t m);
    case (m)
      MOD_BPSK:  return 4'd1;
      MOD_QPSK:  return 4'd2;
      MOD_QAM16: return 4'd4;
      default:   return 4'd8;
    endcase
  endfunction

  // 256-QAM: level index (0 .. 15) <-> 4-bit gray code.
  function automatic logic [3:0] qam256_code(logic [3:0] idx);
    return (idx ^ (idx >> 1)) ^ 4'b0001;
  endfunction

  function automatic logic [3:0] qam256_index(logic [3:0] code);
    logic [3:0] g;
    logic [3:0] b;
    g = code ^ 4'b0001;
    b[3] = g[3];
    for (int i = 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // 16-QAM axis: 2-bit gray code <-> level index (0 .. 3, low to high).
  function automatic logic [1:0] qam16_code(logic [1:0] idx);
    return idx ^ (idx >> 1);
  endfunction

  function automatic logic [1:0] qam16_index(logic [1:0] code);
    return {code[1], code[1] ^ code[0]};
  endfunction

  // Extended Hamming (8,4). Codeword bit p (p = 1 .. 7) is Hamming position
  // p; data d[0..3] sit at positions 3, 5, 6, 7, parity bits at 1, 2, 4;
  // bit 0 is the overall parity, making the code SEC-DED.
  function automatic logic [7:0] hamming84_encode(logic [3:0] d);
    logic [7:0] c;
    c[3] = d[0];
    c[5] = d[1];
    c[6] = d[2];
    c[7] = d[3];
    c[1] = c[3] ^ c[5] ^ c[7];
    c[2] = c[3] ^ c[6] ^ c[7];
    c[4] = c[5] ^ c[6] ^ c[7];
    c[0] = ^c[7:1];
    return c;
  endfunction

endpackage
